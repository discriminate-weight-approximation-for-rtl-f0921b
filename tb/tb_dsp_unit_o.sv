// tb_dsp_unit_o: DSP unit without approximation.  Any weights, no offline
// preparation: every product must be exact.
//  - Default WOP-A8W4 unit (3 weights): a stream of one snippet per cycle,
//    results checked exactly 3 cycles after their inputs; zero weights and
//    extreme operands are included.
//  - WOP-A4W4 unit (4 weights of 4 bits, 4-bit activation).
//  - Weight-activation packing unit (2 activations x 2 weights, 4-bit).
module tb_dsp_unit_o;
  int checks = 0, failures = 0, n_zero = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        v1, ov1;
  logic [7:0]  a1 [1];
  logic [3:0]  w1 [3];
  logic [11:0] pr1 [1][3];
  dsp_unit_o u_def (.clk, .rst_n, .in_valid(v1), .a(a1), .w(w1), .out_valid(ov1), .prod(pr1));

  logic       v2, ov2;
  logic [3:0] a2 [1];
  logic [3:0] w2 [4];
  logic [7:0] pr2 [1][4];
  dsp_unit_o #(.N(1), .M(4), .BA(4), .BW(4)) u_a4w4 (
    .clk, .rst_n, .in_valid(v2), .a(a2), .w(w2), .out_valid(ov2), .prod(pr2));

  logic       v3, ov3;
  logic [3:0] a3 [2];
  logic [3:0] w3 [2];
  logic [7:0] pr3 [2][2];
  dsp_unit_o #(.N(2), .M(2), .BA(4), .BW(4)) u_wap (
    .clk, .rst_n, .in_valid(v3), .a(a3), .w(w3), .out_valid(ov3), .prod(pr3));

  typedef struct {
    int prod [3];
    bit valid;
  } exp_t;
  exp_t hist [3];

  initial begin
    exp_t e;
    v1 = 0; v2 = 0; v3 = 0;
    a1[0] = 0; a2[0] = 0; a3[0] = 0; a3[1] = 0;
    for (int i = 0; i < 3; i++) w1[i] = 0;
    for (int i = 0; i < 4; i++) w2[i] = 0;
    w3[0] = 0; w3[1] = 0;
    for (int s = 0; s < 3; s++) hist[s].valid = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    for (int t = 0; t < 2003; t++) begin
      @(negedge clk);
      if (hist[2].valid) begin
        chk(ov1 == 1'b1, "valid after 3 cycles");
        for (int i = 0; i < 3; i++) chk(int'(pr1[0][i]) == hist[2].prod[i], "product");
      end else chk(ov1 == 1'b0, "no spurious valid");
      hist[2] = hist[1]; hist[1] = hist[0];
      e.valid = (t < 2000) && ($urandom_range(9, 0) != 0);
      a1[0] = (t % 50 == 0) ? 8'hff : 8'($urandom);
      for (int i = 0; i < 3; i++) begin
        w1[i] = (t % 50 == 0) ? 4'hf : 4'($urandom);
        if (w1[i] == 0) n_zero++;
        e.prod[i] = int'(a1[0]) * int'(w1[i]);
      end
      v1 = e.valid;
      hist[0] = e;
    end

    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      a2[0] = 4'($urandom);
      for (int i = 0; i < 4; i++) w2[i] = 4'($urandom);
      a3[0] = 4'($urandom); a3[1] = 4'($urandom);
      w3[0] = 4'($urandom); w3[1] = 4'($urandom);
      v2 = 1; v3 = 1;
      @(negedge clk); v2 = 0; v3 = 0;
      @(negedge clk); @(negedge clk);
      chk(ov2 && ov3, "valid of A4W4 and n=2 units");
      for (int i = 0; i < 4; i++) chk(int'(pr2[0][i]) == int'(a2[0]) * int'(w2[i]), "A4W4 product");
      for (int j = 0; j < 2; j++)
        for (int i = 0; i < 2; i++)
          chk(int'(pr3[j][i]) == int'(a3[j]) * int'(w3[i]), "n=2 product");
    end

    chk(n_zero > 10, "zero weights exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
