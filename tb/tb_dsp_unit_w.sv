// tb_dsp_unit_w: DSP unit with intra-DSP approximation.
//  - Default WOP-A8W4 unit (3 weights, 27-bit weight port): a stream of one
//    snippet per cycle, each approximated offline by the reference model,
//    plus some all-odd snippets that were not prepared (err expected).
//    Every result must equal a * p exactly and arrive exactly 3 cycles after
//    its input.
//  - The 4-bit example configuration (weight port 19 bits): activation 2 and
//    weights {11, 15, 3}, approximated to {10, 15, 3}, give {20, 30, 6}.
//  - A weight-activation packing unit (2 activations x 2 weights, 4-bit,
//    11-bit weight port, 27-bit activation port): random prepared snippets.
module tb_dsp_unit_w;
  import dwa_tb_pkg::*;
  int checks = 0, failures = 0, n_apx = 0, n_err = 0;
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

  // Default unit.
  logic       v1, ov1, err1;
  logic [7:0] a1 [1];
  logic [3:0] p1 [3];
  logic [11:0] pr1 [1][3];
  dsp_unit_w u_def (.clk, .rst_n, .in_valid(v1), .a(a1), .p(p1),
                    .out_valid(ov1), .prod(pr1), .err(err1));

  // Example unit (b^a = b^w = 4, D^w = 19).
  logic       v2, ov2, err2;
  logic [3:0] a2 [1];
  logic [3:0] p2 [3];
  logic [7:0] pr2 [1][3];
  dsp_unit_w #(.N(1), .M(3), .BA(4), .BW(4), .DW(19)) u_fig (
    .clk, .rst_n, .in_valid(v2), .a(a2), .p(p2), .out_valid(ov2), .prod(pr2), .err(err2));

  // Weight-activation packing unit.
  logic       v3, ov3, err3;
  logic [3:0] a3 [2];
  logic [3:0] p3 [2];
  logic [7:0] pr3 [2][2];
  dsp_unit_w #(.N(2), .M(2), .BA(4), .BW(4), .DW(11), .DA(27)) u_wap (
    .clk, .rst_n, .in_valid(v3), .a(a3), .p(p3), .out_valid(ov3), .prod(pr3), .err(err3));

  typedef struct {
    int prod [3];
    bit err;
    bit valid;
  } exp_t;
  exp_t hist [4];

  initial begin
    int w [16];
    exp_t e;
    v1 = 0; v2 = 0; v3 = 0;
    a1[0] = 0; a2[0] = 0; a3[0] = 0; a3[1] = 0;
    for (int i = 0; i < 3; i++) begin p1[i] = 0; p2[i] = 0; end
    p3[0] = 0; p3[1] = 0;
    for (int s = 0; s < 4; s++) hist[s].valid = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // Example configuration.
    @(negedge clk);
    w[0] = 11; w[1] = 15; w[2] = 3;
    n_apx += approx_snippet(w, 3, 4, 4, 19);
    chk(w[0] == 10 && w[1] == 15 && w[2] == 3, "offline approximation of the example");
    for (int i = 0; i < 3; i++) p2[i] = 4'(w[i]);
    a2[0] = 4'd2; v2 = 1;
    @(negedge clk); v2 = 0;
    @(negedge clk);
    chk(!ov2, "example not early");
    @(negedge clk);
    chk(ov2 && !err2, "example latency 3");
    chk(pr2[0][0] == 20 && pr2[0][1] == 30 && pr2[0][2] == 6, "example products 20/30/6");

    // Default unit: streaming, one snippet per cycle.
    for (int t = 0; t < 2003; t++) begin
      @(negedge clk);
      if (hist[2].valid) begin
        chk(ov1 == 1'b1, "valid after 3 cycles");
        chk(err1 == hist[2].err, "err flag");
        if (!hist[2].err)
          for (int i = 0; i < 3; i++) chk(int'(pr1[0][i]) == hist[2].prod[i], "product");
      end else chk(ov1 == 1'b0, "no spurious valid");
      hist[2] = hist[1]; hist[1] = hist[0];
      e.valid = (t < 2000) && ($urandom_range(9, 0) != 0);
      for (int i = 0; i < 3; i++) w[i] = $urandom_range(15, 0);
      e.err = 0;
      if (t % 97 == 5) begin
        for (int i = 0; i < 3; i++) w[i] = 2 * $urandom_range(7, 0) + 1;
        e.err = 1;
      end else n_apx += approx_snippet(w, 3, 8, 4, 27);
      a1[0] = 8'($urandom);
      for (int i = 0; i < 3; i++) begin
        p1[i] = 4'(w[i]);
        e.prod[i] = int'(a1[0]) * w[i];
      end
      if (e.valid && e.err) n_err++;
      v1 = e.valid;
      hist[0] = e;
    end

    // Weight-activation packing unit: apply, wait 3 cycles, compare.
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      w[0] = $urandom_range(15, 0); w[1] = $urandom_range(15, 0);
      n_apx += approx_snippet(w, 2, 4, 4, 11);
      p3[0] = 4'(w[0]); p3[1] = 4'(w[1]);
      a3[0] = 4'($urandom); a3[1] = 4'($urandom);
      v3 = 1;
      @(negedge clk); v3 = 0;
      @(negedge clk); @(negedge clk);
      chk(ov3 && !err3, "n=2 valid");
      for (int j = 0; j < 2; j++)
        for (int i = 0; i < 2; i++)
          chk(int'(pr3[j][i]) == int'(a3[j]) * w[i], "n=2 product");
    end

    chk(n_apx > 100, "approximated snippets exercised");
    chk(n_err > 5, "unprepared snippets exercised");
    $display("approximated snippets %0d, unprepared snippets %0d", n_apx, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
