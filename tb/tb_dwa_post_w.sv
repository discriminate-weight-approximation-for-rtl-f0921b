// tb_dwa_post_w: DSP-w post-processing + output reordering.  Random product
// fields, slot orders and shifts; expected: full slots copied, the reduced
// slot shifted left by f, each placed at its original index.  Also the
// example of a 4-bit activation 2 and weights {10, 15, 3} with weight 0
// approximated: fields {30, 6, 10}, f = 1 -> products {20, 30, 6}.
module tb_dwa_post_w;
  int checks = 0, failures = 0;

  logic [11:0] fld  [1][3];
  logic [1:0]  slot_idx [3];
  logic [1:0]  f [1];
  logic [11:0] prod [1][3];

  dwa_post_w #(.N(1), .M(3), .BA(8), .BW(4), .G(1)) dut (.*);

  logic [7:0] fld4 [1][3];
  logic [7:0] prod4 [1][3];
  logic [1:0] idx4 [3];
  logic [1:0] f4 [1];
  dwa_post_w #(.N(1), .M(3), .BA(4), .BW(4), .G(1)) dut4 (
    .fld(fld4), .slot_idx(idx4), .f(f4), .prod(prod4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [3];
    int e [3];
    fld4[0][0] = 8'd30; fld4[0][1] = 8'd6; fld4[0][2] = 8'd10;
    idx4[0] = 2'd1; idx4[1] = 2'd2; idx4[2] = 2'd0; f4[0] = 2'd1;
    #1;
    checks++;
    if (prod4[0][0] != 20 || prod4[0][1] != 30 || prod4[0][2] != 6) begin
      failures++;
      $display("FAIL example got %0d %0d %0d", prod4[0][0], prod4[0][1], prod4[0][2]);
    end
    for (int t = 0; t < 500; t++) begin
      order[2] = $urandom_range(2, 0);
      order[0] = (order[2] == 0) ? 1 : 0;
      order[1] = (order[2] == 2) ? 1 : 2;
      for (int k = 0; k < 3; k++) begin
        slot_idx[k] = 2'(order[k]);
        fld[0][k]   = (k == 2) ? 12'($urandom_range(2047, 0)) : 12'($urandom);
      end
      f[0] = 2'($urandom);
      #1;
      e[order[0]] = fld[0][0];
      e[order[1]] = fld[0][1];
      e[order[2]] = (fld[0][2] << f[0]) & 12'hfff;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (int'(prod[0][i]) != e[i]) begin
          failures++;
          $display("FAIL t=%0d i=%0d got=%0d exp=%0d", t, i, prod[0][i], e[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
