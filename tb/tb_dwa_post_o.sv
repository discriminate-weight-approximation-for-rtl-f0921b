// tb_dwa_post_o: exhaustive check of the DSP-o post-processing for 8-bit
// activations and 4-bit weights.  The testbench forms the slice field
// (a >> 1) + a*s' itself from w = 2^f (1 + 2 s') and expects a * w.
module tb_dwa_post_o;
  int checks = 0, failures = 0;
  logic [10:0] fld;
  logic        a0;
  logic [2:0]  f;
  logic [11:0] prod;

  dwa_post_o #(.BA(8), .BW(4)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ff, ss;
    for (int w = 0; w < 16; w++) begin
      ff = 0;
      if (w == 0) ff = 4;
      else while (((w >> ff) & 1) == 0) ff++;
      ss = (w == 0) ? 0 : ((w >> ff) - 1) / 2;
      for (int a = 0; a < 256; a++) begin
        fld = 11'((a >> 1) + a * ss);
        a0  = a[0];
        f   = 3'(ff);
        #1;
        checks++;
        if (int'(prod) != a * w) begin
          failures++;
          $display("FAIL a=%0d w=%0d got=%0d", a, w, prod);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
