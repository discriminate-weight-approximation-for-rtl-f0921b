// tb_dwa_pre_o: exhaustive check of the DSP-o pre-processing for 4-bit
// weights: for w != 0, s' < 8 and w = 2^f * (1 + 2*s'); for w = 0, f = 4.
module tb_dwa_pre_o;
  int checks = 0, failures = 0;
  logic [3:0] w;
  logic [2:0] s;
  logic [2:0] f;

  dwa_pre_o #(.BW(4)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      w = 4'(v);
      #1;
      checks++;
      if (v == 0) begin
        if (f != 3'd4) begin failures++; $display("FAIL zero f=%0d", f); end
      end else if (((1 + 2 * int'(s)) << f) != v) begin
        failures++;
        $display("FAIL w=%0d s=%0d f=%0d", v, s, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
