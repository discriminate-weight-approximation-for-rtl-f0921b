// tb_dsp_slice: random operands through the DSP slice model; checks
// P = A*B + C with the 2-cycle latency, against a reference computed in the
// testbench from a history of the applied operands.
module tb_dsp_slice;
  localparam int unsigned AW = 27, BWD = 18, PWD = 48, LAT = 2;
  logic clk = 0, rst_n = 0;
  logic [AW-1:0] a;
  logic [BWD-1:0] b;
  logic [PWD-1:0] c, p;
  logic [PWD-1:0] exp_q [$];
  int checks = 0, failures = 0, cyc = 0;

  dsp_slice #(.A_WIDTH(AW), .B_WIDTH(BWD), .P_WIDTH(PWD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; c = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 400 + LAT; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        checks++;
        if (p !== exp_q[0]) begin
          failures++;
          $display("FAIL t=%0d p=%h exp=%h", t, p, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
      a = {$urandom, $urandom} & ((1 << AW) - 1);
      b = $urandom & ((1 << BWD) - 1);
      c = ({$urandom, $urandom} & ((64'd1 << 40) - 1));
      if (t % 7 == 0) begin a = '1; b = '1; end
      exp_q.push_back(PWD'(64'(a) * 64'(b)) + c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
