// dsp_slice: model of the vendor DSP slice (DSP48E2 class) as the DSP units
// use it: an unsigned multiply-add P = A * B + C.
//
// The DSP units put the packed weight snippet on the wide A port (D^w bits),
// the packed activation snippet on the B port (D^a bits) and, in the unit
// without approximation, a packed correction term on the C port.  All operands
// are treated as unsigned integers, as in the packing formulation.
//
// Timing: the A, B and C inputs are registered, then the result is registered,
// so P follows its operands by 2 clock cycles (a choice of this model; the
// real slice has configurable pipeline registers).  Synchronous active-low
// reset clears all registers.
module dsp_slice #(
  parameter int unsigned A_WIDTH = dwa_pkg::DW,
  parameter int unsigned B_WIDTH = dwa_pkg::DA,
  parameter int unsigned P_WIDTH = dwa_pkg::PW
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [A_WIDTH-1:0] a,
  input  logic [B_WIDTH-1:0] b,
  input  logic [P_WIDTH-1:0] c,
  output logic [P_WIDTH-1:0] p
);

  logic [A_WIDTH-1:0] a_q;
  logic [B_WIDTH-1:0] b_q;
  logic [P_WIDTH-1:0] c_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      c_q <= '0;
      p   <= '0;
    end else begin
      a_q <= a;
      b_q <= b;
      c_q <= c;
      p   <= P_WIDTH'(P_WIDTH'(a_q) * P_WIDTH'(b_q)) + c_q;
    end
  end

endmodule
