// dwa_post_o: simplified post-processing of one scalar product for the DSP
// unit without approximation (DSP-o).
//
// The slice field holds a[b^a-1:1] + a * s' (the slice multiplied a by s' and
// its post-adder added a >> 1).  Appending the dropped activation bit a[0]
// gives a + 2*a*s' = a * (1 + 2*s'), and shifting left by f gives a * w.
// f = b^w marks a zero weight and yields 0.  Purely combinational.
module dwa_post_o #(
  parameter int unsigned BA = dwa_pkg::BA,
  parameter int unsigned BW = dwa_pkg::BW,
  localparam int unsigned FW = $clog2(BW + 1)
) (
  input  logic [BA+BW-2:0] fld,
  input  logic             a0,
  input  logic [FW-1:0]    f,
  output logic [BA+BW-1:0] prod
);

  always_comb begin
    if (f >= FW'(BW)) prod = '0;
    else              prod = {fld, a0} << f;
  end

endmodule
