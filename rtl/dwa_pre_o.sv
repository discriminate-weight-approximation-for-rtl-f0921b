// dwa_pre_o: simplified pre-processing of one weight scalar for the DSP unit
// without approximation (DSP-o).
//
// Any non-zero weight is w = 2^f * (1 + 2*s'): f is its number of trailing
// zeros (chosen greedily) and s' = ((w >> f) - 1) / 2 needs only b^w - 1
// bits, so the slice sees a narrower weight while the product stays exact.
// The weight 0 is coded as f = b^w (outside the range of a trailing-zero count
// of a non-zero weight) with s' = 0; the post-processing turns it into a zero
// product.  Purely combinational.
module dwa_pre_o #(
  parameter int unsigned BW = dwa_pkg::BW,
  localparam int unsigned FW = $clog2(BW + 1)
) (
  input  logic [BW-1:0] w,
  output logic [BW-2:0] s,
  output logic [FW-1:0] f
);

  always_comb begin
    logic [BW-1:0] odd;
    logic          done;
    f    = '0;
    done = 1'b0;
    for (int unsigned b = 0; b < BW; b++) begin
      if (!done && !w[b]) f = f + 1'b1;
      else done = 1'b1;
    end
    odd = w >> f;
    s   = (w == '0) ? '0 : (BW-1)'((odd - 1'b1) >> 1);
  end

endmodule
