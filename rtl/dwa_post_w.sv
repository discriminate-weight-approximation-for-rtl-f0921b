// dwa_post_w: post-processing fused with the output reordering of a DSP unit
// with intra-DSP approximation (DSP-w).
//
// fld[j][k] is the product field of activation j and packing slot k taken from
// the DSP slice result.  Full-width slots already hold a_j * p; a reduced slot
// holds a_j * s and is shifted left by its f to give a_j * p = a_j * s * 2^f.
// Every product is then written back to the position of the weight it belongs
// to (slot_idx), restoring the original snippet order.  Purely combinational.
module dwa_post_w #(
  parameter int unsigned N  = dwa_pkg::N,
  parameter int unsigned M  = dwa_pkg::M,
  parameter int unsigned BA = dwa_pkg::BA,
  parameter int unsigned BW = dwa_pkg::BW,
  parameter int unsigned G  = 1,
  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned FW = $clog2(BW),
  localparam int unsigned OW = BA + BW
) (
  input  logic [OW-1:0] fld      [N][M],  // slot order
  input  logic [IW-1:0] slot_idx [M],
  input  logic [FW-1:0] f        [G],
  output logic [OW-1:0] prod     [N][M]   // original weight order
);

  always_comb begin
    logic [OW-1:0] v;
    for (int unsigned j = 0; j < N; j++)
      for (int unsigned k = 0; k < M; k++)
        prod[j][k] = '0;
    for (int unsigned j = 0; j < N; j++) begin
      for (int unsigned k = 0; k < M; k++) begin
        if (k >= M - G) v = {1'b0, fld[j][k][OW-2:0]} << f[k - (M - G)];
        else            v = fld[j][k];
        prod[j][slot_idx[k]] = v;
      end
    end
  end

endmodule
