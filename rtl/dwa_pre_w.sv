// dwa_pre_w: input reordering fused with the pre-processing of a DSP unit with
// intra-DSP approximation (DSP-w).
//
// The offline approximation guarantees that every weight snippet fits the
// slice once G of its scalars are represented with one bit less.  A scalar p
// can be represented exactly with b^w - 1 bits as s = p >> f, where f is the
// number of trailing zeros of p (the greedy s = p / 2^f), whenever p is even.
// This block picks the first G even scalars of the snippet (lowest index
// first), sends them through pre-processing into the G reduced slots at the
// least significant end, and places the other scalars, in their original
// order, into the full-width slots.  slot_idx tells the output reordering
// where each slot came from.  For p = 0 it gives s = 0, f = 0.
//
// If fewer than G scalars are even the snippet was not prepared offline; the
// block then fills the remaining reduced slots with the lowest-index odd
// scalars (their top bit is lost) and raises err.  Purely combinational.
module dwa_pre_w #(
  parameter int unsigned M  = dwa_pkg::M,
  parameter int unsigned BW = dwa_pkg::BW,
  parameter int unsigned G  = 1,
  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned FW = $clog2(BW)
) (
  input  logic [BW-1:0] p        [M],  // (approximated) weight snippet
  output logic [BW-1:0] slot_w   [M],  // packing order; slots M-G.. hold s
  output logic [IW-1:0] slot_idx [M],  // original index of each slot
  output logic [FW-1:0] f        [G],  // shift of each reduced slot
  output logic          err
);

  if (G < 1 || G >= M) begin : g_bad
    $error("dwa_pre_w: G must be between 1 and M-1");
  end

  // Trailing-zero count, 0 for p = 0.
  function automatic logic [FW-1:0] tz(input logic [BW-1:0] v);
    logic [FW-1:0] n;
    logic          done;
    n = '0;
    done = (v == '0);
    for (int unsigned b = 0; b < BW; b++) begin
      if (!done && !v[b]) n = n + 1'b1;
      else done = 1'b1;
    end
    return n;
  endfunction

  always_comb begin
    logic [M-1:0]  sel;
    int unsigned   nsel, nf, nr;
    sel  = '0;
    nsel = 0;
    for (int unsigned i = 0; i < M; i++) begin
      if (!p[i][0] && nsel < G) begin
        sel[i] = 1'b1;
        nsel++;
      end
    end
    err = (nsel < G);
    for (int unsigned i = 0; i < M; i++) begin
      if (!sel[i] && nsel < G) begin
        sel[i] = 1'b1;
        nsel++;
      end
    end
    nf = 0;
    nr = 0;
    for (int unsigned k = 0; k < M; k++) begin
      slot_w[k]   = '0;
      slot_idx[k] = '0;
    end
    for (int unsigned g = 0; g < G; g++) f[g] = '0;
    for (int unsigned i = 0; i < M; i++) begin
      if (!sel[i]) begin
        slot_w[nf]   = p[i];
        slot_idx[nf] = IW'(i);
        nf++;
      end else begin
        f[nr]              = tz(p[i]);
        slot_w[M - G + nr] = p[i] >> tz(p[i]);
        slot_idx[M - G + nr] = IW'(i);
        nr++;
      end
    end
  end

endmodule
