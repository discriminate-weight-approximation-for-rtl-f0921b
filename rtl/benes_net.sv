// benes_net: activation-snippet routing network, an NI-input Benes network of
// 2x2 switches (rearrangeable non-blocking).
//
// dout[k] = din[perm[k]] for any permutation perm, given the matching switch
// settings in cfg.  Offline remapping sorts the rows of each weight tile, so
// the activation snippets must be sorted the same way on the fly; cfg carries
// the routing signals stored with that weight tile.
//
// Structure (recursive definition, built here as flat stages): for NI > 2, a
// column of NI/2 input switches, an upper and a lower Benes network of NI/2
// inputs, a column of NI/2 output switches.  Input switch i takes din[2i],
// din[2i+1] and, when its bit is 0, sends din[2i] to the upper and din[2i+1]
// to the lower sub-network (crossed when 1).  Output switch j takes output j of
// both sub-networks and, when its bit is 0, drives dout[2j] from the upper and
// dout[2j+1] from the lower one (crossed when 1).  NI = 2 is one switch.
// cfg layout, recursively: [NI/2 input-switch bits][upper sub-network]
// [lower sub-network][NI/2 output-switch bits], first field at bit 0; in all
// NI*log2(NI) - NI/2 bits, 2*log2(NI) - 1 switch stages.  Purely
// combinational; NI must be a power of two.
module benes_net #(
  parameter int unsigned NI = dwa_pkg::R,   // number of snippets
  parameter int unsigned DW = dwa_pkg::BA,  // bits per snippet
  localparam int unsigned NB = dwa_pkg::benes_bits(NI)
) (
  input  logic [DW-1:0] din  [NI],
  input  logic [NB-1:0] cfg,
  output logic [DW-1:0] dout [NI]
);

  localparam int unsigned L = $clog2(NI);   // recursion depths 0 .. L-1

  if (NI < 2 || (1 << L) != NI) begin : g_bad
    $error("benes_net: NI must be a power of two, at least 2");
  end

  // Offset in cfg of the bits of sub-network b at depth d (size NI >> d).
  function automatic int unsigned boff(int unsigned d, int unsigned b);
    int unsigned off, s;
    off = 0;
    s   = NI;
    for (int unsigned k = 0; k < d; k++) begin
      // bit (d-1-k) of b selects lower (1) or upper (0) at level k
      if (((b >> (d - 1 - k)) & 1) != 0) off += s / 2 + dwa_pkg::benes_bits(s / 2);
      else                              off += s / 2;
      s = s / 2;
    end
    return off;
  endfunction

  // In the block of depth d, fwd holds the signals entering the sub-networks
  // of that depth and bwd the signals leaving them; sub-network b occupies
  // positions b*S .. b*S+S-1 (S = NI >> d).
  for (genvar d = 0; d < L; d++) begin : g_depth
    localparam int unsigned S = NI >> d;
    logic [DW-1:0] fwd [NI];
    logic [DW-1:0] bwd [NI];

    if (d == 0) begin : g_first
      assign fwd  = din;
      assign dout = bwd;
    end

    for (genvar b = 0; b < (1 << d); b++) begin : g_sub
      localparam int unsigned OFF  = boff(d, b);
      localparam int unsigned BASE = b * S;
      if (S == 2) begin : g_leaf
        assign bwd[BASE]   = cfg[OFF] ? fwd[BASE+1] : fwd[BASE];
        assign bwd[BASE+1] = cfg[OFF] ? fwd[BASE]   : fwd[BASE+1];
      end else begin : g_mid
        localparam int unsigned H  = S / 2;
        localparam int unsigned CO = OFF + H + 2 * dwa_pkg::benes_bits(H);
        for (genvar i = 0; i < H; i++) begin : g_sw
          // input switch i feeds the next depth
          assign g_depth[d+1].fwd[BASE+i]   = cfg[OFF+i] ? fwd[BASE+2*i+1] : fwd[BASE+2*i];
          assign g_depth[d+1].fwd[BASE+H+i] = cfg[OFF+i] ? fwd[BASE+2*i]   : fwd[BASE+2*i+1];
          // output switch i collects the next depth
          assign bwd[BASE+2*i]   = cfg[CO+i] ? g_depth[d+1].bwd[BASE+H+i] : g_depth[d+1].bwd[BASE+i];
          assign bwd[BASE+2*i+1] = cfg[CO+i] ? g_depth[d+1].bwd[BASE+i]   : g_depth[d+1].bwd[BASE+H+i];
        end
      end
    end
  end

endmodule
