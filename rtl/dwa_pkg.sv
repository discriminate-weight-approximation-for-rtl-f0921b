// dwa_pkg: shared constants and elaboration-time helper functions of the
// discriminate-weight-approximation (DWA) DSP array.
//
// The default configuration is weight-only packing with 8-bit activations and
// 4-bit weights (WOP-A8W4): one activation (N = 1) times three weights (M = 3)
// per DSP48E2-class slice, whose weight port is 27 bits wide (D^w) and whose
// activation port is 18 bits wide (D^a), on a 128 x 128 array.  The numbers
// b^a, b^w, m, n, D^w = 27, R = C = 128 and the 40 rows computed without
// approximation (OPT-6.7B) are the published configuration; the 18-bit
// activation port and 48-bit result are properties of the DSP48E2 slice
// assumed here.
//
// Packing layout (used by the packers, the DSP units and their post-processing):
// a packed weight snippet holds M slots, slot 0 at the most significant end.
// The last NRED slots are "reduced" (WR bits wide), the others are WF bits
// wide, and GW guard zeros separate neighbouring slots.  A packed activation
// snippet holds N activations, activation 0 at the most significant end,
// separated by as many guard zeros as the packed weight snippet is wide, so
// that every product a_j * slot_k lands in its own field of the slice result.
package dwa_pkg;

  // Quantization and packing (WOP-A8W4).
  parameter int unsigned BA       = 8;    // activation bit width b^a
  parameter int unsigned BW       = 4;    // weight bit width b^w
  parameter int unsigned M        = 3;    // weights per DSP unit (m)
  parameter int unsigned N        = 1;    // activations per DSP unit (n)

  // DSP slice port widths.
  parameter int unsigned DW       = 27;   // weight port width D^w
  parameter int unsigned DA       = 18;   // activation port width D^a
  parameter int unsigned PW       = 48;   // result / addend width

  // DSP array.
  parameter int unsigned R        = 128;  // DSP rows (weight tile rows)
  parameter int unsigned C        = 128;  // weight tile columns
  parameter int unsigned N_EXACT_ROWS = 40; // rows built as DSP-o

  // Number of reduced slots a DSP-w unit needs: max(G) = m*b^w + (m-1)*b^a - D^w,
  // at least 1.
  function automatic int unsigned max_g(int unsigned m, int unsigned bw,
                                        int unsigned ba, int unsigned dw);
    int signed g;
    g = int'(m * bw + (m - 1) * ba) - int'(dw);
    return (g < 1) ? 1 : int'(g);
  endfunction

  // Width of slot k of a packed weight snippet.
  function automatic int unsigned slot_width(int unsigned k, int unsigned m,
                                             int unsigned nred, int unsigned wf,
                                             int unsigned wr);
    return (k >= m - nred) ? wr : wf;
  endfunction

  // Bit offset (from the LSB) of slot k of a packed weight snippet.
  function automatic int unsigned slot_off(int unsigned k, int unsigned m,
                                           int unsigned nred, int unsigned wf,
                                           int unsigned wr, int unsigned gw);
    int unsigned off;
    off = 0;
    for (int unsigned i = k + 1; i < m; i++)
      off += slot_width(i, m, nred, wf, wr) + gw;
    return off;
  endfunction

  // Width of a packed weight snippet.
  function automatic int unsigned wpack_width(int unsigned m, int unsigned nred,
                                              int unsigned wf, int unsigned wr,
                                              int unsigned gw);
    return slot_off(0, m, nred, wf, wr, gw) + slot_width(0, m, nred, wf, wr);
  endfunction

  // Width of a packed activation snippet of n activations.
  function automatic int unsigned apack_width(int unsigned n, int unsigned ba,
                                              int unsigned ga);
    return n * ba + (n - 1) * ga;
  endfunction

  // Number of 2x2 switches (= routing bits) of an n-input Benes network:
  // n*log2(n) - n/2.
  function automatic int unsigned benes_bits(int unsigned n);
    return (n < 2) ? 1 : n * $clog2(n) - n / 2;
  endfunction

endpackage
