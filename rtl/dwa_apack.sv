// dwa_apack: activation packing ("A-Pack").  Concatenates N activations into
// one binary code, activation 0 at the most significant end, with GA guard
// zeros between neighbours: <a_0, g, a_1, g, ..., a_{N-1}>.  GA is the width
// of the packed weight snippet, so each a_j * (packed weights) product gets a
// field of its own.  With N = 1 (weight-only packing) the output is the single
// activation.  Purely combinational, and only wiring: it places bits and
// inserts constant zeros, so in hardware it costs no logic.
module dwa_apack #(
  parameter int unsigned N  = dwa_pkg::N,
  parameter int unsigned BA = dwa_pkg::BA,
  parameter int unsigned GA = 12,
  localparam int unsigned OUT_W = dwa_pkg::apack_width(N, BA, GA)
) (
  input  logic [BA-1:0]    a [N],
  output logic [OUT_W-1:0] packed_a
);

  for (genvar j = 0; j < N; j++) begin : g_act
    localparam int unsigned OFF = (N - 1 - j) * (BA + GA);
    assign packed_a[OFF +: BA] = a[j];
    if (j > 0) begin : g_guard
      assign packed_a[OFF + BA +: GA] = '0;
    end
  end

endmodule
