// dwa_wpack: weight packing ("W-Pack").  Concatenates M weight slots into one
// binary code with GW guard zeros between neighbours, slot 0 at the most
// significant end: <w_0, g, w_1, g, ..., w_{M-1}>.
//
// The last NRED slots are reduced to WR bits (they carry the shifted scalar s
// of a pre-processed weight); the others keep WF bits.  Bits of a slot above
// its width are dropped.  With NRED = 0 this is the plain packing without
// approximation.  Purely combinational, and only wiring: it places bits and
// inserts constant zeros, so in hardware it costs no logic.
module dwa_wpack #(
  parameter int unsigned M     = dwa_pkg::M,
  parameter int unsigned WF    = dwa_pkg::BW,
  parameter int unsigned NRED  = 1,
  parameter int unsigned WR    = dwa_pkg::BW - 1,
  parameter int unsigned GW    = dwa_pkg::BA,
  localparam int unsigned OUT_W = dwa_pkg::wpack_width(M, NRED, WF, WR, GW)
) (
  input  logic [WF-1:0]    w [M],      // slots, slot 0 packed at the MSB end
  output logic [OUT_W-1:0] packed_w
);

  for (genvar k = 0; k < M; k++) begin : g_slot
    localparam int unsigned SW  = dwa_pkg::slot_width(k, M, NRED, WF, WR);
    localparam int unsigned OFF = dwa_pkg::slot_off(k, M, NRED, WF, WR, GW);
    assign packed_w[OFF +: SW] = w[k][SW-1:0];
    if (k < M - 1) begin : g_guard
      assign packed_w[OFF - GW +: GW] = '0;
    end
  end

endmodule
