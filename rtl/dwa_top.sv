// dwa_top: DSP array with discriminate weight approximation (DWA), top level.
//
// Each cycle the array takes one weight tile (R rows x C columns of b^w-bit
// weights), the routing signals stored with that tile, and the activation
// tile (one snippet of N activations per tile row), and produces the N x C
// dot products sum_r a_r * w_r,c.  The weight tile arrives already remapped
// (its rows sorted offline by number of snippet-level violations) and
// approximated offline in the rows built with intra-DSP approximation.  The
// activation-snippet routing network (benes_net) applies the same row order to
// the activation snippets on the fly: routed snippet k = act[perm[k]].
//
// When the configuration has no rows without approximation
// (N_EXACT_ROWS = 0) inter-DSP approximation is not used: the routing network
// is left out, act goes straight to the array and rout is ignored.
//
// Timing: fully pipelined, one tile per cycle; out_valid/dot/apx_err follow
// in_valid by 4 cycles.  The routing network is combinational.
module dwa_top #(
  parameter int unsigned R  = dwa_pkg::R,
  parameter int unsigned C  = dwa_pkg::C,
  parameter int unsigned N  = dwa_pkg::N,
  parameter int unsigned M  = dwa_pkg::M,
  parameter int unsigned BA = dwa_pkg::BA,
  parameter int unsigned BW = dwa_pkg::BW,
  parameter int unsigned DA = dwa_pkg::DA,
  parameter int unsigned DW = dwa_pkg::DW,
  parameter int unsigned PW = dwa_pkg::PW,
  parameter int unsigned N_EXACT_ROWS = dwa_pkg::N_EXACT_ROWS,
  localparam int unsigned NB = dwa_pkg::benes_bits(R),
  localparam int unsigned SW = BA + BW + $clog2(R + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [BA-1:0] act    [R][N],  // activation tile, original row order
  input  logic [BW-1:0] w_tile [R][C],  // remapped weight tile
  input  logic [NB-1:0] rout,           // routing signals of this weight tile
  output logic          out_valid,
  output logic [SW-1:0] dot    [N][C],
  output logic          apx_err
);

  logic [N*BA-1:0] snip_in  [R];
  logic [N*BA-1:0] snip_out [R];
  logic [BA-1:0]   a_routed [R][N];

  for (genvar r = 0; r < R; r++) begin : g_snip
    for (genvar j = 0; j < N; j++) begin : g_a
      assign snip_in[r][j*BA +: BA] = act[r][j];
      assign a_routed[r][j]         = snip_out[r][j*BA +: BA];
    end
  end

  if (N_EXACT_ROWS > 0) begin : g_route
    benes_net #(.NI(R), .DW(N * BA)) u_route (
      .din(snip_in), .cfg(rout), .dout(snip_out)
    );
  end else begin : g_noroute
    assign snip_out = snip_in;
  end

  dsp_array #(
    .R(R), .C(C), .N(N), .M(M), .BA(BA), .BW(BW), .DA(DA), .DW(DW), .PW(PW),
    .N_EXACT_ROWS(N_EXACT_ROWS)
  ) u_array (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a_routed), .w(w_tile),
    .out_valid(out_valid), .dot(dot), .err(apx_err)
  );

endmodule
