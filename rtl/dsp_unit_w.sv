// dsp_unit_w: DSP unit with intra-DSP approximation (DSP-w).
//
// Computes the N x M scalar products a_j * p_i of an activation snippet and a
// weight snippet with one DSP slice.  Plain packing of M b^w-bit weights with
// b^a guard bits needs m*b^w + (m-1)*b^a bits, one or more bits more than the
// slice's weight port; the offline approximation has made sure that G scalars
// of every snippet are even, so they fit into b^w - 1 bits after a right
// shift.  Datapath: input reordering + pre-processing (dwa_pre_w) -> weight
// packing (dwa_wpack) and activation packing (dwa_apack) -> DSP slice ->
// field extraction -> post-processing + output reordering (dwa_post_w).  Only
// G pre/post pairs exist (G = 1 for WOP-A8W4), instead of one per scalar.
//
// Interface: in_valid/a/p are sampled every cycle; out_valid/prod/err appear
// 3 cycles later (2 in the slice, 1 output register).  prod[j][i] = a_j * p_i
// for snippets prepared offline; err flags a snippet with fewer than G even
// scalars, whose products are then not exact.  The slice latency and the
// output register are choices of this design.
module dsp_unit_w #(
  parameter int unsigned N  = dwa_pkg::N,
  parameter int unsigned M  = dwa_pkg::M,
  parameter int unsigned BA = dwa_pkg::BA,
  parameter int unsigned BW = dwa_pkg::BW,
  parameter int unsigned DA = dwa_pkg::DA,
  parameter int unsigned DW = dwa_pkg::DW,
  parameter int unsigned PW = dwa_pkg::PW,
  parameter int unsigned G  = dwa_pkg::max_g(M, BW, BA, DW),
  localparam int unsigned OW = BA + BW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [BA-1:0] a    [N],
  input  logic [BW-1:0] p    [M],
  output logic          out_valid,
  output logic [OW-1:0] prod [N][M],
  output logic          err
);

  localparam int unsigned IW  = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned FW  = $clog2(BW);
  localparam int unsigned WPW = dwa_pkg::wpack_width(M, G, BW, BW - 1, BA);
  localparam int unsigned APW = dwa_pkg::apack_width(N, BA, WPW);
  localparam int unsigned LAT = 2;  // dsp_slice latency

  if (WPW > DW) begin : g_chk_w
    $error("dsp_unit_w: packed weight snippet exceeds the slice weight port");
  end
  if (APW > DA) begin : g_chk_a
    $error("dsp_unit_w: packed activation snippet exceeds the slice activation port");
  end
  if (APW + WPW > PW) begin : g_chk_p
    $error("dsp_unit_w: packed product exceeds the slice result");
  end

  // Input reordering and pre-processing.
  logic [BW-1:0]  slot_w   [M];
  logic [IW-1:0]  slot_idx [M];
  logic [FW-1:0]  f        [G];
  logic           pre_err;

  dwa_pre_w #(.M(M), .BW(BW), .G(G)) u_pre (
    .p(p), .slot_w(slot_w), .slot_idx(slot_idx), .f(f), .err(pre_err)
  );

  // Packing.
  logic [WPW-1:0] wpk;
  logic [APW-1:0] apk;

  dwa_wpack #(.M(M), .WF(BW), .NRED(G), .WR(BW - 1), .GW(BA)) u_wpack (
    .w(slot_w), .packed_w(wpk)
  );
  dwa_apack #(.N(N), .BA(BA), .GA(WPW)) u_apack (
    .a(a), .packed_a(apk)
  );

  // DSP slice.
  logic [PW-1:0] pres;

  dsp_slice #(.A_WIDTH(DW), .B_WIDTH(DA), .P_WIDTH(PW)) u_slice (
    .clk(clk), .rst_n(rst_n), .a(DW'(wpk)), .b(DA'(apk)), .c('0), .p(pres)
  );

  // Side information travels alongside the slice pipeline.
  logic [LAT-1:0] vld_d;
  logic [LAT-1:0] err_d;
  logic [IW-1:0]  idx_d [LAT][M];
  logic [FW-1:0]  f_d   [LAT][G];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld_d <= '0;
      err_d <= '0;
      for (int unsigned s = 0; s < LAT; s++) begin
        for (int unsigned k = 0; k < M; k++) idx_d[s][k] <= '0;
        for (int unsigned g = 0; g < G; g++) f_d[s][g] <= '0;
      end
    end else begin
      vld_d[0]  <= in_valid;
      err_d[0]  <= in_valid & pre_err;
      idx_d[0]  <= slot_idx;
      f_d[0]    <= f;
      for (int unsigned s = 1; s < LAT; s++) begin
        vld_d[s] <= vld_d[s-1];
        err_d[s] <= err_d[s-1];
        idx_d[s] <= idx_d[s-1];
        f_d[s]   <= f_d[s-1];
      end
    end
  end

  // Field extraction: product of activation j and slot k.
  logic [OW-1:0] fld [N][M];

  for (genvar j = 0; j < N; j++) begin : g_fj
    for (genvar k = 0; k < M; k++) begin : g_fk
      localparam int unsigned FWID = BA + dwa_pkg::slot_width(k, M, G, BW, BW - 1);
      localparam int unsigned OFF  = (N - 1 - j) * (BA + WPW)
                                     + dwa_pkg::slot_off(k, M, G, BW, BW - 1, BA);
      assign fld[j][k] = OW'(pres[OFF +: FWID]);
    end
  end

  // Post-processing and output reordering.
  logic [OW-1:0] prod_c [N][M];

  dwa_post_w #(.N(N), .M(M), .BA(BA), .BW(BW), .G(G)) u_post (
    .fld(fld), .slot_idx(idx_d[LAT-1]), .f(f_d[LAT-1]), .prod(prod_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      err       <= 1'b0;
      for (int unsigned j = 0; j < N; j++)
        for (int unsigned k = 0; k < M; k++) prod[j][k] <= '0;
    end else begin
      out_valid <= vld_d[LAT-1];
      err       <= err_d[LAT-1];
      prod      <= prod_c;
    end
  end

  // err only ever accompanies a result.
  a_err_with_valid: assert property (@(posedge clk) disable iff (!rst_n) err |-> out_valid)
    else $error("dsp_unit_w: err without out_valid");

endmodule
