// dsp_array: the DSP array of discriminate weight approximation.
//
// R DSP rows, each of U = ceil(C/M) DSP units; unit u of row r multiplies the
// routed activation snippet of row r by weights w[r][u*M .. u*M+M-1] of the
// weight tile (missing weights of a last, partial unit are zero).  The offline
// accuracy-guaranteed search fixes which rows compute with intra-DSP
// approximation and which without; here the first R - N_EXACT_ROWS rows are
// built from dsp_unit_w and the last N_EXACT_ROWS rows from dsp_unit_o (the
// offline remapping sorts rows by their number of snippet violations, so the
// rows needing exact computation gather at the end).
//
// The products are summed over the R rows for every column and activation:
// dot[j][c] = sum_r a[r][j] * w[r][c], the dot product of the activation tile
// and the weight tile.  Because a sum does not depend on the order of its
// terms, a row permutation applied to both the weight tile (offline) and the
// activation snippets (routing network) leaves the result unchanged.
//
// Timing: one tile per cycle; out_valid/dot/err follow in_valid by 4 cycles
// (3 in the DSP units, 1 for the registered column sums).  err is set when any
// DSP-w unit received a snippet that was not prepared offline.
module dsp_array #(
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
  localparam int unsigned SW = BA + BW + $clog2(R + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [BA-1:0] a   [R][N],  // routed activation snippet per DSP row
  input  logic [BW-1:0] w   [R][C],  // (remapped, approximated) weight tile
  output logic          out_valid,
  output logic [SW-1:0] dot [N][C],
  output logic          err
);

  localparam int unsigned U  = (C + M - 1) / M;
  localparam int unsigned OW = BA + BW;

  if (N_EXACT_ROWS > R) begin : g_bad
    $error("dsp_array: N_EXACT_ROWS exceeds R");
  end

  logic [OW-1:0] prod     [R][N][U*M];
  logic [R-1:0]  row_vld;
  logic [R-1:0]  row_err;

  for (genvar r = 0; r < R; r++) begin : g_row
    logic [U-1:0] u_vld;
    logic [U-1:0] u_err;

    for (genvar u = 0; u < U; u++) begin : g_unit
      logic [BW-1:0] wsn [M];
      logic [OW-1:0] up  [N][M];

      for (genvar i = 0; i < M; i++) begin : g_w
        if (u * M + i < C) begin : g_real
          assign wsn[i] = w[r][u*M+i];
        end else begin : g_pad
          assign wsn[i] = '0;
        end
        for (genvar j = 0; j < N; j++) begin : g_p
          assign prod[r][j][u*M+i] = up[j][i];
        end
      end

      if (r < R - N_EXACT_ROWS) begin : g_dspw
        dsp_unit_w #(.N(N), .M(M), .BA(BA), .BW(BW), .DA(DA), .DW(DW), .PW(PW)) u_dsp (
          .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a[r]), .p(wsn),
          .out_valid(u_vld[u]), .prod(up), .err(u_err[u])
        );
      end else begin : g_dspo
        dsp_unit_o #(.N(N), .M(M), .BA(BA), .BW(BW), .DA(DA), .DW(DW), .PW(PW)) u_dsp (
          .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a[r]), .w(wsn),
          .out_valid(u_vld[u]), .prod(up)
        );
        assign u_err[u] = 1'b0;
      end
    end

    assign row_vld[r] = u_vld[0];
    assign row_err[r] = |u_err;
  end

  // Column reduction over the DSP rows.
  logic [SW-1:0] dot_c [N][C];

  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      for (int unsigned c = 0; c < C; c++) begin
        dot_c[j][c] = '0;
        for (int unsigned r = 0; r < R; r++)
          dot_c[j][c] = dot_c[j][c] + SW'(prod[r][j][c]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      err       <= 1'b0;
      for (int unsigned j = 0; j < N; j++)
        for (int unsigned c = 0; c < C; c++) dot[j][c] <= '0;
    end else begin
      out_valid <= row_vld[0];
      err       <= |row_err;
      dot       <= dot_c;
    end
  end

endmodule
