// dsp_unit_o: DSP unit without approximation (DSP-o), with the simplified
// pre- and post-processing of discriminate weight approximation.
//
// Every weight goes through its own pre-processing (dwa_pre_o): w = 2^f *
// (1 + 2*s') with s' of b^w - 1 bits, so M weights pack into
// m*(b^w-1) + (m-1)*b^a bits and fit the slice's weight port without changing
// any weight.  The slice multiplies the packed activations by the packed s'
// and its post-adder adds a_j >> 1 into every product field, giving
// a_j[b^a-1:1] + a_j*s'_i per field.  Post-processing (dwa_post_o) appends
// a_j[0] and shifts by f, which yields the exact product a_j * w_i.
//
// Interface: in_valid/a/w are sampled every cycle; out_valid/prod appear 3
// cycles later (2 in the slice, 1 output register, as in dsp_unit_w).
// prod[j][i] = a_j * w_i.
module dsp_unit_o #(
  parameter int unsigned N  = dwa_pkg::N,
  parameter int unsigned M  = dwa_pkg::M,
  parameter int unsigned BA = dwa_pkg::BA,
  parameter int unsigned BW = dwa_pkg::BW,
  parameter int unsigned DA = dwa_pkg::DA,
  parameter int unsigned DW = dwa_pkg::DW,
  parameter int unsigned PW = dwa_pkg::PW,
  localparam int unsigned OW = BA + BW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [BA-1:0] a    [N],
  input  logic [BW-1:0] w    [M],
  output logic          out_valid,
  output logic [OW-1:0] prod [N][M]
);

  localparam int unsigned FW  = $clog2(BW + 1);
  localparam int unsigned SW  = BW - 1;         // width of s'
  localparam int unsigned WPW = dwa_pkg::wpack_width(M, 0, SW, SW, BA);
  localparam int unsigned APW = dwa_pkg::apack_width(N, BA, WPW);
  localparam int unsigned LAT = 2;              // dsp_slice latency

  if (WPW > DW) begin : g_chk_w
    $error("dsp_unit_o: packed weight snippet exceeds the slice weight port");
  end
  if (APW > DA) begin : g_chk_a
    $error("dsp_unit_o: packed activation snippet exceeds the slice activation port");
  end
  if (APW + WPW > PW) begin : g_chk_p
    $error("dsp_unit_o: packed product exceeds the slice result");
  end

  // Pre-processing, one per weight scalar.
  logic [SW-1:0] s [M];
  logic [FW-1:0] f [M];

  for (genvar i = 0; i < M; i++) begin : g_pre
    dwa_pre_o #(.BW(BW)) u_pre (.w(w[i]), .s(s[i]), .f(f[i]));
  end

  // Packing, and the post-adder term: a_j >> 1 in every product field.
  logic [WPW-1:0] wpk;
  logic [APW-1:0] apk;
  logic [PW-1:0]  cadd;

  dwa_wpack #(.M(M), .WF(SW), .NRED(0), .WR(SW), .GW(BA)) u_wpack (
    .w(s), .packed_w(wpk)
  );
  dwa_apack #(.N(N), .BA(BA), .GA(WPW)) u_apack (
    .a(a), .packed_a(apk)
  );

  always_comb begin
    cadd = '0;
    for (int unsigned j = 0; j < N; j++)
      for (int unsigned k = 0; k < M; k++)
        cadd = cadd | (PW'(a[j] >> 1)
                       << ((N - 1 - j) * (BA + WPW)
                           + dwa_pkg::slot_off(k, M, 0, SW, SW, BA)));
  end

  // DSP slice.
  logic [PW-1:0] pres;

  dsp_slice #(.A_WIDTH(DW), .B_WIDTH(DA), .P_WIDTH(PW)) u_slice (
    .clk(clk), .rst_n(rst_n), .a(DW'(wpk)), .b(DA'(apk)), .c(cadd), .p(pres)
  );

  // Side information: valid, shifts and activation LSBs.
  logic [LAT-1:0] vld_d;
  logic [FW-1:0]  f_d  [LAT][M];
  logic [N-1:0]   a0_d [LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld_d <= '0;
      for (int unsigned st = 0; st < LAT; st++) begin
        a0_d[st] <= '0;
        for (int unsigned k = 0; k < M; k++) f_d[st][k] <= '0;
      end
    end else begin
      vld_d[0] <= in_valid;
      f_d[0]   <= f;
      for (int unsigned j = 0; j < N; j++) a0_d[0][j] <= a[j][0];
      for (int unsigned st = 1; st < LAT; st++) begin
        vld_d[st] <= vld_d[st-1];
        f_d[st]   <= f_d[st-1];
        a0_d[st]  <= a0_d[st-1];
      end
    end
  end

  // Field extraction and post-processing, one per product.
  logic [OW-1:0] prod_c [N][M];

  for (genvar j = 0; j < N; j++) begin : g_pj
    for (genvar k = 0; k < M; k++) begin : g_pk
      localparam int unsigned OFF = (N - 1 - j) * (BA + WPW)
                                    + dwa_pkg::slot_off(k, M, 0, SW, SW, BA);
      dwa_post_o #(.BA(BA), .BW(BW)) u_post (
        .fld (pres[OFF +: BA + SW]),
        .a0  (a0_d[LAT-1][j]),
        .f   (f_d[LAT-1][k]),
        .prod(prod_c[j][k])
      );
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int unsigned j = 0; j < N; j++)
        for (int unsigned k = 0; k < M; k++) prod[j][k] <= '0;
    end else begin
      out_valid <= vld_d[LAT-1];
      prod      <= prod_c;
    end
  end

endmodule
