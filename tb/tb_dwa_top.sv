// tb_dwa_top: end-to-end test of the DWA array at 8 rows x 12 columns with 3 rows
// without approximation, plus a second array of the same size configured with
// no exact rows, where the routing network is left out.
//
// For every tile the testbench plays the offline flow of discriminate weight
// approximation, then checks the hardware against a plain dot product:
//  1. draws an activation tile and an original weight tile (rows drawn with
//     different densities of odd weights so their violation counts differ);
//  2. counts snippet-level violations per row and sorts the rows by that
//     count, ascending (stable) -> permutation perm, remapped tile E;
//  3. approximates the snippets of the rows built with approximation (the
//     first R - N_EXACT_ROWS remapped rows); exact rows keep their weights;
//  4. computes the routing-network settings for perm.
// Expected dot[c] = sum_k act[perm[k]] * E[k][c], at the top's 4-cycle latency.
// Mechanisms counted (each must occur): approximated snippets, violating
// snippets computed exactly in DSP-o rows, zero weights in DSP-o rows,
// non-identity routing, result equal to the unapproximated dot product
// although violating snippets were present, unprepared snippets flagged by
// apx_err, and tiles through the
// configuration without routing network (its tiles skip the remapping).
module tb_dwa_top;
  import dwa_tb_pkg::*;
  localparam int R = 8, C = 12, NE = 3, M = dwa_pkg::M, U = (C + M - 1) / M;
  localparam int BA = dwa_pkg::BA, BW = dwa_pkg::BW, DW = dwa_pkg::DW, LAT = 4;
  localparam int NB = dwa_pkg::benes_bits(R), SW = BA + BW + $clog2(R + 1);
  localparam int TILES = 300;
  int checks = 0, failures = 0;
  int n_apx = 0, n_exact_viol = 0, n_zero_o = 0, n_perm = 0, n_same = 0, n_err = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid, out_valid, apx_err;
  logic [BA-1:0] act    [R][1];
  logic [BW-1:0] w_tile [R][C];
  logic [NB-1:0] rout;
  logic [SW-1:0] dot    [1][C];

  dwa_top #(.R(R), .C(C), .N_EXACT_ROWS(NE)) dut (.*);

  // Configuration without exact rows: no routing network, rout ignored.
  logic          in_valid0, out_valid0, apx_err0;
  logic [SW-1:0] dot0 [1][C];
  int            n_noroute = 0;
  dwa_top #(.R(R), .C(C), .N_EXACT_ROWS(0)) dut0 (
    .clk, .rst_n, .in_valid(in_valid0), .act, .w_tile, .rout,
    .out_valid(out_valid0), .dot(dot0), .apx_err(apx_err0));

  typedef struct {
    bit valid;
    bit err;
    int dot [C];
  } exp_t;
  exp_t hist [LAT];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One tile through the offline flow.  Fills act/w_tile/rout and the expected
  // result of the top with NE exact rows.
  task automatic make_tile(input int t, input int ne, input bit inject, output exp_t e);
    int W [R][C];
    int E [R][C];
    int cnt [R];
    int sn [16];
    int exact [C];
    int k, tmp, viol;
    perm_t p;
    bit [4095:0] bits;
    e.err = 0;
    viol = 0;
    for (int r = 0; r < R; r++) begin
      int dens;
      dens = $urandom_range(10, 0);
      act[r][0] = BA'($urandom);
      for (int c = 0; c < C; c++)
        W[r][c] = ($urandom_range(9, 0) < dens) ? 2 * $urandom_range(7, 0) + 1 : $urandom_range(15, 0);
    end
    // violation count per row, stable ascending sort
    for (int r = 0; r < R; r++) begin
      cnt[r] = 0;
      for (int u = 0; u < U; u++) begin
        for (int i = 0; i < 16; i++) sn[i] = 0;
        for (int i = 0; i < M; i++) if (u * M + i < C) sn[i] = W[r][u*M+i];
        if (snippet_violates(sn, M, BA, BW, DW)) cnt[r]++;
      end
      viol += cnt[r];
      p[r] = r;
    end
    // without exact rows there is no remapping (and no routing network)
    for (int x = 1; x < R && ne > 0; x++) begin
      k = x;
      while (k > 0 && cnt[p[k-1]] > cnt[p[k]]) begin
        tmp = p[k]; p[k] = p[k-1]; p[k-1] = tmp;
        k--;
      end
    end
    for (int x = 0; x < R; x++) if (p[x] != x) begin n_perm++; break; end
    // remap and approximate
    for (int x = 0; x < R; x++) begin
      for (int u = 0; u < U; u++) begin
        for (int i = 0; i < 16; i++) sn[i] = 0;
        for (int i = 0; i < M; i++) if (u * M + i < C) sn[i] = W[p[x]][u*M+i];
        if (x < R - ne) begin
          if (inject && x == 0 && u == 0) begin
            for (int i = 0; i < M; i++) sn[i] = 2 * $urandom_range(7, 0) + 1;
            e.err = 1;
          end else n_apx += approx_snippet(sn, M, BA, BW, DW);
        end else begin
          if (snippet_violates(sn, M, BA, BW, DW)) n_exact_viol++;
          for (int i = 0; i < M; i++) if (u * M + i < C && sn[i] == 0) n_zero_o++;
        end
        for (int i = 0; i < M; i++) if (u * M + i < C) E[x][u*M+i] = sn[i];
      end
    end
    for (int x = 0; x < R; x++)
      for (int c = 0; c < C; c++) w_tile[x][c] = BW'(E[x][c]);
    bits = benes_route(R, p);
    rout = (ne > 0) ? bits[NB-1:0] : NB'({$urandom, $urandom});
    for (int c = 0; c < C; c++) begin
      e.dot[c] = 0;
      exact[c] = 0;
      for (int x = 0; x < R; x++) begin
        e.dot[c] += int'(act[p[x]][0]) * E[x][c];
        exact[c] += int'(act[p[x]][0]) * W[p[x]][c];
      end
    end
    if (ne > 0 && viol > 0 && e.dot == exact) n_same++;
  endtask

  task automatic run(input int ne, input int tiles);
    exp_t e;
    for (int s = 0; s < LAT; s++) hist[s].valid = 0;
    for (int t = 0; t < tiles + LAT; t++) begin
      @(negedge clk);
      if (hist[LAT-1].valid) begin
        if (ne == NE) begin
          chk(out_valid, "valid after 4 cycles");
          chk(apx_err == hist[LAT-1].err, "apx_err");
          if (!hist[LAT-1].err) for (int c = 0; c < C; c++) chk(int'(dot[0][c]) == hist[LAT-1].dot[c], "dot product");
        end
        if (ne == 0) begin
          chk(out_valid0, "no-routing valid after 4 cycles");
          chk(apx_err0 == hist[LAT-1].err, "no-routing apx_err");
          if (!hist[LAT-1].err) for (int c = 0; c < C; c++) chk(int'(dot0[0][c]) == hist[LAT-1].dot[c], "no-routing dot product");
          n_noroute++;
        end
      end else begin
        if (ne == NE) chk(!out_valid, "no spurious valid");
        if (ne == 0) chk(!out_valid0, "no-routing spurious valid");
      end
      for (int s = LAT - 1; s > 0; s--) hist[s] = hist[s-1];
      e.valid = 0;
      e.err = 0;
      if (t < tiles) begin
        make_tile(t, ne, (t % 5 == 2) && (t > 0), e);
        e.valid = (t % 4 != 3) || (tiles < 8);
        if (e.valid && e.err) n_err++;
      end
      if (ne == NE) in_valid = e.valid;
      if (ne == 0) in_valid0 = e.valid;
      hist[0] = e;
    end
    if (ne == NE) in_valid = 0;
    if (ne == 0) in_valid0 = 0;
  endtask

  initial begin
    in_valid = 0;
    in_valid0 = 0;
    rout = '0;
    for (int r = 0; r < R; r++) begin
      act[r][0] = '0;
      for (int c = 0; c < C; c++) w_tile[r][c] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(NE, TILES);
    run(0, 100);
    chk(n_apx > 0, "intra-DSP approximation exercised");
    chk(n_exact_viol > 0, "violating snippets in DSP-o rows exercised");
    chk(n_zero_o > 0, "zero weights in DSP-o rows exercised");
    chk(n_perm > 0, "non-identity routing exercised");
    chk(n_same > 0, "exact result despite violations exercised");
    chk(n_err > 0, "unprepared snippet flagged");
    chk(n_noroute > 0, "configuration without routing exercised");
    $display("approximated snippets %0d, DSP-o violating snippets %0d, DSP-o zero weights %0d",
             n_apx, n_exact_viol, n_zero_o);
    $display("remapped tiles %0d, exact tiles %0d, flagged tiles %0d", n_perm, n_same, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
