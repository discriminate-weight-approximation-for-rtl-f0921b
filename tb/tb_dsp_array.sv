// tb_dsp_array: DSP array of 8 rows x 10 columns (4 units per row, the last
// one half empty), rows 0-4 built with intra-DSP approximation and rows 5-7
// without.  One random tile per cycle (with gaps); weights of approximating
// rows are prepared by the reference offline approximation, those of exact
// rows are used as drawn.  Every column sum must equal sum_r a_r * w_r,c and
// arrive 4 cycles after its tile.  Some tiles carry an unprepared all-odd
// snippet: in an approximating row it must raise err, in an exact row it must
// not and the sums stay exact.
module tb_dsp_array;
  import dwa_tb_pkg::*;
  localparam int R = 8, C = 10, NE = 3, M = 3, U = (C + M - 1) / M, LAT = 4;
  int checks = 0, failures = 0, n_apx = 0, n_err = 0, n_exact_viol = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, out_valid, err;
  logic [7:0]  a [R][1];
  logic [3:0]  w [R][C];
  logic [12+$clog2(R+1)-1:0] dot [1][C];

  dsp_array #(.R(R), .C(C), .N_EXACT_ROWS(NE)) dut (.*);

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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sn [16];
    exp_t e;
    in_valid = 0;
    for (int r = 0; r < R; r++) begin
      a[r][0] = 0;
      for (int c = 0; c < C; c++) w[r][c] = 0;
    end
    for (int s = 0; s < LAT; s++) hist[s].valid = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1004; t++) begin
      @(negedge clk);
      if (hist[LAT-1].valid) begin
        chk(out_valid, "valid after 4 cycles");
        chk(err == hist[LAT-1].err, "err flag");
        if (!hist[LAT-1].err)
          for (int c = 0; c < C; c++) chk(int'(dot[0][c]) == hist[LAT-1].dot[c], "column sum");
      end else chk(!out_valid, "no spurious valid");
      for (int s = LAT - 1; s > 0; s--) hist[s] = hist[s-1];
      e.valid = (t < 1000) && ($urandom_range(7, 0) != 0);
      e.err = 0;
      for (int r = 0; r < R; r++) begin
        a[r][0] = 8'($urandom);
        for (int u = 0; u < U; u++) begin
          for (int i = 0; i < 16; i++) sn[i] = 0;
          for (int i = 0; i < M; i++) if (u * M + i < C) sn[i] = $urandom_range(15, 0);
          if (t % 37 == 3 && u == 1) for (int i = 0; i < M; i++) sn[i] = 2 * $urandom_range(7, 0) + 1;
          if (r < R - NE) begin
            if (t % 37 == 3 && u == 1 && r == 2) e.err = 1;
            if (!(t % 37 == 3 && u == 1 && r == 2)) begin
              // prepared offline
              if (t % 37 == 3 && u == 1) for (int i = 0; i < M; i++) sn[i] = 2 * $urandom_range(7, 0) + 1;
              n_apx += approx_snippet(sn, M, 8, 4, 27);
            end
          end else if (snippet_violates(sn, M, 8, 4, 27)) n_exact_viol++;
          for (int i = 0; i < M; i++) if (u * M + i < C) w[r][u*M+i] = 4'(sn[i]);
        end
      end
      for (int c = 0; c < C; c++) begin
        e.dot[c] = 0;
        for (int r = 0; r < R; r++) e.dot[c] += int'(a[r][0]) * int'(w[r][c]);
      end
      if (e.valid && e.err) n_err++;
      in_valid = e.valid;
      hist[0] = e;
    end
    chk(n_apx > 100, "approximation exercised");
    chk(n_err > 5, "err exercised");
    chk(n_exact_viol > 100, "violating snippets in exact rows exercised");
    $display("approximated %0d, err tiles %0d, violating snippets in exact rows %0d", n_apx, n_err, n_exact_viol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
