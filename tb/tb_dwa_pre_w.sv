// tb_dwa_pre_w: exhaustive check of DSP-w input reordering + pre-processing
// for three 4-bit weights and one reduced slot.  Expected: the reduced slot
// takes the lowest-index even weight, holds it shifted right by its trailing
// zeros (s < 8, s << f = p), the other two weights fill slots 0 and 1 in
// their original order, slot_idx names the source of every slot, and err is
// set exactly when all three weights are odd.
module tb_dwa_pre_w;
  import dwa_tb_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0] p [3], slot_w [3];
  logic [1:0] slot_idx [3];
  logic [1:0] f [1];
  logic       err;

  dwa_pre_w #(.M(3), .BW(4), .G(1)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s p={%0d,%0d,%0d}", what, p[0], p[1], p[2]);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel, o0, o1;
    for (int v = 0; v < 4096; v++) begin
      p[0] = 4'(v); p[1] = 4'(v >> 4); p[2] = 4'(v >> 8);
      #1;
      sel = -1;
      for (int i = 2; i >= 0; i--) if (p[i][0] == 1'b0) sel = i;
      chk(err == (sel < 0), "err");
      if (sel >= 0) begin
        o0 = (sel == 0) ? 1 : 0;
        o1 = (sel == 2) ? 1 : 2;
        chk(slot_idx[2] == 2'(sel), "reduced slot index");
        chk(slot_w[2] < 8, "reduced slot width");
        chk((int'(slot_w[2]) << f[0]) == int'(p[sel]), "s << f = p");
        chk(p[sel] == 0 || slot_w[2][0] == 1'b1, "greedy shift");
        chk(slot_idx[0] == 2'(o0) && slot_w[0] == p[o0], "slot 0");
        chk(slot_idx[1] == 2'(o1) && slot_w[1] == p[o1], "slot 1");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
