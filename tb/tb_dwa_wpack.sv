// tb_dwa_wpack: weight packing.  Checks the WOP-A8W4 layout of a DSP unit with
// one reduced slot ({w0, 8'b0, w1, 8'b0, s[2:0]}), the plain two-weight
// packing of 4-bit weights with 4 guard bits ({11, 15} -> 1011_0000_1111),
// and a layout with all slots reduced (DSP-o), against concatenations written
// out in the testbench.
module tb_dwa_wpack;
  int checks = 0, failures = 0;

  logic [3:0]  w1 [3];
  logic [26:0] pk1;
  dwa_wpack #(.M(3), .WF(4), .NRED(1), .WR(3), .GW(8)) u1 (.w(w1), .packed_w(pk1));

  logic [3:0]  w2 [2];
  logic [11:0] pk2;
  dwa_wpack #(.M(2), .WF(4), .NRED(0), .WR(3), .GW(4)) u2 (.w(w2), .packed_w(pk2));

  logic [2:0]  w3 [3];
  logic [24:0] pk3;
  dwa_wpack #(.M(3), .WF(3), .NRED(0), .WR(3), .GW(8)) u3 (.w(w3), .packed_w(pk3));

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w2[0] = 4'd11; w2[1] = 4'd15;
    #1 chk(64'(pk2), 64'b1011_0000_1111, "two weights, 4 guard bits");
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 3; i++) begin
        w1[i] = 4'($urandom);
        w3[i] = 3'($urandom);
      end
      w2[0] = 4'($urandom); w2[1] = 4'($urandom);
      #1;
      chk(64'(pk1), 64'({w1[0], 8'h00, w1[1], 8'h00, w1[2][2:0]}), "one reduced slot");
      chk(64'(pk2), 64'({w2[0], 4'h0, w2[1]}), "plain");
      chk(64'(pk3), 64'({w3[0], 8'h00, w3[1], 8'h00, w3[2]}), "all reduced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
