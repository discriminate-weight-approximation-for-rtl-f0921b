// tb_benes_net: the routing network must realise any permutation given the
// switch settings from the reference looping algorithm: dout[k] =
// din[perm[k]].  Checked for the 4-snippet example {a0,a1,a2,a3} ->
// {a0,a2,a3,a1}, for random permutations of 8 snippets and of the default
// 128 snippets, and for the identity with all switches open.
module tb_benes_net;
  import dwa_tb_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0] d4 [4], o4 [4];
  logic [5:0] c4;
  benes_net #(.NI(4), .DW(8)) u4 (.din(d4), .cfg(c4), .dout(o4));

  logic [7:0] d8 [8], o8 [8];
  logic [19:0] c8;
  benes_net #(.NI(8), .DW(8)) u8 (.din(d8), .cfg(c8), .dout(o8));

  logic [7:0] d128 [128], o128 [128];
  logic [831:0] c128;
  benes_net u128 (.din(d128), .cfg(c128), .dout(o128));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    perm_t p;
    bit [4095:0] bits;
    int bad;
    // Example from the remapping illustration.
    p[0] = 0; p[1] = 2; p[2] = 3; p[3] = 1;
    bits = benes_route(4, p);
    c4 = bits[5:0];
    for (int k = 0; k < 4; k++) d4[k] = 8'(10 + k);
    #1;
    checks++;
    if (o4[0] != 10 || o4[1] != 12 || o4[2] != 13 || o4[3] != 11) begin
      failures++;
      $display("FAIL example %0d %0d %0d %0d", o4[0], o4[1], o4[2], o4[3]);
    end
    for (int t = 0; t < 300; t++) begin
      p = rand_perm(8);
      bits = benes_route(8, p);
      c8 = bits[19:0];
      for (int k = 0; k < 8; k++) d8[k] = 8'($urandom);
      for (int k = 0; k < 8; k++) d8[k] = 8'(k * 17 + t);
      #1;
      bad = 0;
      for (int k = 0; k < 8; k++) if (o8[k] != d8[p[k]]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL n=8 t=%0d c=%b", t, c8); for (int k = 0; k < 8; k++) $display("  o%0d=%0d exp %0d p=%0d", k, o8[k], d8[p[k]], p[k]); end
    end
    for (int t = 0; t < 50; t++) begin
      p = rand_perm(128);
      if (t == 0) for (int k = 0; k < 128; k++) p[k] = k;
      bits = benes_route(128, p);
      c128 = bits[831:0];
      if (t == 0) begin
        checks++;
        if (c128 != '0) begin failures++; $display("FAIL identity needs switches"); end
      end
      for (int k = 0; k < 128; k++) d128[k] = 8'(k + 3 * t);
      #1;
      bad = 0;
      for (int k = 0; k < 128; k++) if (o128[k] != d128[p[k]]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL n=128 t=%0d bad=%0d", t, bad); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
