// tb_dwa_apack: activation packing of three 4-bit activations with 12 guard
// bits, and of a single 8-bit activation, against concatenations written out
// in the testbench.
module tb_dwa_apack;
  int checks = 0, failures = 0;

  logic [3:0]  a3 [3];
  logic [35:0] pk3;
  dwa_apack #(.N(3), .BA(4), .GA(12)) u3 (.a(a3), .packed_a(pk3));

  logic [7:0] a1 [1];
  logic [7:0] pk1;
  dwa_apack #(.N(1), .BA(8), .GA(11)) u1 (.a(a1), .packed_a(pk1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int j = 0; j < 3; j++) a3[j] = 4'($urandom);
      a1[0] = 8'($urandom);
      #1;
      checks += 2;
      if (pk3 !== {a3[0], 12'h000, a3[1], 12'h000, a3[2]}) begin
        failures++;
        $display("FAIL n=3 got=%h", pk3);
      end
      if (pk1 !== a1[0]) begin
        failures++;
        $display("FAIL n=1 got=%h", pk1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
