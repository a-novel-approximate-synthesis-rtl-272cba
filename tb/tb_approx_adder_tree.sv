// tb_approx_adder_tree - self-checking test of the adder tree.
//
// A 9-leaf tree (20 bits, levels AP {8,9,10,11}), a 25-leaf tree (21 bits,
// {7,10,9,11,12}) and an exact 9-leaf tree get random signed leaves and are
// compared with the reference model; the exact tree must give the true sum.
module tb_approx_adder_tree;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [8:0][19:0]  l9;
  logic [24:0][20:0] l25;
  logic [19:0] s9, s9e;
  logic [20:0] s25;

  approx_adder_tree #(.NLEAF(9),  .W(20), .AP(AP_MAC3 >> AP_BITS)) u9  (.leaf(l9),  .sum(s9));
  approx_adder_tree #(.NLEAF(25), .W(21), .AP(AP_MAC5 >> AP_BITS)) u25 (.leaf(l25), .sum(s25));
  approx_adder_tree #(.NLEAF(9),  .W(20), .AP('0))                u9e (.leaf(l9),  .sum(s9e));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ap9 [] = '{8, 9, 10, 11};
    int unsigned ap25 [] = '{7, 10, 9, 11, 12};
    for (int t = 0; t < 3000; t++) begin
      longint unsigned v9 [] = new [9];
      longint unsigned v25 [] = new [25];
      longint exact;
      exact = 0;
      // small leaves (like neuron products) and, every other test, full-range ones
      for (int i = 0; i < 9; i++) begin
        l9[i] = (t % 2) ? 20'(sext(17'($urandom), 17)) : 20'($urandom);
        v9[i] = l9[i];
        exact += sext(l9[i], 20);
      end
      for (int i = 0; i < 25; i++) begin
        l25[i] = 21'(sext(17'($urandom), 17));
        v25[i] = l25[i];
      end
      #1;
      checks += 3;
      if (s9  !== 20'(tree(v9, ap9, 20)))   begin failures++; if (failures < 10) $display("FAIL 9-leaf"); end
      if (s25 !== 21'(tree(v25, ap25, 21))) begin failures++; if (failures < 10) $display("FAIL 25-leaf"); end
      if (s9e !== 20'(exact))               begin failures++; if (failures < 10) $display("FAIL exact"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
