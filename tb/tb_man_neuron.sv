// tb_man_neuron - self-checking test of the multiplier-less neuron.
//
// Three neurons (AP = 9 as in both MACs, AP = 0, AP = 4) get every pixel value
// with random weights plus all weights with random pixels. Outputs are compared
// with the reference model; with AP = 0 the product must equal x times the
// rounded weight exactly.
module tb_man_neuron;
  import approx_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0]  x, w;
  logic [19:0] p9, p0;
  logic [20:0] p4;

  man_neuron #(.W(20), .AP(9)) u9 (.x(x), .w(w), .p(p9));
  man_neuron #(.W(20), .AP(0)) u0 (.x(x), .w(w), .p(p0));
  man_neuron #(.W(21), .AP(4)) u4 (.x(x), .w(w), .p(p4));

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s x=%0d w=%0d: got %h expected %h", what, x, $signed(w), got, exp);
    end
  endtask

  task automatic apply;
    int ws = int'($signed(w));
    #1;
    check("AP9", p9, neuron(x, ws, 20, 9));
    check("AP0", p0, neuron(x, ws, 20, 0));
    check("AP4", p4, neuron(x, ws, 21, 4));
    check("AP0 exact", p0, 64'(longint'(x) * (ws < 0 ? -longint'(rounded_mag(ws)) : longint'(rounded_mag(ws)))) & 64'hFFFFF);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand example: 200 * 105 -> 200 * 136 = 27200 (AP = 0)
    x = 8'd200; w = 8'd105; #1;
    checks++; if (p0 != 20'd27200) failures++;
    for (int i = 0; i < 256; i++) begin
      x = 8'(i); w = 8'($urandom); apply();
      x = 8'($urandom); w = 8'(i); apply();
    end
    for (int i = 0; i < 2000; i++) begin
      x = 8'($urandom); w = 8'($urandom); apply();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
