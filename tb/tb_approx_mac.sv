// tb_approx_mac - self-checking test of the 3x3 and 5x5 approximate MACs.
//
// Both MAC configurations (3x3: 20 bits, AP {9,8,9,10,11}; 5x5: 21 bits,
// AP {9,7,10,9,11,12}) and an exact 3x3 MAC (all AP = 0) are fed one window
// per clock with random pixels and weights, with gaps in in_valid. Every result
// is compared with the reference model one cycle after its window, the
// out_valid timing is checked, and the exact MAC must equal the sum of pixel
// times rounded weight.
module tb_approx_mac;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [8:0][7:0]  pix3, wgt3;
  logic [24:0][7:0] pix5, wgt5;
  logic v3, v5, v3e;
  logic [19:0] acc3, acc3e;
  logic [20:0] acc5;

  approx_mac #(.K(3), .W(20), .AP(AP_MAC3)) u3  (.clk, .rst_n, .in_valid, .pix(pix3), .wgt(wgt3), .out_valid(v3),  .acc(acc3));
  approx_mac #(.K(5), .W(21), .AP(AP_MAC5)) u5  (.clk, .rst_n, .in_valid, .pix(pix5), .wgt(wgt5), .out_valid(v5),  .acc(acc5));
  approx_mac #(.K(3), .W(20), .AP('0))      u3e (.clk, .rst_n, .in_valid, .pix(pix3), .wgt(wgt3), .out_valid(v3e), .acc(acc3e));

  always #5 clk = ~clk;

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
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
    int unsigned ap3 [] = '{9, 8, 9, 10, 11};
    int unsigned ap5 [] = '{9, 7, 10, 9, 11, 12};
    int unsigned ap3t [] = '{8, 9, 10, 11};      // tree levels = adder steps 2..
    int unsigned ap5t [] = '{7, 10, 9, 11, 12};
    longint unsigned e3, e5, ex;
    bit was_valid;
    pix3 = '0; wgt3 = '0; pix5 = '0; wgt5 = '0;
    repeat (3) @(posedge clk);
    check("reset valid", {v3, v5, v3e}, 0);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      longint unsigned p3 [] = new [9];
      longint unsigned p5 [] = new [25];
      longint sum;
      sum = 0;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < 9; i++) begin
        pix3[i] = 8'($urandom);
        // every tenth window: all weights at the extremes
        wgt3[i] = (t % 10 == 0) ? (($urandom & 1) ? 8'h80 : 8'h7F) : 8'($urandom);
        p3[i] = neuron(pix3[i], int'($signed(wgt3[i])), 20, ap3[0]);
        sum += longint'(pix3[i]) * ($signed(wgt3[i]) < 0 ? -longint'(rounded_mag(int'($signed(wgt3[i]))))
                                                          :  longint'(rounded_mag(int'($signed(wgt3[i])))));
      end
      for (int i = 0; i < 25; i++) begin
        pix5[i] = 8'($urandom);
        wgt5[i] = 8'($urandom);
        p5[i] = neuron(pix5[i], int'($signed(wgt5[i])), 21, ap5[0]);
      end
      e3 = tree(p3, ap3t, 20);
      e5 = tree(p5, ap5t, 21);
      ex = 64'(sum) & mask(20);
      was_valid = in_valid;
      @(posedge clk);
      #1;
      check("valid3", v3, was_valid);
      check("valid5", v5, was_valid);
      if (was_valid) begin
        check("mac3", acc3, e3);
        check("mac5", acc5, e5);
        check("mac3 exact", acc3e, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
