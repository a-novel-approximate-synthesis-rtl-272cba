// tb_approx_synth_top - end-to-end test of the three approximate datapaths.
//
// The top is used with its default parameters (3x3 MAC, 5x5 MAC and 4-tap FIR
// at their final AP configurations). All three are driven at once with random
// data and random gaps in their valid inputs, and every output is compared with
// the reference models one cycle after its input. Beside exactness against the
// model, the test measures how far each approximate output lies from the exact
// arithmetic result (for the MACs, the exact sum of pixel times rounded weight;
// for the FIR, the exact convolution), and reports the accuracy figure
// min(1 - |approx - exact| / |exact|) over outputs with a non-zero exact value,
// for the MACs also over the windows (every other one) that have non-negative
// weights only (for the 3x3 MAC leaving out its windows of small pixels). These figures are printed, not judged.
//
// Mechanisms that must occur at least once (a failure is counted otherwise):
// a negative and a positive weight, a weight unit rounded up, one rounded down,
// a zero unit, an approximate MAC output that differs from the exact one, an
// approximate FIR output that differs from the exact one, and a cycle with an input held off (valid low).
module tb_approx_synth_top;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic mac3_in_valid = 0, mac5_in_valid = 0, fir_in_valid = 0;
  logic [8:0][7:0]  mac3_pix = '0, mac3_wgt = '0;
  logic [24:0][7:0] mac5_pix = '0, mac5_wgt = '0;
  logic [14:0]      fir_x = '0;
  logic mac3_out_valid, mac5_out_valid, fir_out_valid;
  logic [19:0] mac3_acc;
  logic [20:0] mac5_acc;
  logic [27:0] fir_y;

  approx_synth_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_neg_w = 0, n_pos_w = 0, n_round_up = 0, n_round_down = 0, n_zero_unit = 0;
  int n_mac_err = 0, n_mac_exact = 0, n_fir_err = 0, n_fir_exact = 0, n_idle = 0;
  real acc_mac3 = 100.0, acc_mac5 = 100.0, acc_fir = 100.0;
  real pos_mac3 = 100.0, pos_mac5 = 100.0;   // windows with non-negative weights

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic void note_weight(input int w);
    int unsigned m = (w < 0) ? -w : w;
    if (w < 0) n_neg_w++; else if (w > 0) n_pos_w++;
    for (int u = 0; u < 2; u++) begin
      int unsigned v = u ? m % 16 : m / 16;
      int unsigned r = round_unit(v);
      if (r > v) n_round_up++;
      else if (r < v) n_round_down++;
      if (r == 0) n_zero_unit++;
    end
  endfunction

  function automatic real accuracy(input longint got, input longint exp, input real cur);
    real a;
    if (exp == 0) return cur;
    a = 100.0 * (1.0 - ((got > exp) ? real'(got - exp) : real'(exp - got)) / ((exp < 0) ? real'(-exp) : real'(exp)));
    return (a < cur) ? a : cur;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ap3t [] = '{8, 9, 10, 11};
    int unsigned ap5t [] = '{7, 10, 9, 11, 12};
    longint fir_hist [4] = '{0, 0, 0, 0};
    longint unsigned fir_ap [4][4];
    longint unsigned e3, e5, ef;
    longint x3, x5, xf;
    bit v3, v5, vf;
    foreach (fir_ap[i, j]) fir_ap[i][j] = 0;
    repeat (3) @(posedge clk);
    check("reset valid", {mac3_out_valid, mac5_out_valid, fir_out_valid}, 0);
    check("reset data", {mac3_acc, mac5_acc}, 0);
    check("reset fir", fir_y, 0);
    rst_n = 1;
    for (int t = 0; t < 10000; t++) begin
      longint unsigned p3 [] = new [9];
      longint unsigned p5 [] = new [25];
      longint s3, s5;
      s3 = 0; s5 = 0;
      @(negedge clk);
      mac3_in_valid = ($urandom_range(0, 5) != 0);
      mac5_in_valid = ($urandom_range(0, 5) != 0);
      fir_in_valid  = ($urandom_range(0, 5) != 0);
      if (!mac3_in_valid || !mac5_in_valid || !fir_in_valid) n_idle++;
      // 3x3 window; small pixels every fifth window so that small sums appear too
      for (int i = 0; i < 9; i++) begin
        int w;
        mac3_pix[i] = (t % 5 == 0) ? 8'($urandom_range(0, 15)) : 8'($urandom);
        // odd windows: non-negative weights only
        mac3_wgt[i] = (t % 2) ? 8'($urandom_range(0, 127)) : 8'($urandom);
        w = int'($signed(mac3_wgt[i]));
        if (mac3_in_valid) note_weight(w);
        p3[i] = neuron(mac3_pix[i], w, 20, 9);
        s3 += longint'(mac3_pix[i]) * ((w < 0) ? -longint'(rounded_mag(w)) : longint'(rounded_mag(w)));
      end
      for (int i = 0; i < 25; i++) begin
        int w;
        mac5_pix[i] = 8'($urandom);
        mac5_wgt[i] = (t % 2) ? 8'($urandom_range(0, 127)) : 8'($urandom);
        w = int'($signed(mac5_wgt[i]));
        p5[i] = neuron(mac5_pix[i], w, 21, 9);
        s5 += longint'(mac5_pix[i]) * ((w < 0) ? -longint'(rounded_mag(w)) : longint'(rounded_mag(w)));
      end
      e3 = tree(p3, ap3t, 20);
      e5 = tree(p5, ap5t, 21);
      x3 = s3; x5 = s5;
      // FIR sample
      fir_x = 15'($urandom);
      if (fir_in_valid) begin
        longint xs;
        longint unsigned xe, r15, r129, r105, r831;
        xs = longint'(fir_x);
        xe = 64'(xs) & mask(28);
        r15  = addsub(xe << 4, xe, 1, 28, 11);
        r129 = addsub(xe << 7, xe, 0, 28, 11);
        r105 = addsub(r15 << 3, r15, 1, 28, 16);
        r831 = addsub(r15 << 6, r129, 1, 28, 16);
        for (int k = 3; k > 0; k--) begin
          fir_hist[k] = fir_hist[k-1];
          fir_ap[k] = fir_ap[k-1];
        end
        fir_hist[0] = xs;
        fir_ap[0] = '{r105, r831, addsub(r831, r105 << 1, 1, 28, 14), addsub(r831, xe << 4, 1, 28, 14)};
        ef = (fir_ap[0][0] + fir_ap[1][1] + fir_ap[2][2] + fir_ap[3][3]) & mask(28);
        xf = 105 * fir_hist[0] + 831 * fir_hist[1] + 621 * fir_hist[2] + 815 * fir_hist[3];
      end
      v3 = mac3_in_valid; v5 = mac5_in_valid; vf = fir_in_valid;
      @(posedge clk);
      #1;
      check("mac3 valid", mac3_out_valid, v3);
      check("mac5 valid", mac5_out_valid, v5);
      check("fir valid", fir_out_valid, vf);
      if (v3) begin
        check("mac3", mac3_acc, e3);
        if (sext(mac3_acc, 20) != x3) n_mac_err++; else n_mac_exact++;
        acc_mac3 = accuracy(sext(mac3_acc, 20), x3, acc_mac3);
        if (t % 2 && t % 5 != 0) pos_mac3 = accuracy(sext(mac3_acc, 20), x3, pos_mac3);
      end
      if (v5) begin
        check("mac5", mac5_acc, e5);
        if (sext(mac5_acc, 21) != x5) n_mac_err++; else n_mac_exact++;
        acc_mac5 = accuracy(sext(mac5_acc, 21), x5, acc_mac5);
        if (t % 2) pos_mac5 = accuracy(sext(mac5_acc, 21), x5, pos_mac5);
      end
      if (vf) begin
        check("fir", fir_y, ef);
        if (sext(fir_y, 28) != xf) n_fir_err++; else n_fir_exact++;
        acc_fir = accuracy(sext(fir_y, 28), xf, acc_fir);
      end
    end
    $display("mechanisms: neg_w=%0d pos_w=%0d round_up=%0d round_down=%0d zero_unit=%0d",
             n_neg_w, n_pos_w, n_round_up, n_round_down, n_zero_unit);
    $display("            mac_err=%0d mac_exact=%0d fir_err=%0d fir_exact=%0d idle=%0d",
             n_mac_err, n_mac_exact, n_fir_err, n_fir_exact, n_idle);
    $display("accuracy (min over outputs, %%): mac3=%0.2f mac5=%0.2f fir=%0.2f",
             acc_mac3, acc_mac5, acc_fir);
    $display("accuracy with non-negative weights only (%%): mac3=%0.2f mac5=%0.2f", pos_mac3, pos_mac5);
    checks++; if (n_neg_w == 0)      begin failures++; $display("never: negative weight"); end
    checks++; if (n_pos_w == 0)      begin failures++; $display("never: positive weight"); end
    checks++; if (n_round_up == 0)   begin failures++; $display("never: unit rounded up"); end
    checks++; if (n_round_down == 0) begin failures++; $display("never: unit rounded down"); end
    checks++; if (n_zero_unit == 0)  begin failures++; $display("never: zero unit"); end
    checks++; if (n_mac_err == 0)    begin failures++; $display("never: MAC approximation error"); end
    checks++; if (n_fir_err == 0)    begin failures++; $display("never: FIR approximation error"); end
    checks++; if (n_idle == 0)       begin failures++; $display("never: idle input cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
