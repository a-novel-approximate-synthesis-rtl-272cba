// tb_approx_fir4 - self-checking test of the 4-tap approximate FIR filter.
//
// An approximate filter (AP {11,16,14}) and an exact one (all AP = 0) are fed
// the same random unsigned samples, with gaps in in_valid; a signed exact
// filter (IN_SIGNED = 1) gets the same bit patterns read as signed. The exact filter must
// equal 105 x[n] + 831 x[n-1] + 621 x[n-2] + 815 x[n-3] computed directly; the
// approximate one must equal the reference multiplier block followed by the
// exact delay-line sums. Output valid must follow input valid by one cycle, and
// the first outputs after reset must see zeros in the delay line.
module tb_approx_fir4;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [14:0] x = '0;
  logic va, ve, vs;
  logic [27:0] ya, ye, ys;

  approx_fir4 #(.AP(AP_FIR4)) ua (.clk, .rst_n, .in_valid, .x, .out_valid(va), .y(ya));
  approx_fir4 #(.AP('0))      ue (.clk, .rst_n, .in_valid, .x, .out_valid(ve), .y(ye));
  approx_fir4 #(.AP('0), .IN_SIGNED(1'b1)) us (.clk, .rst_n, .in_valid, .x, .out_valid(vs), .y(ys));

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
    longint hist [4] = '{0, 0, 0, 0};        // x[n], x[n-1], x[n-2], x[n-3]
    longint shist [4] = '{0, 0, 0, 0};       // the same, read as signed
    longint unsigned ap_hist [4][4];         // approximate products of past samples
    bit was_valid;
    foreach (ap_hist[i, j]) ap_hist[i][j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      longint xs;
      longint unsigned xe, r15, r129, r105, r831, r815, r621, ea, ee, es;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      xs = (t % 50 == 7) ? 32767 : longint'(15'($urandom));
      x = 15'(xs);
      was_valid = in_valid;
      if (in_valid) begin
        xe = 64'(xs) & mask(28);
        r15  = addsub(xe << 4, xe, 1, 28, 11);
        r129 = addsub(xe << 7, xe, 0, 28, 11);
        r105 = addsub(r15 << 3, r15, 1, 28, 16);
        r831 = addsub(r15 << 6, r129, 1, 28, 16);
        r815 = addsub(r831, xe << 4, 1, 28, 14);
        r621 = addsub(r831, r105 << 1, 1, 28, 14);
        for (int k = 3; k > 0; k--) begin
          hist[k] = hist[k-1];
          shist[k] = shist[k-1];
          ap_hist[k] = ap_hist[k-1];
        end
        hist[0] = xs;
        shist[0] = sext(64'(xs), 15);
        es = 64'(105 * shist[0] + 831 * shist[1] + 621 * shist[2] + 815 * shist[3]) & mask(28);
        ap_hist[0] = '{r105, r831, r621, r815};
        ee = 64'(105 * hist[0] + 831 * hist[1] + 621 * hist[2] + 815 * hist[3]) & mask(28);
        ea = (ap_hist[0][0] + ap_hist[1][1] + ap_hist[2][2] + ap_hist[3][3]) & mask(28);
      end
      @(posedge clk);
      #1;
      check("valid", va, was_valid);
      check("valid exact", ve, was_valid);
      if (was_valid) begin
        check("exact y", ye, ee);
        check("signed y", ys, es);
        check("approx y", ya, ea);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
