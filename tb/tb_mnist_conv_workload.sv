// tb_mnist_conv_workload - the two convolution layers of the MNIST network of
// the evaluation, run window by window on the 5x5 approximate MAC.
//
// Layer 1: a 28x28 single-channel 8-bit image (a generated ring-shaped stroke
// with noise, standing in for a handwritten digit) convolved with 20 random
// 5x5 kernels: 24x24x20 = 11520 MAC windows. The testbench then applies ReLU,
// 2x2 max pooling (stride 2) and a requantisation to 8 bits (shift right by 8,
// saturate at 255) to build the 12x12x20 input of layer 2, which has 50
// kernels of 5x5x20: 8x8x50x20 = 64000 MAC windows, whose per-channel results
// the testbench sums. The MAC computes one 5x5 window per cycle; channel
// accumulation, ReLU, pooling and requantisation are done here in the
// testbench, as the MAC module itself covers only one window.
//
// Every MAC output is compared with the reference model, the MAC must accept
// one window per cycle (the total cycle count is checked), and the average
// absolute error of the layer outputs against exact arithmetic (pixel times
// rounded weight, exact sums) is reported next to their mean magnitude.
module tb_mnist_conv_workload;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  localparam int IMG = 28, KS = 5, C1 = 20, C2 = 50;
  localparam int O1 = IMG - KS + 1;   // 24
  localparam int P1 = O1 / 2;         // 12
  localparam int O2 = P1 - KS + 1;    // 8

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [24:0][7:0] pix = '0, wgt = '0;
  logic out_valid;
  logic [20:0] acc;

  approx_mac #(.K(5), .W(MAC5_W), .AP(AP_MAC5)) dut (
    .clk, .rst_n, .in_valid, .pix, .wgt, .out_valid, .acc
  );

  always #5 clk = ~clk;

  byte unsigned img [IMG][IMG];
  byte          k1 [C1][KS][KS];
  byte          k2 [C2][C1][KS][KS];
  byte unsigned f1 [C1][P1][P1];
  longint       conv1 [C1][O1][O1];      // approximate, from the MAC
  longint       conv1x [C1][O1][O1];     // exact
  longint       conv2 [C2][O2][O2];
  longint       conv2x [C2][O2][O2];

  int unsigned ap5t [] = '{7, 10, 9, 11, 12};
  longint unsigned expq [$];             // expected MAC outputs in order
  longint unsigned n_windows = 0, n_out = 0, cyc = 0, first_cyc = 0, last_cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // reference of one window, and the exact value
  function automatic longint unsigned ref_window(input byte unsigned p [25], input byte w [25],
                                                 output longint exact);
    longint unsigned pr [] = new [25];
    exact = 0;
    for (int i = 0; i < 25; i++) begin
      int wi = w[i];
      pr[i] = neuron(p[i], wi, 21, 9);
      exact += longint'(p[i]) * ((wi < 0) ? -longint'(rounded_mag(wi)) : longint'(rounded_mag(wi)));
    end
    return tree(pr, ap5t, 21);
  endfunction

  // collect MAC outputs in issue order
  longint got_q [$];
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint unsigned e;
      e = expq.pop_front();
      checks++;
      if (acc !== 21'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL window %0d: got %h expected %h", n_out, acc, e);
      end
      got_q.push_back(sext(acc, 21));
      n_out++;
      last_cyc = cyc;
    end
  end

  task automatic issue(input byte unsigned p [25], input byte w [25], output longint exact);
    longint unsigned e;
    e = ref_window(p, w, exact);
    @(negedge clk);
    for (int i = 0; i < 25; i++) begin pix[i] = p[i]; wgt[i] = w[i]; end
    in_valid = 1;
    expq.push_back(e);
    if (n_windows == 0) first_cyc = cyc;
    n_windows++;
  endtask

  function automatic real abs_diff(input longint a, input longint x);
    return (a > x) ? real'(a - x) : real'(x - a);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e1 = 0.0, e2 = 0.0, m1 = 0.0, m2 = 0.0;
    int  n1 = 0, n2 = 0;
    // image: ring of radius 6..9 around the centre, plus noise
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) begin
        int d2 = (r - 14) * (r - 14) + (c - 13) * (c - 13);
        img[r][c] = (d2 >= 36 && d2 <= 81) ? 8'(200 + $urandom_range(0, 55)) : 8'($urandom_range(0, 20));
      end
    foreach (k1[i, j, k]) k1[i][j][k] = byte'($urandom_range(0, 255));
    foreach (k2[i, j, k, l]) k2[i][j][k][l] = byte'($urandom_range(0, 255));

    repeat (3) @(posedge clk);
    rst_n = 1;

    // layer 1
    for (int m = 0; m < C1; m++)
      for (int r = 0; r < O1; r++)
        for (int c = 0; c < O1; c++) begin
          byte unsigned p [25];
          byte w [25];
          for (int i = 0; i < KS; i++)
            for (int j = 0; j < KS; j++) begin
              p[i*KS+j] = img[r+i][c+j];
              w[i*KS+j] = k1[m][i][j];
            end
          issue(p, w, conv1x[m][r][c]);
        end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    for (int m = 0; m < C1; m++)
      for (int r = 0; r < O1; r++)
        for (int c = 0; c < O1; c++) begin
          conv1[m][r][c] = got_q.pop_front();
          e1 += abs_diff(conv1[m][r][c], conv1x[m][r][c]);
          m1 += abs_diff(conv1x[m][r][c], 0);
          n1++;
        end
    checks++;
    if (last_cyc - first_cyc != n_windows) begin
      failures++;
      $display("FAIL layer 1 took %0d cycles for %0d windows", last_cyc - first_cyc, n_windows);
    end

    // ReLU, 2x2 max pool, requantise (testbench side)
    for (int m = 0; m < C1; m++)
      for (int r = 0; r < P1; r++)
        for (int c = 0; c < P1; c++) begin
          longint v;
          v = 0;
          for (int i = 0; i < 2; i++)
            for (int j = 0; j < 2; j++)
              if (conv1[m][2*r+i][2*c+j] > v) v = conv1[m][2*r+i][2*c+j];
          v = v >>> 8;
          f1[m][r][c] = (v > 255) ? 8'd255 : 8'(v);
        end

    // layer 2: one MAC window per (output, input channel); channel sum here
    n_windows = 0;
    for (int m = 0; m < C2; m++)
      for (int r = 0; r < O2; r++)
        for (int c = 0; c < O2; c++) begin
          longint ex_sum;
          ex_sum = 0;
          for (int ch = 0; ch < C1; ch++) begin
            byte unsigned p [25];
            byte w [25];
            longint ex;
            for (int i = 0; i < KS; i++)
              for (int j = 0; j < KS; j++) begin
                p[i*KS+j] = f1[ch][r+i][c+j];
                w[i*KS+j] = k2[m][ch][i][j];
              end
            issue(p, w, ex);
            ex_sum += ex;
          end
          conv2x[m][r][c] = ex_sum;
        end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    for (int m = 0; m < C2; m++)
      for (int r = 0; r < O2; r++)
        for (int c = 0; c < O2; c++) begin
          longint s;
          s = 0;
          for (int ch = 0; ch < C1; ch++) s += got_q.pop_front();
          conv2[m][r][c] = s;
          e2 += abs_diff(s, conv2x[m][r][c]);
          m2 += abs_diff(conv2x[m][r][c], 0);
          n2++;
        end
    checks++;
    if (n_out != O1 * O1 * C1 + O2 * O2 * C2 * C1) begin
      failures++;
      $display("FAIL %0d MAC outputs, expected %0d", n_out, O1 * O1 * C1 + O2 * O2 * C2 * C1);
    end
    $display("layer 1: %0d windows, mean |error| %0.1f, mean |exact| %0.1f", n1, e1 / n1, m1 / n1);
    $display("layer 2: %0d outputs (%0d windows), mean |error| %0.1f, mean |exact| %0.1f",
             n2, n_windows, e2 / n2, m2 / n2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
