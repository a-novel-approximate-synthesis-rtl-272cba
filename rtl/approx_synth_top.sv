// approx_synth_top - the approximate arithmetic designs side by side.
//
// Three independent datapaths built from the same accuracy-configurable
// approximate adder/subtractor, each at the configuration its synthesis flow
// settled on:
//   * mac3: 3x3 multiplier-less MAC, 20-bit result, AP = {9,8,9,10,11}
//   * mac5: 5x5 multiplier-less MAC, 21-bit result, AP = {9,7,10,9,11,12}
//   * fir : 4-tap FIR filter {105,831,621,815}, 15-bit unsigned in, 28-bit out,
//           AP = {11,16,14}
// They share only clock and reset; each has its own valid-in/valid-out pair and
// one cycle of latency (see approx_mac and approx_fir4).
module approx_synth_top
  import approx_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  // 3x3 MAC
  input  logic                       mac3_in_valid,
  input  logic [8:0][PIX_W-1:0]      mac3_pix,
  input  logic [8:0][WGT_W-1:0]      mac3_wgt,
  output logic                       mac3_out_valid,
  output logic [MAC3_W-1:0]          mac3_acc,
  // 5x5 MAC
  input  logic                       mac5_in_valid,
  input  logic [24:0][PIX_W-1:0]     mac5_pix,
  input  logic [24:0][WGT_W-1:0]     mac5_wgt,
  output logic                       mac5_out_valid,
  output logic [MAC5_W-1:0]          mac5_acc,
  // 4-tap FIR
  input  logic                       fir_in_valid,
  input  logic [FIR_IN_W-1:0]        fir_x,
  output logic                       fir_out_valid,
  output logic [FIR_OUT_W-1:0]       fir_y
);

  approx_mac #(.K(3), .W(MAC3_W), .AP(AP_MAC3)) u_mac3 (
    .clk, .rst_n, .in_valid(mac3_in_valid), .pix(mac3_pix), .wgt(mac3_wgt),
    .out_valid(mac3_out_valid), .acc(mac3_acc)
  );

  approx_mac #(.K(5), .W(MAC5_W), .AP(AP_MAC5)) u_mac5 (
    .clk, .rst_n, .in_valid(mac5_in_valid), .pix(mac5_pix), .wgt(mac5_wgt),
    .out_valid(mac5_out_valid), .acc(mac5_acc)
  );

  approx_fir4 #(.IN_W(FIR_IN_W), .N(FIR_OUT_W), .AP(AP_FIR4), .AP_STRUCT(0), .IN_SIGNED(1'b0)) u_fir (
    .clk, .rst_n, .in_valid(fir_in_valid), .x(fir_x),
    .out_valid(fir_out_valid), .y(fir_y)
  );

endmodule
