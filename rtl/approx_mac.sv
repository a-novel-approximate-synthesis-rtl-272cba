// approx_mac - approximate multiplier-less MAC for one KxK convolution window.
//
// Computes sum_i pix[i] * w[i] over the K*K elements of a pixel window and a
// kernel, the element-wise multiply-and-accumulate of a convolution layer. Each
// product comes from a man_neuron (two shifted copies of the pixel, added by an
// approximate adder: adder step 1); the K*K signed partial products are summed
// by approx_adder_tree (adder steps 2 .. FAS). All adders of one adder step use
// the same AP, taken from the AP list (entry [0] = adder step 1).
//
// Defaults are the 3x3 configuration: 8-bit pixels and weights, 20-bit result,
// FAS = 5, AP = {9,8,9,10,11}. The 5x5 configuration is K = 5, W = 21,
// AP = approx_pkg::AP_MAC5 = {9,7,10,9,11,12}, FAS = 6.
//
// Timing: the datapath is combinational; the result is registered. A window
// presented with in_valid high gives acc and out_valid = 1 on the next clock
// edge, one window per cycle. The output register and its active-low
// asynchronous reset are this design's choice.
module approx_mac
  import approx_pkg::*;
#(
  parameter int unsigned K  = 3,
  parameter int unsigned W  = MAC3_W,
  parameter ap_vec_t     AP = AP_MAC3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [K*K-1:0][PIX_W-1:0]     pix,   // unsigned pixel / feature data
  input  logic [K*K-1:0][WGT_W-1:0]     wgt,   // signed weights
  output logic                          out_valid,
  output logic [W-1:0]                  acc    // signed result
);

  localparam int unsigned NE = K * K;

  logic [NE-1:0][W-1:0] prod;
  logic [W-1:0]         sum;

  for (genvar i = 0; i < NE; i++) begin : g_neuron
    man_neuron #(.W(W), .AP(int'(AP[0]))) u_neuron (
      .x(pix[i]), .w(wgt[i]), .p(prod[i])
    );
  end

  approx_adder_tree #(.NLEAF(NE), .W(W), .AP(AP >> AP_BITS)) u_tree (
    .leaf(prod), .sum(sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      acc       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) acc <= sum;
    end
  end

endmodule
