// man_neuron - multiplier-less artificial neuron with an approximate adder.
//
// Multiplies an 8-bit unsigned input (image or post-ReLU feature data) by an
// 8-bit signed weight without a multiplier. The weight is first rounded by
// man_weight_encoder into two shift factors, one per 4-bit unit of its
// magnitude. The two shifted copies of the input are added by one approximate
// adder (approx_addsub, adder step 1 of the MAC, AP bits approximate), which is
// where this neuron departs from the exact multiplier-less neuron it is based
// on. A negative weight then negates the sum exactly (two's complement), so the
// output is a signed W-bit partial product. How the sign is applied is this
// design's choice; the shift-and-add product follows the described neuron.
//
// Largest magnitude: 255 * (128 + 8) = 34680, 16 bits, so W >= 17.
// Purely combinational.
module man_neuron
  import approx_pkg::*;
#(
  parameter int unsigned W  = 20,   // width of the adder and of the product
  parameter int unsigned AP = 9     // approximate bits of the neuron's adder
) (
  input  logic [PIX_W-1:0] x,
  input  logic [WGT_W-1:0] w,
  output logic [W-1:0]     p        // signed product
);

  man_wgt_t     enc;
  logic [W-1:0] xw, hi_term, lo_term, mag;

  man_weight_encoder u_enc (.w(w), .enc(enc));

  always_comb begin
    xw      = W'(x);
    hi_term = enc.hi_nz ? (xw << (3'd4 + 3'(enc.hi_sh))) : '0;
    lo_term = enc.lo_nz ? (xw << enc.lo_sh) : '0;
  end

  approx_addsub #(.N(W), .AP(AP)) u_add (
    .a(hi_term), .b(lo_term), .sub(1'b0), .y(mag)
  );

  assign p = enc.neg ? (~mag + 1'b1) : mag;

endmodule
