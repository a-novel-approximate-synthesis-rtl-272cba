// man_weight_encoder - rounds an 8-bit weight to the shift factors of a
// multiplier-less neuron.
//
// The weight is a signed two's-complement byte. Its magnitude (0..128) is cut
// into two 4-bit units. Each unit is replaced by the nearest value that has a
// single non-zero bit, from {0, 1, 2, 4, 8}; that bit's position is the shift
// applied to the input data. Splitting into 4-bit units and rounding each unit
// to one non-zero bit is the method the neuron follows; the signed byte format,
// rounding each unit on its own, and rounding a tie (3, 6) upward are this
// design's choices. Units 9..15 round to 8, the largest value a unit can hold.
//
// Purely combinational. enc.neg is simply the weight's sign bit.
module man_weight_encoder
  import approx_pkg::*;
(
  input  logic [WGT_W-1:0] w,     // signed weight
  output man_wgt_t         enc
);

  logic [WGT_W-1:0] mag;          // |w|, 0..128 fits 8 bits unsigned

  // nearest single-bit value of a 4-bit unit: {nz, shift}
  function automatic logic [2:0] round_unit(input logic [3:0] u);
    unique case (u)
      4'd0:         return {1'b0, 2'd0};
      4'd1:         return {1'b1, 2'd0};
      4'd2:         return {1'b1, 2'd1};
      4'd3, 4'd4,
      4'd5:         return {1'b1, 2'd2};
      default:      return {1'b1, 2'd3};   // 6..15 -> 8
    endcase
  endfunction

  always_comb begin
    mag = w[WGT_W-1] ? (~w + 1'b1) : w;
    enc.neg = w[WGT_W-1];
    {enc.hi_nz, enc.hi_sh} = round_unit(mag[7:4]);
    {enc.lo_nz, enc.lo_sh} = round_unit(mag[3:0]);
  end

endmodule
