// approx_pkg - shared types and constants of the approximate arithmetic designs.
//
// The designs here are built from one accuracy-configurable adder/subtractor
// whose low AP bits are computed approximately. Every adder that belongs to the
// same adder step (AS, the depth of the adder counted from the inputs) shares
// one AP value, so a whole design is configured by one short list of APs, one
// entry per adder step. That list is carried as an ap_vec_t: entry [0] is adder
// step 1, entry [1] adder step 2, and so on.
//
// The AP lists below are the configurations reported as the outcome of the
// sensitivity-based synthesis flow: {9,8,9,10,11} for the 3x3 MAC,
// {9,7,10,9,11,12} for the 5x5 MAC and {11,16,14} for the 4-tap FIR filter.
// Widths follow the reported designs: 8-bit pixels and weights, 20-bit (3x3) and
// 21-bit (5x5) MAC outputs, a 15-bit FIR input and 28-bit FIR adders/output.
package approx_pkg;

  localparam int unsigned MAX_AS  = 8;   // largest number of adder steps held
  localparam int unsigned AP_BITS = 5;   // one AP entry, 0..31

  typedef logic [MAX_AS-1:0][AP_BITS-1:0] ap_vec_t;

  // MAC modules of the CNN flow
  localparam int unsigned PIX_W   = 8;   // input image / feature data
  localparam int unsigned WGT_W   = 8;   // signed weight
  localparam int unsigned MAC3_W  = 20;  // 3x3 MAC output width
  localparam int unsigned MAC5_W  = 21;  // 5x5 MAC output width

  localparam ap_vec_t AP_MAC3 = {5'd0, 5'd0, 5'd0, 5'd11, 5'd10, 5'd9, 5'd8, 5'd9};
  localparam ap_vec_t AP_MAC5 = {5'd0, 5'd0, 5'd12, 5'd11, 5'd9, 5'd10, 5'd7, 5'd9};

  // 4-tap FIR filter
  localparam int unsigned FIR_IN_W  = 15;
  localparam int unsigned FIR_OUT_W = 28;
  localparam ap_vec_t AP_FIR4 = {5'd0, 5'd0, 5'd0, 5'd0, 5'd0, 5'd14, 5'd16, 5'd11};

  // Weight of the multiplier-less neuron after rounding: the magnitude is
  // approximated as (hi ? 2^(4+hi_sh) : 0) + (lo ? 2^lo_sh : 0).
  typedef struct packed {
    logic       neg;     // weight is negative
    logic       hi_nz;   // upper 4-bit unit is non-zero after rounding
    logic [1:0] hi_sh;   // its power of two, 0..3 (value 1,2,4,8)
    logic       lo_nz;   // lower 4-bit unit is non-zero after rounding
    logic [1:0] lo_sh;   // its power of two, 0..3
  } man_wgt_t;

  // Number of adder steps of a binary adder tree over n leaves.
  function automatic int unsigned tree_levels(input int unsigned n);
    int unsigned l = 0;
    int unsigned m = n;
    while (m > 1) begin
      m = (m + 1) / 2;
      l++;
    end
    return l;
  endfunction

endpackage
