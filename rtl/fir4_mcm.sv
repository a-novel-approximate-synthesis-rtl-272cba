// fir4_mcm - multiplier block of the 4-tap approximate FIR filter.
//
// Forms x*105, x*831, x*621 and x*815 from shifts and six approximate
// adder/subtractors, following the common-subexpression decomposition of the
// coefficient set:
//   adder step 1:  15  = x<<4 - x            129 = x<<7 + x
//   adder step 2:  105 = 15<<3 - 15          831 = 15<<6 - 129
//   adder step 3:  815 = 831 - x<<4          621 = 831 - 105<<1
// All adders are N bits wide (28 by default) and the adders of adder step s use
// AP[s-1] approximate bits; the default AP list is {11,16,14}. The input is an
// unsigned sample, zero-extended to N bits, or with IN_SIGNED = 1 a two's-
// complement sample, sign-extended. Unsigned is the default because with it
// the AP list above keeps the worst-case accuracy near the 95 % target it was
// chosen for, while signed, zero-mean data gives outputs near zero whose
// relative error is unbounded; the input format is otherwise this design's
// choice. Purely combinational.
module fir4_mcm
  import approx_pkg::*;
#(
  parameter int unsigned IN_W = FIR_IN_W,
  parameter int unsigned N    = FIR_OUT_W,
  parameter ap_vec_t     AP   = AP_FIR4,
  parameter bit          IN_SIGNED = 1'b0
) (
  input  logic [IN_W-1:0] x,
  output logic [N-1:0]    p105,
  output logic [N-1:0]    p831,
  output logic [N-1:0]    p621,
  output logic [N-1:0]    p815
);

  logic [N-1:0] xe, p15, p129;

  assign xe = IN_SIGNED ? N'($signed(x)) : N'(x);

  // adder step 1
  approx_addsub #(.N(N), .AP(int'(AP[0]))) u_15  (.a(xe << 4), .b(xe),  .sub(1'b1), .y(p15));
  approx_addsub #(.N(N), .AP(int'(AP[0]))) u_129 (.a(xe << 7), .b(xe),  .sub(1'b0), .y(p129));
  // adder step 2
  approx_addsub #(.N(N), .AP(int'(AP[1]))) u_105 (.a(p15 << 3), .b(p15),  .sub(1'b1), .y(p105));
  approx_addsub #(.N(N), .AP(int'(AP[1]))) u_831 (.a(p15 << 6), .b(p129), .sub(1'b1), .y(p831));
  // adder step 3
  approx_addsub #(.N(N), .AP(int'(AP[2]))) u_815 (.a(p831), .b(xe << 4),   .sub(1'b1), .y(p815));
  approx_addsub #(.N(N), .AP(int'(AP[2]))) u_621 (.a(p831), .b(p105 << 1), .sub(1'b1), .y(p621));

endmodule
