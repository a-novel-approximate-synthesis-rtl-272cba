// approx_fir4 - 4-tap approximate FIR filter, y[n] = 105 x[n] + 831 x[n-1]
//               + 621 x[n-2] + 815 x[n-3].
//
// Transposed (multiple-constant-multiplication) form: every new sample goes
// through the multiplier block fir4_mcm, whose six adders are the approximate
// ones configured per adder step ({11,16,14} by default). The products are
// then summed along a chain of delay registers by three structural adders:
//   z3 <= 815x;  z2 <= 621x + z3;  z1 <= 831x + z2;  y <= 105x + z1.
// The structural adders are not among the six adders the flow configures, so
// they are exact by default (AP_STRUCT = 0).
//
// Interface: a sample is taken when in_valid is high; its output y appears with
// out_valid one clock later. 15-bit unsigned input (signed with IN_SIGNED = 1,
// see fir4_mcm), 28-bit two's-complement output. Active-
// low asynchronous reset clears the delay line. The transposed form, the
// output register and the reset are this design's choices.
module approx_fir4
  import approx_pkg::*;
#(
  parameter int unsigned IN_W      = FIR_IN_W,
  parameter int unsigned N         = FIR_OUT_W,
  parameter ap_vec_t     AP        = AP_FIR4,
  parameter int unsigned AP_STRUCT = 0,
  parameter bit          IN_SIGNED = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [IN_W-1:0] x,
  output logic            out_valid,
  output logic [N-1:0]    y
);

  logic [N-1:0] p105, p831, p621, p815;
  logic [N-1:0] z1, z2, z3;
  logic [N-1:0] s0, s1, s2;

  fir4_mcm #(.IN_W(IN_W), .N(N), .AP(AP), .IN_SIGNED(IN_SIGNED)) u_mcm (
    .x(x), .p105(p105), .p831(p831), .p621(p621), .p815(p815)
  );

  approx_addsub #(.N(N), .AP(AP_STRUCT)) u_sa0 (.a(p105), .b(z1), .sub(1'b0), .y(s0));
  approx_addsub #(.N(N), .AP(AP_STRUCT)) u_sa1 (.a(p831), .b(z2), .sub(1'b0), .y(s1));
  approx_addsub #(.N(N), .AP(AP_STRUCT)) u_sa2 (.a(p621), .b(z3), .sub(1'b0), .y(s2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z1 <= '0; z2 <= '0; z3 <= '0;
      y  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        z3 <= p815;
        z2 <= s2;
        z1 <= s1;
        y  <= s0;
      end
    end
  end

endmodule
