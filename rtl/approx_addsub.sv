// approx_addsub - accuracy-configurable approximate adder/subtractor.
//
// The N-bit word is split in two. The upper N-AP bits (the accurate part) are
// added by an ordinary carry-propagating adder. The lower AP bits (the
// approximate part) never send a carry upward. Inside the approximate part a
// "carry" travels the other way, from its MSB down to its LSB: a carry
// generator at bit k raises its flag when the flag from bit k+1 is set or when
// both operand bits are 1, and the sum generator at bit k outputs 1 when that
// flag is set and a XOR b otherwise. So from the first bit position (from the
// top) where both operands hold a 1, every lower sum bit is forced to 1. The
// worst error of the approximate part is 2^AP - 1, half that of truncation.
//
// Subtraction puts XOR gates on operand b (one's complement). The +1 of the
// two's complement is added only when AP = 0, where the unit is then an exact
// adder/subtractor; for AP > 0 it would have to enter the approximate part,
// which passes no carry to the accurate part, so it is dropped, as the design
// it follows specifies. Operands and result are plain N-bit words; signedness
// is up to the user (the bit patterns are the same).
//
// Purely combinational; AP may be 0..N. An assertion checks, in simulation,
// that every addition is off by no more than 2^AP - 1.
module approx_addsub #(
  parameter int unsigned N  = 28,
  parameter int unsigned AP = 0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,   // 1: a - b, 0: a + b
  output logic [N-1:0] y
);

  logic [N-1:0] bx;
  assign bx = b ^ {N{sub}};

  if (AP == 0) begin : g_exact
    assign y = a + bx + N'(sub);
  end else begin : g_approx
    // approximate part, carry generators running MSB -> LSB
    logic [AP:0] flag;   // flag[k] enters bit k-1; flag[AP] = 0
    assign flag[AP] = 1'b0;
    for (genvar k = AP - 1; k >= 0; k--) begin : g_bit
      assign flag[k] = flag[k+1] | (a[k] & bx[k]);
      assign y[k]    = flag[k] | (a[k] ^ bx[k]);
    end
    if (AP < N) begin : g_acc
      // accurate part, no carry in from the approximate part
      assign y[N-1:AP] = a[N-1:AP] + bx[N-1:AP];
    end
    // An approximate addition falls short of the exact sum by 0 .. 2^AP - 1.
    logic [N-1:0] shortfall;
    assign shortfall = a + bx - y;
    always_comb
      if (!sub) assert (AP >= N || shortfall <= N'((64'd1 << AP) - 1))
        else $error("approx_addsub: error %0d exceeds 2^AP - 1", shortfall);
  end

endmodule
