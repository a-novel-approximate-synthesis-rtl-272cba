// tb_approx_addsub - self-checking test of the approximate adder/subtractor.
//
// Five instances with different widths and approximate-part sizes (including
// AP = 0, which must be exact, and AP = N) are driven with random operands
// and random add/subtract, and compared with the reference model. The worked
// example 0110_1111 + 0001_1111 = 0111_1111 (N = 8, AP = 4, error 15) is
// checked directly, and for additions the error bound 2^AP - 1 is checked.
module tb_approx_addsub;
  import approx_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, y8;   logic s8;
  logic [27:0] a28, b28, y28e, y28a; logic s28;
  logic [15:0] a16, b16, y16; logic s16;
  logic [19:0] a20, b20, y20; logic s20;

  approx_addsub #(.N(8),  .AP(4))  u8   (.a(a8),  .b(b8),  .sub(s8),  .y(y8));
  approx_addsub #(.N(28), .AP(0))  u28e (.a(a28), .b(b28), .sub(s28), .y(y28e));
  approx_addsub #(.N(28), .AP(11)) u28a (.a(a28), .b(b28), .sub(s28), .y(y28a));
  approx_addsub #(.N(16), .AP(5))  u16  (.a(a16), .b(b16), .sub(s16), .y(y16));
  approx_addsub #(.N(20), .AP(20)) u20  (.a(a20), .b(b20), .sub(s20), .y(y20));

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example
    a8 = 8'b0110_1111; b8 = 8'b0001_1111; s8 = 0;
    #1 check("example", y8, 8'b0111_1111);
    check("example error", 64'(8'h6F + 8'h1F) - y8, 15);
    // worst case of the approximate part: both low parts all ones
    a8 = 8'h0F; b8 = 8'h0F; #1 check("worst case", y8, 8'h0F);

    for (int i = 0; i < 4000; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); s8 = 1'($urandom);
      a28 = 28'($urandom); b28 = 28'($urandom); s28 = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); s16 = 1'($urandom);
      a20 = 20'($urandom); b20 = 20'($urandom); s20 = 1'($urandom);
      #1;
      check("N8 AP4",   y8,   addsub(a8, b8, s8, 8, 4));
      check("N28 AP0",  y28e, addsub(a28, b28, s28, 28, 0));
      check("N28 exact", y28e, s28 ? 28'(a28 - b28) : 28'(a28 + b28));
      check("N28 AP11", y28a, addsub(a28, b28, s28, 28, 11));
      check("N16 AP5",  y16,  addsub(a16, b16, s16, 16, 5));
      check("N20 AP20", y20,  addsub(a20, b20, s20, 20, 20));
      if (!s28) begin
        // exact sum minus approximate sum lies in [0, 2^AP - 1] (mod 2^28)
        checks++;
        if (28'(a28 + b28 - y28a) > 28'(2**11 - 1)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
