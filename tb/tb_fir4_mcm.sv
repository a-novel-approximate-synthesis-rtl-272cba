// tb_fir4_mcm - self-checking test of the FIR multiplier block.
//
// The approximate block (AP {11,16,14}) is compared with a reference built from
// the reference adder model along the same decomposition; exact copies (all
// AP = 0) must produce x*105, x*831, x*621 and x*815 for every one of the
// 32768 inputs, read as unsigned (default) and as signed (IN_SIGNED = 1).
module tb_fir4_mcm;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [14:0] x;
  logic [27:0] a105, a831, a621, a815;
  logic [27:0] e105, e831, e621, e815;
  logic [27:0] s105, s831, s621, s815;

  fir4_mcm #(.AP(AP_FIR4)) ua (.x(x), .p105(a105), .p831(a831), .p621(a621), .p815(a815));
  fir4_mcm #(.AP('0))      ue (.x(x), .p105(e105), .p831(e831), .p621(e621), .p815(e815));
  fir4_mcm #(.AP('0), .IN_SIGNED(1'b1)) us (.x(x), .p105(s105), .p831(s831), .p621(s621), .p815(s815));

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s x=%0d: got %h expected %h", what, $signed(x), got, exp);
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
    for (int i = 0; i < 32768; i++) begin
      longint xs, xsg;
      longint unsigned xe, r15, r129, r105, r831, r815, r621;
      x = 15'(i);
      xs = i;
      xsg = sext(64'(i), 15);
      xe = 64'(xs) & mask(28);
      r15  = addsub(xe << 4, xe, 1, 28, 11);
      r129 = addsub(xe << 7, xe, 0, 28, 11);
      r105 = addsub(r15 << 3, r15, 1, 28, 16);
      r831 = addsub(r15 << 6, r129, 1, 28, 16);
      r815 = addsub(r831, xe << 4, 1, 28, 14);
      r621 = addsub(r831, r105 << 1, 1, 28, 14);
      #1;
      check("exact 105", e105, 64'(xs * 105) & mask(28));
      check("exact 831", e831, 64'(xs * 831) & mask(28));
      check("exact 621", e621, 64'(xs * 621) & mask(28));
      check("exact 815", e815, 64'(xs * 815) & mask(28));
      check("signed 105", s105, 64'(xsg * 105) & mask(28));
      check("signed 831", s831, 64'(xsg * 831) & mask(28));
      check("signed 621", s621, 64'(xsg * 621) & mask(28));
      check("signed 815", s815, 64'(xsg * 815) & mask(28));
      if (i % 7 == 0) begin
        check("approx 105", a105, r105);
        check("approx 831", a831, r831);
        check("approx 621", a621, r621);
        check("approx 815", a815, r815);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
