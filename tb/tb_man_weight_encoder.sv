// tb_man_weight_encoder - exhaustive test of the weight rounding.
//
// All 256 signed weights are applied. For each, the encoded sign and the two
// shift factors are turned back into a value and compared with the reference
// rounding (each 4-bit unit of |w| to the nearest of {0,1,2,4,8}, ties up).
module tb_man_weight_encoder;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] w;
  man_wgt_t   enc;

  man_weight_encoder dut (.w(w), .enc(enc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++) begin
      int unsigned got;
      w = 8'(i);
      #1;
      got = (enc.hi_nz ? (16 << enc.hi_sh) : 0) + (enc.lo_nz ? (1 << enc.lo_sh) : 0);
      checks += 2;
      if (got != rounded_mag(i)) begin
        failures++;
        $display("FAIL w=%0d magnitude %0d expected %0d", i, got, rounded_mag(i));
      end
      if (enc.neg != (i < 0)) begin
        failures++;
        $display("FAIL w=%0d sign", i);
      end
    end
    // a few values worked by hand
    w = 8'd105; #1; checks++;   // 0110_1001 -> 8*16 + 8 = 136
    if ((enc.hi_nz ? (16 << enc.hi_sh) : 0) + (enc.lo_nz ? (1 << enc.lo_sh) : 0) != 136) failures++;
    w = 8'd35;  #1; checks++;   // 0010_0011 -> 32 + 4 = 36
    if ((enc.hi_nz ? (16 << enc.hi_sh) : 0) + (enc.lo_nz ? (1 << enc.lo_sh) : 0) != 36) failures++;
    w = -8'd20; #1; checks++;   // |w| = 0001_0100 -> 16 + 4, negative
    if (!enc.neg || (16 << enc.hi_sh) != 16 || (1 << enc.lo_sh) != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
