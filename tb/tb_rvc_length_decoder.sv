// tb_rvc_length_decoder: exhaustive self-checking test of the length decoder.
// All 32 values of the low five bits are applied; the expected class is
// worked out from the rule that 11 in bits 1:0 means at least 32 bits and
// 11111 in bits 4:0 means longer than 32 bits.
module tb_rvc_length_decoder;

  logic [4:0] low_i;
  logic       is16_o, is32_o, islong_o;

  rvc_length_decoder dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n16 = 0, n32 = 0, nlong = 0;
    for (int v = 0; v < 32; v++) begin
      logic e16, e32, elong;
      low_i = 5'(v);
      #1;
      e16   = (v % 4) != 3;
      elong = (v == 31);
      e32   = !e16 && !elong;
      checks++;
      if ({is16_o, is32_o, islong_o} !== {e16, e32, elong}) begin
        failures++;
        $display("FAIL low=%05b got %b%b%b expected %b%b%b", low_i,
                 is16_o, is32_o, islong_o, e16, e32, elong);
      end
      n16 += int'(is16_o); n32 += int'(is32_o); nlong += int'(islong_o);
    end
    // 24 of the 32 five-bit opcodes are 16-bit, 7 are 32-bit, 1 is longer
    checks++;
    if (n16 != 24 || n32 != 7 || nlong != 1) begin
      failures++;
      $display("FAIL class counts %0d/%0d/%0d", n16, n32, nlong);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
