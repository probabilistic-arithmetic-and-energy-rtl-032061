// tb_pcmos_fa - exhaustive check of the PCMOS full adder: all 32 combinations
// of a, b, carry-in and the two noise inputs, against a + b + ci computed with
// integers and the flips applied to the sum and carry afterwards.
module tb_pcmos_fa;
  logic a, b, ci, fs, fc, s, co;
  int checks = 0, failures = 0;

  pcmos_fa dut (.a, .b, .ci, .flip_s(fs), .flip_c(fc), .s, .co);

  initial begin
    for (int v = 0; v < 32; v++) begin
      int total;
      {fc, fs, ci, b, a} = 5'(v);
      #1;
      total = int'(a) + int'(b) + int'(ci);
      checks++;
      if (s !== (1'(total % 2) ^ fs) || co !== (1'(total / 2) ^ fc)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b fs=%0b fc=%0b -> s=%0b co=%0b", a, b, ci, fs, fc, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
