// tb_array_mult - checks the 6-bit two's complement array multiplier.
// All 4096 operand pairs with no noise must give the exact signed product;
// then random operand pairs with random noise events on the product bits must
// give the exact product with exactly those bits inverted.
module tb_array_mult;
  localparam int N = 6;
  logic signed [N-1:0] a, b;
  logic [2*N-1:0] fp;
  logic signed [2*N-1:0] p;
  int checks = 0, failures = 0;

  array_mult #(.N(N)) dut (.a, .b, .flip_p(fp), .p);

  initial begin
    fp = '0;
    for (int i = -32; i < 32; i++)
      for (int j = -32; j < 32; j++) begin
        a = N'(i); b = N'(j); #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    for (int n = 0; n < 2000; n++) begin
      int i, j;
      i = $urandom_range(63) - 32; j = $urandom_range(63) - 32;
      a = N'(i); b = N'(j); fp = (2*N)'($urandom); #1;
      checks++;
      if (p != ((2*N)'(i * j) ^ fp)) begin
        failures++;
        if (failures < 10) $display("FAIL noisy %0d * %0d flips %h = %h", i, j, fp, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
