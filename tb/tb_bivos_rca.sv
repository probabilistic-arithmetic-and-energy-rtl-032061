// tb_bivos_rca - checks the 12-bit ripple-carry adder of PCMOS full adders.
//  1. no noise: {cout, sum} must equal a + b + cin for random operands;
//  2. a noise event on one sum node must invert exactly that result bit;
//  3. a noise event on the carry out of bit j must move the result by
//     +2^(j+1) if that carry was 0 and by -2^(j+1) if it was 1 (the flipped
//     carry ripples on through the exact upper bits).
module tb_bivos_rca;
  localparam int W = 12;
  logic [W-1:0] a, b, fs, fc, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  bivos_rca #(.WIDTH(W)) dut (.a, .b, .cin, .flip_s(fs), .flip_c(fc), .sum, .cout);

  task automatic check(longint expected, string what);
    longint got;
    got = longint'({cout, sum});
    checks++;
    if (got != expected) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d cin=%0b fs=%h fc=%h got=%0d exp=%0d",
               what, a, b, cin, fs, fc, got, expected);
    end
  endtask

  initial begin
    longint exact, mask;
    for (int n = 0; n < 3000; n++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      if (n == 0) begin a = '1; b = '1; cin = 1; end      // longest carry chain
      if (n == 1) begin a = '1; b = '0; cin = 1; end
      exact = longint'(a) + longint'(b) + longint'(cin);
      mask  = (longint'(1) << (W + 1)) - 1;
      fs = '0; fc = '0; #1;
      check(exact, "exact");
      begin
        int j;
        j = $urandom_range(W - 1);
        fs = W'(1) << j; #1;
        check(exact ^ (longint'(1) << j), "sum-flip");
        fs = '0;
        j = $urandom_range(W - 1);
        fc = W'(1) << j; #1;
        begin
          longint low, carry;
          low   = longint'(a & ((W'(1) << j << 1) - 1)) + longint'(b & ((W'(1) << j << 1) - 1)) + longint'(cin);
          if (j == W - 1) low = exact;
          carry = (low >> (j + 1)) & 1;
          check((carry != 0 ? exact - (longint'(1) << (j + 1)) : exact + (longint'(1) << (j + 1))) & mask,
                "carry-flip");
        end
        fc = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
