// tb_nrd_div_m1: self-checking test of the Method 1 array divider at its
// full 64-bit width.
//
// Applies the worked examples 87/5, 305419896/1 and 59/20, corner cases
// (zero dividend, dividend below divisor, equal operands, all-ones operands,
// divisor of 1 and of 2**63, divisor zero) and random operands whose divisor
// length is also randomised so that quotients of every size occur. The
// expected quotient and remainder come from the language's own / and %
// operators; for a zero divisor the expected result is an all-ones quotient
// and the dividend as remainder. It also checks the invariant
// quotient*divisor + remainder == dividend. A watchdog ends a hung run.
module tb_nrd_div_m1;

  localparam int unsigned W = 64;

  logic [W-1:0] dividend, divisor, quotient, remainder;
  logic [W-1:0] exp_q, exp_r;
  int checks   = 0;
  int failures = 0;

  nrd_div_m1 #(.WIDTH(W)) dut (
    .dividend(dividend), .divisor(divisor),
    .quotient(quotient), .remainder(remainder)
  );

  function automatic logic [W-1:0] rand64();
    return {$urandom, $urandom};
  endfunction

  task automatic check_div(input logic [W-1:0] n, input logic [W-1:0] d);
    dividend = n; divisor = d;
    #1;
    if (d == 0) begin
      exp_q = '1;
      exp_r = n;
    end else begin
      exp_q = n / d;
      exp_r = n % d;
    end
    checks++;
    if (quotient !== exp_q || remainder !== exp_r) begin
      failures++;
      $display("FAIL %0d / %0d: q=%0d r=%0d expected q=%0d r=%0d",
               n, d, quotient, remainder, exp_q, exp_r);
    end
    if (d != 0) begin
      checks++;
      if (quotient * d + remainder !== n || remainder >= d) begin
        failures++;
        $display("FAIL invariant %0d / %0d", n, d);
      end
    end
  endtask

  initial begin
    check_div(64'd87, 64'd5);
    check_div(64'd305419896, 64'd1);
    check_div(64'd59, 64'd20);
    check_div(64'd0, 64'd7);
    check_div(64'd3, 64'd10);
    check_div(64'd12345, 64'd12345);
    check_div('1, '1);
    check_div('1, 64'd1);
    check_div('1, 64'd2);
    check_div('1, 64'h8000_0000_0000_0000);
    check_div(64'h8000_0000_0000_0000, 64'd3);
    check_div(64'd42, 64'd0);
    for (int i = 0; i < 3000; i++) begin
      logic [W-1:0] n, d;
      n = rand64() >> ($urandom % 64);
      d = rand64() >> ($urandom % 64);
      if (d == 0) d = 1;
      check_div(n, d);
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
