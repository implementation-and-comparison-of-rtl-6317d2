// tb_nrd_top: end-to-end test of the whole design at its default parameters
// (64-bit operands), with no parameter override on the top.
//
// For every operand pair the testbench presents dividend and divisor, checks
// the combinational Method 1 result, launches a Method 2 division with start,
// waits for done, checks the Method 2 result and its WIDTH+1-clock latency,
// and checks that both methods agree. The expected values come from the /
// and % operators.
//
// It also counts how often each mechanism of non-restoring division was
// exercised, worked out from the expected quotient (the operation of step j
// is a subtraction when j is the first step or quotient bit j-1 was 1, an
// addition otherwise; the closing correction is needed when the last
// quotient bit is 0):
//   subtract steps, add steps (a negative remainder carried on without
//   restoring), divisions needing the final remainder correction, divisions
//   not needing it, and division by zero.
// A mechanism that never occurred counts as a failure. The first operands
// are the worked examples 87/5, 305419896/1 and 59/20. A cycle watchdog ends
// a hung run.
module tb_nrd_top;

  localparam int unsigned W = nrd_pkg::NRD_WIDTH;

  logic clk = 1'b0;
  logic rst_n;
  logic start;
  logic [W-1:0] dividend, divisor;
  logic [W-1:0] m1_q, m1_r, m2_q, m2_r;
  logic m2_busy, m2_done;
  logic [W-1:0] exp_q, exp_r;
  int checks   = 0;
  int failures = 0;
  int cycles   = 0;
  longint n_sub_steps = 0, n_add_steps = 0;
  int n_corrected = 0, n_uncorrected = 0, n_div_zero = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  nrd_top dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .dividend(dividend), .divisor(divisor),
    .m1_quotient(m1_q), .m1_remainder(m1_r),
    .m2_busy(m2_busy), .m2_done(m2_done),
    .m2_quotient(m2_q), .m2_remainder(m2_r)
  );

  function automatic logic [W-1:0] rand64();
    return {$urandom, $urandom};
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_case(input logic [W-1:0] n, input logic [W-1:0] d);
    int lat;
    if (d == 0) begin exp_q = '1; exp_r = n; n_div_zero++; end
    else begin exp_q = n / d; exp_r = n % d; end
    // Mechanism counts from the expected quotient digits.
    for (int j = W - 1; j >= 0; j--) begin
      if (j == W - 1 || exp_q[j+1]) n_sub_steps++;
      else n_add_steps++;
    end
    if (exp_q[0]) n_uncorrected++;
    else n_corrected++;

    @(negedge clk);
    dividend = n; divisor = d; start = 1'b1;
    #1;
    check($sformatf("M1 %0d / %0d -> q=%0d r=%0d", n, d, m1_q, m1_r),
          m1_q == exp_q && m1_r == exp_r);
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    while (!m2_done && lat < 4 * W) begin
      @(negedge clk);
      lat++;
    end
    check($sformatf("M2 %0d / %0d -> q=%0d r=%0d", n, d, m2_q, m2_r),
          m2_q == exp_q && m2_r == exp_r);
    check($sformatf("M2 latency %0d", lat), lat == W + 1);
    check("M1 and M2 agree", m1_q == m2_q && m1_r == m2_r);
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; dividend = '0; divisor = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_case(64'd87, 64'd5);
    run_case(64'd305419896, 64'd1);
    run_case(64'd59, 64'd20);
    run_case(64'd7, 64'd0);
    run_case('1, 64'd3);
    for (int i = 0; i < 200; i++) begin
      logic [W-1:0] n, d;
      n = rand64() >> ($urandom % 64);
      d = rand64() >> ($urandom % 64);
      if (d == 0) d = 1;
      run_case(n, d);
    end
    $display("mechanisms: subtract steps=%0d add steps=%0d corrected=%0d uncorrected=%0d div-by-zero=%0d",
             n_sub_steps, n_add_steps, n_corrected, n_uncorrected, n_div_zero);
    check("subtract step exercised", n_sub_steps > 0);
    check("add step exercised", n_add_steps > 0);
    check("final correction exercised", n_corrected > 0);
    check("no-correction path exercised", n_uncorrected > 0);
    check("division by zero exercised", n_div_zero > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
