// tb_nrd_div_m2: self-checking test of the Method 2 sequential divider at its
// full 64-bit width.
//
// Each division raises start for one clock, then waits for done and checks:
//   - quotient and remainder against the / and % operators (all-ones quotient
//     and the dividend as remainder for a zero divisor);
//   - the latency, exactly WIDTH+1 clocks from the start edge to done;
//   - that busy is high while the division runs and low once done;
//   - that the result stays held after done while no new start arrives;
//   - that a start raised while busy is ignored (the operands presented
//     with it do not disturb the running division).
// Operands are the worked examples 87/5, 305419896/1 and 59/20, corner cases
// and random values with randomised divisor length. A cycle watchdog ends a
// hung run with a failure.
module tb_nrd_div_m2;

  localparam int unsigned W = 64;

  logic clk = 1'b0;
  logic rst_n;
  logic start;
  logic [W-1:0] dividend, divisor;
  logic busy, done;
  logic [W-1:0] quotient, remainder;
  logic [W-1:0] exp_q, exp_r;
  int checks   = 0;
  int failures = 0;
  int cycles   = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  nrd_div_m2 #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .dividend(dividend), .divisor(divisor),
    .busy(busy), .done(done), .quotient(quotient), .remainder(remainder)
  );

  function automatic logic [W-1:0] rand64();
    return {$urandom, $urandom};
  endfunction

  task automatic expect_eq(input string what, input logic [W-1:0] got, input logic [W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  // Run one division; if poke_busy, also raise start with junk operands
  // halfway through.
  task automatic run_div(input logic [W-1:0] n, input logic [W-1:0] d, input bit poke_busy);
    int lat;
    @(negedge clk);
    dividend = n; divisor = d; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    dividend = rand64(); divisor = rand64();
    lat = 0;  // clock edges after the start edge
    checks++;
    if (!busy) begin failures++; $display("FAIL busy low after start"); end
    while (!done && lat < 4 * W) begin
      if (poke_busy && lat == W / 2 - 1) start = 1'b1;
      else start = 1'b0;
      @(negedge clk);
      lat++;
    end
    start = 1'b0;
    if (d == 0) begin exp_q = '1; exp_r = n; end
    else begin exp_q = n / d; exp_r = n % d; end
    expect_eq($sformatf("quotient %0d/%0d", n, d), quotient, exp_q);
    expect_eq($sformatf("remainder %0d/%0d", n, d), remainder, exp_r);
    checks++;
    if (lat != W + 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, W + 1);
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy high with done"); end
    // Results held after done.
    @(negedge clk);
    expect_eq("held quotient", quotient, exp_q);
    expect_eq("held remainder", remainder, exp_r);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; dividend = '0; divisor = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL not idle after reset"); end
    rst_n = 1'b1;
    run_div(64'd87, 64'd5, 1'b0);
    run_div(64'd305419896, 64'd1, 1'b0);
    run_div(64'd59, 64'd20, 1'b0);
    run_div(64'd0, 64'd9, 1'b0);
    run_div(64'd3, 64'd10, 1'b1);
    run_div('1, '1, 1'b0);
    run_div('1, 64'd1, 1'b1);
    run_div('1, 64'h8000_0000_0000_0000, 1'b0);
    run_div(64'd42, 64'd0, 1'b0);
    for (int i = 0; i < 300; i++) begin
      logic [W-1:0] n, d;
      n = rand64() >> ($urandom % 64);
      d = rand64() >> ($urandom % 64);
      if (d == 0) d = 1;
      run_div(n, d, (i % 5) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
