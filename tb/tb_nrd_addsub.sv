// tb_nrd_addsub: self-checking test of the controlled adder/subtractor.
//
// Drives random 65-bit operands (and the corner values 0 and all-ones) with
// both settings of sub, and compares y against a + b or a - b computed in the
// testbench with 65-bit wrap-around arithmetic. A time watchdog ends the run
// with a failure if it ever hangs.
module tb_nrd_addsub;

  localparam int unsigned W = 65;

  logic [W-1:0] a, b, y, expected;
  logic         sub;
  int checks   = 0;
  int failures = 0;

  nrd_addsub #(.WIDTH(W)) dut (.a(a), .b(b), .sub(sub), .y(y));

  function automatic logic [W-1:0] rand65();
    return {1'($urandom), $urandom, $urandom};
  endfunction

  task automatic check_one(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic ts);
    a = ta; b = tb_; sub = ts;
    #1;
    expected = ts ? (ta - tb_) : (ta + tb_);
    checks++;
    if (y !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%0b y=%h expected=%h", ta, tb_, ts, y, expected);
    end
  endtask

  initial begin
    check_one('0, '0, 1'b0);
    check_one('0, '0, 1'b1);
    check_one('0, 65'd1, 1'b1);
    check_one('1, 65'd1, 1'b0);
    check_one('1, '1, 1'b1);
    check_one(65'd87, 65'd5, 1'b1);
    for (int i = 0; i < 2000; i++) check_one(rand65(), rand65(), 1'($urandom));
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
