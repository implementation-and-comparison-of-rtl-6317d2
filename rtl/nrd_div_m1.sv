// nrd_div_m1: unsigned non-restoring divider, Method 1 (array form).
//
// The division is unrolled into WIDTH identical rows, one per quotient bit,
// from the most significant bit down. Each row follows the Method 1 steps:
//   - bring down the next dividend bit and attach it to the partial
//     remainder (the remainder is shifted left by one, the bit enters at the
//     bottom);
//   - if the partial remainder so far is not negative, subtract the divisor,
//     otherwise add it (the first row always subtracts, since the remainder
//     starts at zero);
//   - the quotient bit of the row is 1 when the new remainder is not
//     negative and 0 when it is negative.
// A negative remainder is never restored inside the array. After the last
// row one correction adder adds the divisor back if the final remainder is
// negative, so that 0 <= remainder < divisor.
//
// The partial remainder is WIDTH+1 bits (sign plus magnitude range). Every
// row uses an nrd_addsub instance; the correction is one more instance.
//
// Interface: dividend, divisor in; quotient, remainder out, all unsigned
// WIDTH-bit. Purely combinational: results are valid one propagation delay
// (WIDTH+1 chained adders) after the operands change. No clock, no
// handshake.
//
// From the design: the step sequence and the sign-based add/subtract choice,
// unsigned 64-bit operands. This design's own choices: the fully
// combinational unrolled structure, the closing remainder correction, and
// division by zero, which returns an all-ones quotient and the dividend as
// remainder (what the recurrence gives when the divisor is zero).
module nrd_div_m1 #(
  parameter int unsigned WIDTH = nrd_pkg::NRD_WIDTH
) (
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder
);

  localparam int unsigned RW = WIDTH + 1;  // partial remainder width, with sign

  logic [RW-1:0] divisor_x;
  // rem[i] is the partial remainder entering row i; rem[WIDTH] leaves the array.
  logic [RW-1:0] rem [WIDTH+1];

  assign divisor_x = {1'b0, divisor};
  assign rem[0]    = '0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_row
    logic [RW-1:0] shifted;
    logic          do_sub;

    // Bring down dividend bit WIDTH-1-i.
    assign shifted = {rem[i][RW-2:0], dividend[WIDTH-1-i]};
    // Sign of the remainder before this step chooses the operation.
    assign do_sub  = ~rem[i][RW-1];

    nrd_addsub #(.WIDTH(RW)) u_addsub (
      .a  (shifted),
      .b  (divisor_x),
      .sub(do_sub),
      .y  (rem[i+1])
    );

    assign quotient[WIDTH-1-i] = ~rem[i+1][RW-1];
  end

  // Final correction: add the divisor back to a negative remainder. The
  // corrected value lies in [0, divisor), so WIDTH bits of the sum suffice.
  nrd_addsub #(.WIDTH(WIDTH)) u_fix (
    .a  (rem[WIDTH][WIDTH-1:0]),
    .b  (rem[WIDTH][RW-1] ? divisor : '0),
    .sub(1'b0),
    .y  (remainder)
  );

endmodule
