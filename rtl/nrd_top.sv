// nrd_top: the two non-restoring dividers side by side on shared operands.
//
// The same unsigned WIDTH-bit dividend and divisor feed the Method 1 array
// divider (nrd_div_m1, combinational) and the Method 2 sequential divider
// (nrd_div_m2, one quotient bit per clock). The two are independent
// implementations of the same function and are meant to be compared, so
// each brings out its own results.
//
// Interface and timing:
//   m1_quotient / m1_remainder follow dividend and divisor combinationally.
//   start launches a Method 2 division on the operands present at that edge;
//   m2_done pulses WIDTH+1 clocks later, after which m2_quotient and
//   m2_remainder hold the result until the next start. m2_busy is high in
//   between. rst_n is asynchronous and active low.
//
// From the design: two implementations of 64-bit non-restoring division
// driven by the same test operands. This design's own choice: sharing the
// operand inputs and bringing both result sets out at the top.
module nrd_top #(
  parameter int unsigned WIDTH = nrd_pkg::NRD_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] m1_quotient,
  output logic [WIDTH-1:0] m1_remainder,
  output logic             m2_busy,
  output logic             m2_done,
  output logic [WIDTH-1:0] m2_quotient,
  output logic [WIDTH-1:0] m2_remainder
);

  nrd_div_m1 #(.WIDTH(WIDTH)) u_m1 (
    .dividend (dividend),
    .divisor  (divisor),
    .quotient (m1_quotient),
    .remainder(m1_remainder)
  );

  nrd_div_m2 #(.WIDTH(WIDTH)) u_m2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .dividend (dividend),
    .divisor  (divisor),
    .busy     (m2_busy),
    .done     (m2_done),
    .quotient (m2_quotient),
    .remainder(m2_remainder)
  );

endmodule
