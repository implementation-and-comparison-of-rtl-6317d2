// nrd_addsub: controlled adder/subtractor, the one arithmetic unit that a
// non-restoring divider step needs.
//
// With sub = 1 it returns a - b, formed as a + ~b + 1 (the subtrahend is
// replaced by its two's complement); with sub = 0 it returns a + b. The
// result wraps modulo 2**WIDTH, which is what the divider wants: its partial
// remainder is kept in WIDTH bits including the sign, and the true value
// always fits after the operation.
//
// Interface: a, b, sub in; y out. Purely combinational, no clock.
// Following the design: one shared add/subtract unit driven by a control bit,
// with subtraction done in two's complement. The adder structure (a plain
// behavioural '+', left to synthesis) is this design's own choice.
module nrd_addsub #(
  parameter int unsigned WIDTH = 65
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] b_eff;

  always_comb begin
    b_eff = b ^ {WIDTH{sub}};
    y     = a + b_eff + WIDTH'(sub);
  end

endmodule
