// nrd_div_m2: unsigned non-restoring divider, Method 2 (sequential, one
// quotient bit per clock).
//
// Three registers hold the division, as in the classic A/Q/M arrangement:
//   A  partial remainder, WIDTH+1 bits with sign, cleared to 0 at start;
//   Q  loaded with the dividend, shifted left one bit per step while the
//      quotient bits enter at its bottom, so it holds the quotient at the end;
//   M  the divisor.
// Each RUN clock shifts the pair {A,Q} left by one and then, looking only at
// the sign bit of A before the shift, subtracts M (A >= 0) or adds M (A < 0)
// with the single shared nrd_addsub unit. The new quotient bit Q[0] is the
// inverse of the sign of the new A. There is one decision and one
// add/subtract per quotient bit and no restoring step inside the loop. After
// WIDTH steps one FIX clock adds M back if A is negative, so the remainder
// satisfies 0 <= remainder < divisor.
//
// Interface and timing:
//   start     one-cycle request, accepted only while busy is low; operands are
//             sampled on the same clock edge.
//   busy      high from the clock after start until the result is ready.
//   done      one-cycle pulse; quotient/remainder are valid from then on and
//             held until the next start.
//   With start sampled at edge 0, the WIDTH steps take edges 1..WIDTH, the
//   correction edge WIDTH+1, and done is high right after edge WIDTH+1:
//   WIDTH+1 clock cycles per division (65 for 64-bit operands).
//   rst_n is an asynchronous, active-low reset that clears all registers.
//
// From the design: the A/Q/M registers, A starting at 0, the sign of A
// choosing add or subtract, one shared adder/subtractor. This design's own
// choices: the start/busy/done handshake, the separate correction cycle, the
// reset style, and division by zero, which returns an all-ones quotient and
// the dividend as remainder.
module nrd_div_m2
  import nrd_pkg::*;
#(
  parameter int unsigned WIDTH = nrd_pkg::NRD_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder
);

  localparam int unsigned RW = WIDTH + 1;
  localparam int unsigned CW = $clog2(WIDTH + 1);

  nrd_m2_state_t state;
  logic [RW-1:0] reg_a;
  logic [WIDTH-1:0] reg_q;
  logic [WIDTH-1:0] reg_m;
  logic [CW-1:0] count;

  // Shared adder/subtractor and its operand selection.
  logic [RW-1:0] au_a, au_b, au_y;
  logic          au_sub;

  always_comb begin
    if (state == M2_FIX) begin
      // Correction: A + M when A is negative, A + 0 otherwise.
      au_a   = reg_a;
      au_b   = reg_a[RW-1] ? {1'b0, reg_m} : '0;
      au_sub = 1'b0;
    end else begin
      // Step: shift {A,Q} left, then subtract M if A was >= 0, add if < 0.
      au_a   = {reg_a[RW-2:0], reg_q[WIDTH-1]};
      au_b   = {1'b0, reg_m};
      au_sub = ~reg_a[RW-1];
    end
  end

  nrd_addsub #(.WIDTH(RW)) u_addsub (
    .a  (au_a),
    .b  (au_b),
    .sub(au_sub),
    .y  (au_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M2_IDLE;
      reg_a <= '0;
      reg_q <= '0;
      reg_m <= '0;
      count <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        M2_IDLE: begin
          if (start) begin
            reg_a <= '0;
            reg_q <= dividend;
            reg_m <= divisor;
            count <= '0;
            state <= M2_RUN;
          end
        end
        M2_RUN: begin
          reg_a <= au_y;
          reg_q <= {reg_q[WIDTH-2:0], ~au_y[RW-1]};
          count <= count + 1'b1;
          if (count == CW'(WIDTH - 1)) state <= M2_FIX;
        end
        M2_FIX: begin
          reg_a <= au_y;
          done  <= 1'b1;
          state <= M2_IDLE;
        end
        default: state <= M2_IDLE;
      endcase
    end
  end

  assign busy      = (state != M2_IDLE);
  assign quotient  = reg_q;
  assign remainder = reg_a[WIDTH-1:0];

  // done only ever follows a correction cycle.
  a_done_after_fix: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> $past(state) == M2_FIX);
  // The controller leaves RUN only after the last of the WIDTH steps.
  a_run_count: assert property (@(posedge clk) disable iff (!rst_n)
    (state == M2_FIX) |-> $past(count) == CW'(WIDTH - 1));

endmodule
