// nrd_pkg: constants and types shared by the non-restoring dividers.
//
// NRD_WIDTH is the operand width of the design, 64 bits for both the
// dividend and the divisor, as the design is specified. The partial
// remainder carries one extra bit for its sign, so it is NRD_WIDTH+1 bits
// wide. nrd_m2_state_t is the state encoding of the sequential (Method 2)
// divider's controller; the encoding itself is a choice of this design.
package nrd_pkg;

  // Operand width of dividend, divisor, quotient and remainder.
  parameter int unsigned NRD_WIDTH = 64;

  // Controller states of the sequential divider (nrd_div_m2).
  typedef enum logic [1:0] {
    M2_IDLE = 2'd0,  // waiting for start, results of the last division held
    M2_RUN  = 2'd1,  // one shift and add/subtract per clock, one quotient bit each
    M2_FIX  = 2'd2   // final remainder correction (add M back if A < 0)
  } nrd_m2_state_t;

endpackage
