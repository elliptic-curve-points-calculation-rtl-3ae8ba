// ecc_pkg: types and the step schedule shared by the GF(p) point adder.
//
// The point adder keeps every operand and intermediate value of one mixed-
// coordinate addition in a small register file.  reg_e names those
// registers; uop_t is the micro-operation word the controller issues at each
// step: one multiplication, and optionally one modular addition, one modular
// subtraction and one halving, each with its source and destination
// registers.  SCHEDULE holds the 11 steps.
//
// The formulas (affine P1 = (X1,Y1), Jacobian P2 = (X2,Y2,Z2)):
//   l1 = X1*Z2^2   l3 = l1 - X2   l4 = Y1*Z2^3   l6 = l4 - Y2
//   l7 = l1 + X2   l8 = l4 + Y2   Z3 = Z2*l3
//   X3 = l6^2 - l7*l3^2           l9 = l7*l3^2 - 2*X3
//   Y3 = (l9*l6 - l8*l3^3) / 2
// The grouping of operations into steps follows the published schedule.  In
// it, step 9 forms l9/2 directly, as (l7*l3^2)/2 - X3, and step 10
// multiplies l9/2 by l6.  So a halving of l6 is not needed and none is
// issued.  The schedule prints the step-8 subtraction X3 = l6^2 - l7*l3^2 in
// its addition column; here it runs on the subtractor, which is free in that
// step.
package ecc_pkg;

  typedef enum logic [4:0] {
    R_X1, R_Y1, R_X2, R_Y2, R_Z2,       // inputs
    R_Z2SQ,                             // Z2^2
    R_L1,                               // l1 = X1*Z2^2
    R_Z2CU,                             // Z2^3
    R_L7, R_L3,                         // l1 + X2, l1 - X2
    R_L4,                               // Y1*Z2^3
    R_L8, R_L6,                         // l4 + Y2, l4 - Y2
    R_L3SQ,                             // l3^2
    R_L6SQ,                             // l6^2
    R_L8H,                              // l8/2
    R_L7L3SQ,                           // l7*l3^2
    R_X3,                               // l6^2 - l7*l3^2
    R_L3CU,                             // l3^3
    R_T9H,                              // (l7*l3^2)/2
    R_L9H,                              // l9/2
    R_M9,                               // (l8/2)*l3^3
    R_M10,                              // (l9/2)*l6
    R_Z3,                               // Z2*l3
    R_Y3                                // (l9/2)*l6 - (l8/2)*l3^3
  } reg_e;

  localparam int unsigned NUM_REGS = 25;
  localparam int unsigned NUM_STEPS = 11;

  // One two-operand operation of a step.
  typedef struct packed {
    logic en;
    reg_e a;
    reg_e b;
    reg_e d;
  } op_t;

  // Micro-operation word of one step.  The multiplication is always present;
  // the halving uses only the a operand.
  typedef struct packed {
    op_t mul;
    op_t add;
    op_t sub;
    op_t shf;
  } uop_t;

  localparam op_t NOP = '{en: 1'b0, a: R_X1, b: R_X1, d: R_X1};

  function automatic op_t op(input reg_e a, input reg_e b, input reg_e d);
    return '{en: 1'b1, a: a, b: b, d: d};
  endfunction

  function automatic uop_t step_uop(input int unsigned s);
    uop_t u;
    u = '{mul: NOP, add: NOP, sub: NOP, shf: NOP};
    case (s)
      0:  u.mul = op(R_Z2,   R_Z2,     R_Z2SQ);
      1:  u.mul = op(R_X1,   R_Z2SQ,   R_L1);
      2: begin
          u.mul = op(R_Z2SQ, R_Z2,     R_Z2CU);
          u.add = op(R_L1,   R_X2,     R_L7);
          u.sub = op(R_L1,   R_X2,     R_L3);
        end
      3:  u.mul = op(R_Y1,   R_Z2CU,   R_L4);
      4: begin
          u.mul = op(R_L3,   R_L3,     R_L3SQ);
          u.add = op(R_L4,   R_Y2,     R_L8);
          u.sub = op(R_L4,   R_Y2,     R_L6);
        end
      5: begin
          u.mul = op(R_L6,   R_L6,     R_L6SQ);
          u.shf = op(R_L8,   R_L8,     R_L8H);
        end
      6:  u.mul = op(R_L7,   R_L3SQ,   R_L7L3SQ);
      7: begin
          u.mul = op(R_L3SQ, R_L3,     R_L3CU);
          u.sub = op(R_L6SQ, R_L7L3SQ, R_X3);
          u.shf = op(R_L7L3SQ, R_L7L3SQ, R_T9H);
        end
      8: begin
          u.mul = op(R_L8H,  R_L3CU,   R_M9);
          u.sub = op(R_T9H,  R_X3,     R_L9H);
        end
      9:  u.mul = op(R_L9H,  R_L6,     R_M10);
      default: begin
          u.mul = op(R_Z2,   R_L3,     R_Z3);
          u.sub = op(R_M10,  R_M9,     R_Y3);
        end
    endcase
    return u;
  endfunction

endpackage
