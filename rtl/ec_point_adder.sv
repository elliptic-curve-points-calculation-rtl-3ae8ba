// ec_point_adder: GF(p) elliptic-curve point adder in mixed coordinates,
// built on the Krestenson-matrix modular multiplier.
//
// It adds an affine point P1 = (x1, y1) to a Jacobian point
// P2 = (x2, y2, z2), that is x = X/Z^2 and y = Y/Z^3, and returns the
// Jacobian sum (x3, y3, z3).  The 18 field operations of one addition run on
// four independent units that share a register file:
//   kr_multiplier   a*b mod p, 4W+1 clocks (W = ceil(N/WORD) words)
//   mod_adder       a+b mod p, W+3 clocks
//   mod_subtractor  a-b mod p, W+3 clocks
//   mod_halver      a/2 mod p, 1 clock
// pa_controller issues the published 11-step schedule.  Every step holds
// exactly one multiplication, and the additions, subtractions and halvings
// of the step run alongside it.  kr_matrix holds the table 2^k mod p that
// the multiplier reads.  It is rebuilt only when a new modulus is loaded.
//
// The register file writes through.  A result written in a cycle is already
// seen by reads in that same cycle.  That lets the next step start in the
// cycle the previous multiplication completes, even when it uses that
// product.
//
// Interface and timing:
//   mod_load/modulus  load an odd prime p.  mod_ready rises 2N-1 clocks
//                     after the load clock.
//   start             sampled when !busy && mod_ready, with x1..z2 (< p).
//   done              one-cycle pulse 11*(4W+1)+1 cycles after start, 188
//                     cycles at the 92-bit default.  x3, y3 and z3 are valid
//                     from that cycle until the next start.
// P1 = +-P2 and the point at infinity are not handled.  Defaults N = 92 and
// WORD = 23 are the published 92-bit configuration.
module ec_point_adder
  import ecc_pkg::*;
#(
  parameter int unsigned N    = 92,
  parameter int unsigned WORD = 23
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mod_load,
  input  logic [N-1:0] modulus,
  output logic         mod_ready,
  input  logic         start,
  input  logic [N-1:0] x1,
  input  logic [N-1:0] y1,
  input  logic [N-1:0] x2,
  input  logic [N-1:0] y2,
  input  logic [N-1:0] z2,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] x3,
  output logic [N-1:0] y3,
  output logic [N-1:0] z3
);
  typedef logic [N-1:0] word_t;

  word_t p;
  word_t tbl [2*N-1];

  logic  load_inputs, issue, ctl_busy;
  uop_t  uop, uop_q;

  logic  mul_done, add_done, sub_done, shf_done;
  word_t mul_z, add_z, sub_z, shf_z;

  word_t rf [NUM_REGS];

  // Write-through read: a result being written this cycle is forwarded.
  function automatic word_t rd(input reg_e r);
    if (mul_done && uop_q.mul.d == r) return mul_z;
    if (add_done && uop_q.add.d == r) return add_z;
    if (sub_done && uop_q.sub.d == r) return sub_z;
    if (shf_done && uop_q.shf.d == r) return shf_z;
    return rf[r];
  endfunction

  kr_matrix #(.N(N)) u_matrix (
    .clk, .rst_n, .load(mod_load), .modulus, .n(p), .tbl, .ready(mod_ready)
  );

  pa_controller u_ctl (
    .clk, .rst_n, .start(start && mod_ready), .mul_done,
    .load_inputs, .issue, .uop, .uop_q, .busy(ctl_busy), .done
  );

  kr_multiplier #(.N(N), .WORD(WORD)) u_mul (
    .clk, .rst_n, .start(issue && uop.mul.en),
    .a(rd(uop.mul.a)), .b(rd(uop.mul.b)), .n(p), .tbl,
    .done(mul_done), .z(mul_z)
  );

  mod_adder #(.N(N), .WORD(WORD)) u_add (
    .clk, .rst_n, .start(issue && uop.add.en),
    .a(rd(uop.add.a)), .b(rd(uop.add.b)), .n(p),
    .done(add_done), .z(add_z)
  );

  mod_subtractor #(.N(N), .WORD(WORD)) u_sub (
    .clk, .rst_n, .start(issue && uop.sub.en),
    .a(rd(uop.sub.a)), .b(rd(uop.sub.b)), .n(p),
    .done(sub_done), .z(sub_z)
  );

  mod_halver #(.N(N)) u_shf (
    .clk, .rst_n, .start(issue && uop.shf.en),
    .a(rd(uop.shf.a)), .n(p),
    .done(shf_done), .z(shf_z)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_REGS; r++) rf[r] <= '0;
    end else begin
      if (load_inputs) begin
        rf[R_X1] <= x1;
        rf[R_Y1] <= y1;
        rf[R_X2] <= x2;
        rf[R_Y2] <= y2;
        rf[R_Z2] <= z2;
      end
      if (mul_done) rf[uop_q.mul.d] <= mul_z;
      if (add_done) rf[uop_q.add.d] <= add_z;
      if (sub_done) rf[uop_q.sub.d] <= sub_z;
      if (shf_done) rf[uop_q.shf.d] <= shf_z;
    end
  end

  assign busy = ctl_busy;
  assign x3   = rd(R_X3);
  assign y3   = rd(R_Y3);
  assign z3   = rd(R_Z3);
endmodule
