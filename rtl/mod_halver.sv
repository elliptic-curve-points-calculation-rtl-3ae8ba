// mod_halver: modular halving, z = a / 2 mod n for odd n and a < n.
//
// The point-addition schedule has a "shift" unit that forms l8/2 and
// (l7*l3^2)/2 modulo p.  The published design names the operation but not
// its circuit.  Here it is the usual one.  An even a is shifted right by one
// bit.  An odd a first has n added, which makes the sum even without changing
// its residue, and that (N+1)-bit sum is then shifted right.  The result is
// below n.
//
// Timing: start is sampled at a clock edge with a and n.  z and a one-cycle
// done pulse appear in the next cycle, and z holds until the next start.
module mod_halver #(
  parameter int unsigned N = 92
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] n,
  output logic         done,
  output logic [N-1:0] z
);
  logic [N:0] sum;

  always_comb sum = a[0] ? ({1'b0, a} + {1'b0, n}) : {1'b0, a};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done <= 1'b0;
      z    <= '0;
    end else begin
      done <= start;
      if (start) z <= N'(sum >> 1);
    end
  end
endmodule
