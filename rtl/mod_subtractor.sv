// mod_subtractor: word-serial modular subtractor, z = (a - b) mod n for
// a, b < n.
//
// It mirrors mod_adder.  One word of WORD bits is handled per clock, least
// significant first.  The clock forms D = a - b with a borrow chain and, at
// the same time, D + n with a carry chain fed by the fresh word of D.  When
// the subtraction borrows out of the top word, a < b and the result is
// D + n (mod 2^(W*WORD)).  Otherwise it is D.  The published design calls
// the subtractor analogous to the adder and does not describe it further.
// This structure, the handshake and the reset are this design's own.
//
// Timing is identical to mod_adder.  start captures a, b and n.  done is a
// one-cycle pulse W+3 cycles later, 7 for the 92-bit default, and z holds
// until the next result.  A start while busy restarts the operation.
module mod_subtractor #(
  parameter int unsigned N    = 92,
  parameter int unsigned WORD = 23
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] n,
  output logic         done,
  output logic [N-1:0] z
);
  localparam int unsigned W  = (N + WORD - 1) / WORD;
  localparam int unsigned NP = W * WORD;
  localparam int unsigned CW = $clog2(W + 3);

  logic [NP-1:0] a_q, b_q, n_q;   // operand shift registers, low word first
  logic [NP-1:0] d_q, e_q;        // D = a - b and D + n
  logic          borrow_q, carry_q, neg_q, busy_q;
  logic [CW-1:0] cnt_q;

  logic [WORD-1:0] dw, ew;
  logic            b_nx, c_nx;

  always_comb begin
    {b_nx, dw} = {1'b0, a_q[WORD-1:0]} - {1'b0, b_q[WORD-1:0]} - (WORD+1)'(borrow_q);
    {c_nx, ew} = {1'b0, dw} + {1'b0, n_q[WORD-1:0]} + (WORD+1)'(carry_q);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      done   <= 1'b0;
      cnt_q  <= '0;
      z      <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_q      <= NP'(a);
        b_q      <= NP'(b);
        n_q      <= NP'(n);
        borrow_q <= 1'b0;
        carry_q  <= 1'b0;
        cnt_q    <= CW'(1);
        busy_q   <= 1'b1;
      end else if (busy_q) begin
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q <= CW'(W)) begin
          a_q      <= a_q >> WORD;
          b_q      <= b_q >> WORD;
          n_q      <= n_q >> WORD;
          d_q      <= {dw, d_q[NP-1:WORD]};
          e_q      <= {ew, e_q[NP-1:WORD]};
          borrow_q <= b_nx;
          carry_q  <= c_nx;
        end else if (cnt_q == CW'(W + 1)) begin
          neg_q <= borrow_q;                    // a < b
        end else begin
          z      <= neg_q ? e_q[N-1:0] : d_q[N-1:0];
          done   <= 1'b1;
          busy_q <= 1'b0;
        end
      end
    end
  end
endmodule
