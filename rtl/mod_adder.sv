// mod_adder: word-serial modular adder, z = (a + b) mod n for a, b < n.
//
// The operands are split into W = ceil(N/WORD) words of WORD bits (base
// 2^WORD) and added one word per clock, least significant word first.  The
// word sum modulo 2^WORD stays in place; its carry goes into the next word.
// The same clock also subtracts the matching word of n from the sum word, with
// its own borrow chain, so both Z = a + b and Z - n are complete after W
// clocks.  Because a + b < 2n, the result is Z - n when Z >= n, that is when
// the sum carried out of the top word or the subtraction did not borrow.
// Otherwise it is Z.  Adding and comparing word by word, and the rule that one
// conditional subtraction reduces a sum below 2n, follow the published
// design.  The stage split, the handshake and the reset are this design's own.
//
// Timing: start is sampled at a clock edge (operands and n are captured
// then).  W edges process the words, one edge decides, and one edge
// registers z.  So done is a one-cycle pulse W+3 cycles after the start
// cycle, 7 cycles for the 92-bit, 4-word default.  z holds until the next
// result.  A start while busy restarts the operation.
module mod_adder #(
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
  logic [NP-1:0] s_q, d_q;        // Z and Z - n, words enter at the top
  logic          carry_q, borrow_q, ge_q, busy_q;
  logic [CW-1:0] cnt_q;

  logic [WORD-1:0] sw, dw;
  logic            c_nx, b_nx;

  always_comb begin
    {c_nx, sw} = {1'b0, a_q[WORD-1:0]} + {1'b0, b_q[WORD-1:0]} + (WORD+1)'(carry_q);
    {b_nx, dw} = {1'b0, sw} - {1'b0, n_q[WORD-1:0]} - (WORD+1)'(borrow_q);
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
        carry_q  <= 1'b0;
        borrow_q <= 1'b0;
        cnt_q    <= CW'(1);
        busy_q   <= 1'b1;
      end else if (busy_q) begin
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q <= CW'(W)) begin
          // one word of Z and of Z - n
          a_q      <= a_q >> WORD;
          b_q      <= b_q >> WORD;
          n_q      <= n_q >> WORD;
          s_q      <= {sw, s_q[NP-1:WORD]};
          d_q      <= {dw, d_q[NP-1:WORD]};
          carry_q  <= c_nx;
          borrow_q <= b_nx;
        end else if (cnt_q == CW'(W + 1)) begin
          ge_q <= carry_q | ~borrow_q;          // Z >= n
        end else begin
          z      <= ge_q ? d_q[N-1:0] : s_q[N-1:0];
          done   <= 1'b1;
          busy_q <= 1'b0;
        end
      end
    end
  end
endmodule
