// kr_matrix: generator and store of the Krestenson matrix for modulus n.
//
// The Krestenson matrix of an N-bit multiplier modulo n has the entry
// m(i,j) = 2^(i+j) mod n at row i and column j.  The entry depends only on
// i+j, so this block holds the 2N-1 distinct values tbl[k] = 2^k mod n,
// k = 0..2N-2, and kr_multiplier addresses them as tbl[i+j].  The published
// design stores the full matrix, split by words.
//
// The published method makes the generation its first step but gives no
// circuit for it.  This design generates one value per clock: tbl[0] = 1, and each
// next value doubles the last one and subtracts n once if the result
// reaches n.  The table changes only when a new modulus is loaded, not for
// every multiplication.
//
// Interface and timing: load captures modulus (odd, greater than 1) and
// clears ready.  Generation takes 2N-1 clocks after the load clock.  ready
// then rises and stays high until the next load.  n is the stored modulus.
module kr_matrix #(
  parameter int unsigned N = 92
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] modulus,
  output logic [N-1:0] n,
  output logic [N-1:0] tbl [2*N-1],
  output logic         ready
);
  localparam int unsigned NT = 2 * N - 1;
  localparam int unsigned IW = $clog2(NT);

  logic [IW-1:0] idx_q;
  logic [N-1:0]  cur_q;
  logic          gen_q;
  logic [N:0]    dbl;

  always_comb begin
    dbl = {cur_q, 1'b0};
    if (dbl >= {1'b0, n}) dbl = dbl - {1'b0, n};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gen_q <= 1'b0;
      ready <= 1'b0;
      idx_q <= '0;
      cur_q <= '0;
      n     <= '0;
      for (int k = 0; k < NT; k++) tbl[k] <= '0;
    end else if (load) begin
      n     <= modulus;
      cur_q <= N'(1);
      idx_q <= '0;
      gen_q <= 1'b1;
      ready <= 1'b0;
    end else if (gen_q) begin
      tbl[idx_q] <= cur_q;
      cur_q      <= dbl[N-1:0];
      idx_q      <= idx_q + 1'b1;
      if (idx_q == IW'(NT - 1)) begin
        gen_q <= 1'b0;
        ready <= 1'b1;
      end
    end
  end
endmodule
