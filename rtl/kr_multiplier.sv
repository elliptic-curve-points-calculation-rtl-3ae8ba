// kr_multiplier: modular multiplier on the Krestenson matrix,
// z = a * b mod n, with no multiplication.
//
// With a = sum a_i 2^i and b = sum b_j 2^j,
//   a*b mod n = sum over (i,j) with a_i = b_j = 1 of m(i,j) mod n,
// where m(i,j) = 2^(i+j) mod n is read from the table built by kr_matrix
// (tbl[i+j]).  Every entry is below n, so two entries, or an entry and a
// partial sum, are reduced by one comparison and one conditional subtraction.
// The sum is taken in two phases, as published:
//   row phase    - all N rows in parallel: row i accumulates
//                  r_i = sum_j b_j m(i,j) mod n  (= 2^i * b mod n);
//   column phase - the row vector is summed, z = sum_i a_i r_i mod n.
// Each phase sweeps its N entries in S = 2W slices of C = ceil(N/S) entries,
// one slice per clock, where W = ceil(N/WORD) is the number of words.  A
// slice and the running sum enter a balanced tree of two-input modular
// adders.  The published design quotes the latency, 4W+1 clocks.  The slice
// width that reproduces it is this design's choice.
//
// Timing: start (ignored unless ready) captures a and b, which must be
// below n.  S row clocks and S column clocks follow.  done is a one-cycle
// pulse 4W+1 cycles after the start cycle, 17 for the 92-bit default, and z
// holds until the next result.  A start while busy restarts.  n and tbl must
// stay stable while an operation runs.
module kr_multiplier #(
  parameter int unsigned N    = 92,
  parameter int unsigned WORD = 23
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] n,
  input  logic [N-1:0] tbl [2*N-1],
  output logic         done,
  output logic [N-1:0] z
);
  localparam int unsigned W  = (N + WORD - 1) / WORD;
  localparam int unsigned S  = 2 * W;                 // slices per phase
  localparam int unsigned C  = (N + S - 1) / S;       // entries per slice
  localparam int unsigned TP = 1 << $clog2(C + 1);    // tree leaves
  localparam int unsigned NT = 2 * N - 1;
  localparam int unsigned SW = $clog2(S + 1);

  typedef logic [N-1:0] word_t;

  function automatic word_t madd(input word_t x, input word_t y, input word_t m);
    logic [N:0] s;
    s = {1'b0, x} + {1'b0, y};
    if (s >= {1'b0, m}) s = s - {1'b0, m};
    return s[N-1:0];
  endfunction

  function automatic word_t tree_sum(input word_t v [TP], input word_t m);
    word_t t [TP];
    t = v;
    for (int len = TP / 2; len >= 1; len = len / 2)
      for (int k = 0; k < len; k++) t[k] = madd(t[2*k], t[2*k+1], m);
    return t[0];
  endfunction

  typedef enum logic [1:0] {IDLE, ROWS, COLS} phase_e;

  phase_e        phase_q;
  logic [SW-1:0] slice_q;
  logic [N-1:0]  a_q, b_q;
  word_t         row_q [N];       // row sums r_i
  word_t         row_nx [N];
  word_t         z_q, z_nx;

  // Row phase: row i adds the entries of the current column slice selected
  // by the bits of b.
  for (genvar i = 0; i < N; i++) begin : g_row
    always_comb begin
      word_t       v [TP];
      int unsigned j;
      for (int c = 0; c < TP; c++) v[c] = '0;
      v[0] = row_q[i];
      for (int c = 0; c < C; c++) begin
        j = int'(slice_q) * C + c;
        if (j < N && b_q[j]) v[c+1] = tbl[(i + j) % NT];
      end
      row_nx[i] = tree_sum(v, n);
    end
  end

  // Column phase: the running product adds the row sums of the current row
  // slice selected by the bits of a.
  always_comb begin
    word_t       v [TP];
    int unsigned i;
    for (int c = 0; c < TP; c++) v[c] = '0;
    v[0] = z_q;
    for (int c = 0; c < C; c++) begin
      i = int'(slice_q) * C + c;
      if (i < N && a_q[i]) v[c+1] = row_q[i % N];
    end
    z_nx = tree_sum(v, n);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q <= IDLE;
      slice_q <= '0;
      done    <= 1'b0;
      z       <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_q     <= a;
        b_q     <= b;
        z_q     <= '0;
        for (int i = 0; i < N; i++) row_q[i] <= '0;
        slice_q <= '0;
        phase_q <= ROWS;
      end else begin
        unique case (phase_q)
          ROWS: begin
            row_q   <= row_nx;
            slice_q <= (slice_q == SW'(S - 1)) ? '0 : slice_q + 1'b1;
            if (slice_q == SW'(S - 1)) phase_q <= COLS;
          end
          COLS: begin
            z_q     <= z_nx;
            slice_q <= slice_q + 1'b1;
            if (slice_q == SW'(S - 1)) begin
              z       <= z_nx;
              done    <= 1'b1;
              phase_q <= IDLE;
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
