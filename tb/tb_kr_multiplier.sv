// tb_kr_multiplier: self-checking test of kr_multiplier at the 92-bit,
// 4-word default.
//
// The matrix table 2^k mod p is computed here with wide arithmetic, not taken
// from kr_matrix.  Edge cases (0, 1, p-1, single bits, all-ones) and random
// operands are multiplied.  Each product is compared with (a*b) mod p, and
// the latency with 4W+1 = 17 clocks.
module tb_kr_multiplier;
  import tb_ref_pkg::*;
  localparam int unsigned N = 92, WORD = 23;
  localparam int unsigned W = (N + WORD - 1) / WORD;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [N-1:0] a, b, n, z;
  logic [N-1:0] tbl [2*N-1];
  int checks = 0, failures = 0;
  big_t p;

  kr_multiplier #(.N(N), .WORD(WORD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input big_t x, input big_t y);
    int lat;
    big_t exp;
    a = N'(x); b = N'(y); start = 1;
    @(posedge clk); #1 start = 0;
    lat = 1;
    while (!done) begin @(posedge clk); #1 lat++; end
    exp = mulmod(x, y, p);
    checks += 2;
    if (big_t'(z) != exp) begin
      failures++;
      $display("FAIL %h * %h: got %h want %h", x, y, z, exp);
    end
    if (lat != int'(4 * W + 1)) begin
      failures++;
      $display("FAIL latency %0d, want %0d", lat, 4 * W + 1);
    end
  endtask

  initial begin
    big_t e;
    p = prime_below(N);
    n = N'(p); a = '0; b = '0;
    e = 1;
    for (int k = 0; k < 2 * N - 1; k++) begin
      tbl[k] = N'(e);
      e = mulmod(e, 2, p);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(0, 0); run(1, 1); run(p - 1, p - 1); run(p - 1, 1); run(2, p - 1);
    run(big_t'(1) << 91, big_t'(1) << 91);
    run(big_t'(1) << 91, 3);
    run((big_t'(1) << 91) - 1, (big_t'(1) << 91) - 1);
    for (int i = 0; i < 150; i++) run(rand_below(p), rand_below(p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
