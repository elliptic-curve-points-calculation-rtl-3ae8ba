// tb_mod_adder: self-checking test of mod_adder at the 92-bit, 4-word default.
//
// Drives edge cases (zero, p-1, operands whose result lands exactly on the
// reduction boundary) and random operands below the 92-bit prime
// p = 2^92 - 83.  Each result is compared with (a + b) mod p from plain
// wide arithmetic, and the start-to-done latency with W+3 = 7 clocks.  It
// also counts how often the reduction path was taken.
module tb_mod_adder;
  import tb_ref_pkg::*;
  localparam int unsigned N = 92, WORD = 23;
  localparam int unsigned W = (N + WORD - 1) / WORD;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [N-1:0] a, b, n, z;
  int checks = 0, failures = 0, reduced = 0;
  big_t p;

  mod_adder #(.N(N), .WORD(WORD)) dut (.*);

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
    exp = addmod(x, y, p);
    if (x + y >= p) reduced++;
    checks += 2;
    if (big_t'(z) != exp) begin
      failures++;
      $display("FAIL %h + %h: got %h want %h", x, y, z, exp);
    end
    if (lat != int'(W + 3)) begin
      failures++;
      $display("FAIL latency %0d, want %0d", lat, W + 3);
    end
  endtask

  initial begin
    p = prime_below(N);
    n = N'(p); a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(0, 0);
    run(p - 1, p - 1);
    run(p - 1, 1);
    run(1, p - 1);
    run(0, p - 1);
    run(p - 1, 0);
    run(big_t'(1) << 45, big_t'(1) << 46);
    run(p >> 1, (p >> 1) + 1);
    for (int i = 0; i < 300; i++) run(rand_below(p), rand_below(p));
    if (reduced == 0) begin failures++; $display("reduction never exercised"); end
    $display("reductions exercised: %0d", reduced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
