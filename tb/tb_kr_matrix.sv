// tb_kr_matrix: self-checking test of kr_matrix at N = 92.
//
// Loads the prime p = 2^92 - 83, waits for ready and checks every table
// entry against 2^k mod p from wide arithmetic, and checks that generation
// takes 2N-1 clocks after the load clock.  It then loads a second, different
// modulus and checks that the table is rebuilt.
module tb_kr_matrix;
  import tb_ref_pkg::*;
  localparam int unsigned N = 92;

  logic clk = 0, rst_n = 0, load = 0, ready;
  logic [N-1:0] modulus, n;
  logic [N-1:0] tbl [2*N-1];
  int checks = 0, failures = 0;

  kr_matrix #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic gen_and_check(input big_t p);
    int lat;
    big_t e;
    modulus = N'(p); load = 1;
    @(posedge clk); #1 load = 0;
    lat = 0;
    while (!ready) begin @(posedge clk); #1 lat++; end
    checks += 2;
    if (lat != int'(2 * N - 1)) begin failures++; $display("FAIL generation took %0d", lat); end
    if (big_t'(n) != p) begin failures++; $display("FAIL stored modulus"); end
    e = 1;
    for (int k = 0; k < 2 * N - 1; k++) begin
      checks++;
      if (big_t'(tbl[k]) != e) begin
        failures++;
        $display("FAIL tbl[%0d] = %h want %h", k, tbl[k], e);
      end
      e = mulmod(e, 2, p);
    end
  endtask

  initial begin
    modulus = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    gen_and_check(prime_below(N));
    gen_and_check((big_t'(1) << 91) + 12345);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
