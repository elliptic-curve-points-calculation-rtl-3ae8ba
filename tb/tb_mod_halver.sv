// tb_mod_halver: self-checking test of mod_halver at N = 92.
//
// For even and odd operands below p = 2^92 - 83 it checks that 2*z = a
// (mod p), that z < p, and that done arrives one clock after start.
module tb_mod_halver;
  import tb_ref_pkg::*;
  localparam int unsigned N = 92;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [N-1:0] a, n, z;
  int checks = 0, failures = 0, odd = 0;
  big_t p;

  mod_halver #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input big_t x);
    a = N'(x); start = 1;
    @(posedge clk); #1 start = 0;
    checks += 2;
    if (!done) begin failures++; $display("FAIL done not after one clock"); end
    if (addmod(big_t'(z), big_t'(z), p) != x || big_t'(z) >= p) begin
      failures++;
      $display("FAIL %h/2: got %h", x, z);
    end
    if (x[0]) odd++;
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    p = prime_below(N);
    n = N'(p); a = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(0); run(1); run(2); run(p - 1); run(p - 2);
    for (int i = 0; i < 300; i++) run(rand_below(p));
    if (odd == 0) begin failures++; $display("odd path never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
