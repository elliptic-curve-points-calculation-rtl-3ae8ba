// tb_ec_point_adder: end-to-end test of ec_point_adder at its default
// parameters (N = 92, WORD = 23).
//
// ecpa_checker loads two prime moduli and runs chained point additions,
// checking every result against the mixed-coordinate formulas and against
// the affine chord rule, and the 188-clock addition time.  This module also
// watches the design's mechanisms and fails if one never happened:
// table regeneration on a modulus load, a start ignored while busy, the
// adder's reduction, the subtractor's wrap-around, the halver's odd path, and
// forwarding of a result into the step issued in the same cycle.
module tb_ec_point_adder;
  import ecc_pkg::*;
  localparam int unsigned N = 92;

  logic clk = 0;
  logic rst_n, mod_load, mod_ready, start, busy, done, finished;
  logic [N-1:0] modulus, x1, y1, x2, y2, z2, x3, y3, z3;
  int checks, failures, n_add_reduce, n_sub_wrap, n_halve_odd, n_reloads, n_ignored_start;
  int n_forward = 0, n_steps = 0, total_fail;

  ec_point_adder dut (.*);
  ecpa_checker #(.N(N), .WORD(23), .NADD(6)) chk (.*);

  always #5 clk = ~clk;

  // forwarding: a source of the issued step is the product finishing now
  always @(posedge clk) if (dut.issue) begin
    n_steps++;
    if (dut.mul_done &&
        (dut.uop.mul.a == dut.uop_q.mul.d || dut.uop.mul.b == dut.uop_q.mul.d ||
         (dut.uop.add.en && (dut.uop.add.a == dut.uop_q.mul.d || dut.uop.add.b == dut.uop_q.mul.d)) ||
         (dut.uop.sub.en && (dut.uop.sub.a == dut.uop_q.mul.d || dut.uop.sub.b == dut.uop_q.mul.d)) ||
         (dut.uop.shf.en && dut.uop.shf.a == dut.uop_q.mul.d)))
      n_forward++;
  end

  task automatic report;
    total_fail = failures;
    $display("mechanisms: table loads=%0d ignored starts=%0d add reductions=%0d sub wraps=%0d odd halvings=%0d forwards=%0d steps=%0d",
             n_reloads, n_ignored_start, n_add_reduce, n_sub_wrap, n_halve_odd, n_forward, n_steps);
    if (n_reloads < 2)       begin total_fail++; $display("FAIL no table regeneration"); end
    if (n_ignored_start == 0) begin total_fail++; $display("FAIL no ignored start"); end
    if (n_add_reduce == 0)   begin total_fail++; $display("FAIL no adder reduction"); end
    if (n_sub_wrap == 0)     begin total_fail++; $display("FAIL no subtractor wrap"); end
    if (n_halve_odd == 0)    begin total_fail++; $display("FAIL no odd halving"); end
    if (n_forward == 0)      begin total_fail++; $display("FAIL no forwarding"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 6, total_fail);
  endtask

  initial begin
    repeat (2) @(posedge clk);   // checker has cleared its flags
    wait (finished);
    report();
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    report();
    $finish;
  end
endmodule
