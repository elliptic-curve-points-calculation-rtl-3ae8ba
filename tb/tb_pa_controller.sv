// tb_pa_controller: self-checking test of pa_controller.
//
// A stand-in multiplier answers each issued step with done after L clocks.
// The test checks that exactly 11 steps are issued, back to back, and that
// each one carries the multiplication, addition, subtraction and halving of
// the published schedule.  The expected list is written out here, apart from
// the package.  It also checks that done comes 11*L+1 cycles after start,
// and that a start while busy is ignored.  Two multiplier latencies are
// used.
module tb_pa_controller;
  import ecc_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, mul_done = 0;
  logic load_inputs, issue, busy, done;
  uop_t uop, uop_q;
  int checks = 0, failures = 0;

  pa_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected (a, b, d) of each unit per step; en = 0 where d == R_X1
  reg_e exp_mul [11][3] = '{
    '{R_Z2, R_Z2, R_Z2SQ}, '{R_X1, R_Z2SQ, R_L1}, '{R_Z2SQ, R_Z2, R_Z2CU},
    '{R_Y1, R_Z2CU, R_L4}, '{R_L3, R_L3, R_L3SQ}, '{R_L6, R_L6, R_L6SQ},
    '{R_L7, R_L3SQ, R_L7L3SQ}, '{R_L3SQ, R_L3, R_L3CU}, '{R_L8H, R_L3CU, R_M9},
    '{R_L9H, R_L6, R_M10}, '{R_Z2, R_L3, R_Z3}};
  logic [10:0] exp_add_en = 11'b00000010100;   // steps 3, 5 (bit = step-1)
  logic [10:0] exp_sub_en = 11'b10110010100;   // steps 3, 5, 8, 9, 11
  logic [10:0] exp_shf_en = 11'b00010100000;   // steps 6, 8
  reg_e exp_sub_d [11] = '{R_X1, R_X1, R_L3, R_X1, R_L6, R_X1, R_X1, R_X3, R_L9H, R_X1, R_Y3};
  reg_e exp_shf_d [11] = '{R_X1, R_X1, R_X1, R_X1, R_X1, R_L8H, R_X1, R_T9H, R_X1, R_X1, R_X1};

  int issued, t, t_issue, gap_bad;
  int L;

  // stand-in multiplier
  always @(posedge clk) begin
    mul_done <= 1'b0;
    if (issue) t_issue <= t;
    else if (busy && t == t_issue + L - 1) mul_done <= 1'b1;
  end
  always @(posedge clk) t <= t + 1;

  task automatic one_run(input int lat);
    int t0;
    L = lat;
    issued = 0;
    start = 1;
    #1;
    checks++;
    if (!load_inputs) begin failures++; $display("FAIL load_inputs"); end
    t0 = t;
    @(posedge clk); #1 start = 0;
    while (!done) begin
      if (issue) begin
        checks += 5;
        if (issued > 0 && !mul_done) begin failures++; $display("FAIL issue without mul_done"); end
        if (uop.mul.a != exp_mul[issued][0] || uop.mul.b != exp_mul[issued][1] ||
            uop.mul.d != exp_mul[issued][2] || !uop.mul.en) begin
          failures++; $display("FAIL step %0d multiplication", issued + 1);
        end
        if (uop.add.en != exp_add_en[issued]) begin failures++; $display("FAIL step %0d add en", issued + 1); end
        if (uop.sub.en != exp_sub_en[issued] || (uop.sub.en && uop.sub.d != exp_sub_d[issued])) begin
          failures++; $display("FAIL step %0d sub", issued + 1);
        end
        if (uop.shf.en != exp_shf_en[issued] || (uop.shf.en && uop.shf.d != exp_shf_d[issued])) begin
          failures++; $display("FAIL step %0d shift", issued + 1);
        end
        issued++;
        if (issued == 3) start = 1;     // ignored while busy
      end else if (issued == 4) start = 0;
      @(posedge clk); #1;
    end
    start = 0;
    checks += 2;
    if (issued != 11) begin failures++; $display("FAIL %0d steps issued", issued); end
    if (t - t0 != 11 * L + 1) begin failures++; $display("FAIL done after %0d, want %0d", t - t0, 11 * L + 1); end
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    t = 0; t_issue = 0; L = 17;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    one_run(17);
    repeat (2) @(posedge clk); #1;
    one_run(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
