// tb_ec_point_adder_sizes: ec_point_adder at the operand sizes of the
// published speed table, 69, 115, 138, 161 and 184 bits (3, 5, 6, 7 and 8
// words of 23 bits; 92 bits is covered by tb_ec_point_adder).
//
// One instance per size runs in parallel, each driven and checked by
// ecpa_checker: chained point additions checked against the formulas and
// the affine chord rule, and the 11*(4W+1)+1 clock addition time (144, 232,
// 276, 320 and 364 clocks).
module tb_ec_point_adder_sizes;
  localparam int NS = 5;
  localparam int unsigned SIZES [NS] = '{69, 115, 138, 161, 184};

  logic clk = 0;
  always #5 clk = ~clk;

  logic [NS-1:0] fin;
  int chk_n [NS];
  int fail_n [NS];

  for (genvar g = 0; g < NS; g++) begin : g_size
    localparam int unsigned N = SIZES[g];
    logic rst_n, mod_load, mod_ready, start, busy, done;
    logic [N-1:0] modulus, x1, y1, x2, y2, z2, x3, y3, z3;
    int checks, failures, n_add_reduce, n_sub_wrap, n_halve_odd, n_reloads, n_ignored_start;
    logic finished;

    ec_point_adder #(.N(N), .WORD(23)) dut (.*);
    ecpa_checker #(.N(N), .WORD(23), .NADD(3)) chk (.*);

    assign fin[g]    = finished;
    assign chk_n[g]  = checks;
    assign fail_n[g] = failures;
  end

  task automatic report(input int extra_fail);
    int c, f;
    c = 0; f = extra_fail;
    for (int g = 0; g < NS; g++) begin
      $display("N=%0d checks=%0d failures=%0d", SIZES[g], chk_n[g], fail_n[g]);
      c += chk_n[g]; f += fail_n[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endtask

  initial begin
    repeat (2) @(posedge clk);   // checker has cleared its flags
    wait (&fin);
    report(0);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end
endmodule
