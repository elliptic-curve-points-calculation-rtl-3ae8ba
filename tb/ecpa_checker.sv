// ecpa_checker: stimulus and reference model for end-to-end tests of
// ec_point_adder, for an N-bit instance.
//
// For each of two moduli (the largest prime below 2^N, then a second prime
// or, for sizes without one in the table, the first again) it loads the
// modulus, waits for the table, and runs NADD point additions.  Additions
// are chained: every sum becomes the Jacobian P2 of the next addition, and a
// fresh random affine P1 is added to it.  Each result is checked twice:
//   - against the mixed-coordinate formulas evaluated with wide arithmetic,
//   - against the affine chord rule: with l = (y2 - y1)/(x2 - x1),
//     x = l^2 - x1 - x2 and y = l(x1 - x) - y1, X3 = x*Z3^2 and
//     Y3 = y*Z3^3 must hold.  Both points lie on the curve
//     y^2 = x^3 + a*x + b whose a and b pass through them, so this is an
//     actual elliptic-curve addition.
// It also checks the start-to-done time, 11*(4W+1)+1 clocks, and counts how
// often the data took the reduction paths of the adder, the subtractor and
// the halver.
module ecpa_checker
  import tb_ref_pkg::*;
#(
  parameter int unsigned N    = 92,
  parameter int unsigned WORD = 23,
  parameter int          NADD = 8
) (
  input  logic         clk,
  output logic         rst_n,
  output logic         mod_load,
  output logic [N-1:0] modulus,
  input  logic         mod_ready,
  output logic         start,
  output logic [N-1:0] x1, y1, x2, y2, z2,
  input  logic         busy,
  input  logic         done,
  input  logic [N-1:0] x3, y3, z3,
  output logic         finished,
  output int           checks,
  output int           failures,
  output int           n_add_reduce,
  output int           n_sub_wrap,
  output int           n_halve_odd,
  output int           n_reloads,
  output int           n_ignored_start
);
  localparam int unsigned W = (N + WORD - 1) / WORD;
  localparam int LAT = 11 * (4 * int'(W) + 1) + 1;

  big_t p;

  task automatic one_add(input big_t ax1, input big_t ay1,
                         input big_t X2, input big_t Y2, input big_t Z2,
                         output big_t X3o, output big_t Y3o, output big_t Z3o);
    big_t l1, l3, l4, l6, l7, l8, l9, zz, l3s, ex3, ey3, ez3;
    big_t zi, u2, v2, lam, xa, ya, t73;
    int lat;
    // reference, mixed coordinates
    zz  = mulmod(Z2, Z2, p);
    l1  = mulmod(ax1, zz, p);
    l4  = mulmod(ay1, mulmod(zz, Z2, p), p);
    l3  = submod(l1, X2, p);
    l6  = submod(l4, Y2, p);
    l7  = addmod(l1, X2, p);
    l8  = addmod(l4, Y2, p);
    l3s = mulmod(l3, l3, p);
    ez3 = mulmod(Z2, l3, p);
    ex3 = submod(mulmod(l6, l6, p), mulmod(l7, l3s, p), p);
    l9  = submod(mulmod(l7, l3s, p), addmod(ex3, ex3, p), p);
    ey3 = mulmod(submod(mulmod(l9, l6, p), mulmod(l8, mulmod(l3s, l3, p), p), p),
                 invmod(2, p), p);
    if (l1 + X2 >= p) n_add_reduce++;
    if (l4 + Y2 >= p) n_add_reduce++;
    if (l1 < X2) n_sub_wrap++;
    if (l4 < Y2) n_sub_wrap++;
    if (l8[0]) n_halve_odd++;
    t73 = mulmod(l7, l3s, p);
    if (t73[0]) n_halve_odd++;
    // hardware
    x1 = N'(ax1); y1 = N'(ay1); x2 = N'(X2); y2 = N'(Y2); z2 = N'(Z2);
    start = 1;
    @(posedge clk); #1;
    lat = 1;
    if ($urandom_range(0, 1) == 0) begin
      // a second start while busy must be ignored
      x1 = '0; y1 = '0;
      @(posedge clk); #1 lat++;
      n_ignored_start++;
    end
    start = 0;
    while (!done) begin
      @(posedge clk); #1 lat++;
      if (lat > LAT + 10) break;
    end
    checks += 4;
    if (lat != LAT) begin failures++; $display("FAIL N=%0d latency %0d want %0d", N, lat, LAT); end
    if (big_t'(x3) != ex3 || big_t'(y3) != ey3 || big_t'(z3) != ez3) begin
      failures++;
      $display("FAIL N=%0d formulas: got (%h,%h,%h) want (%h,%h,%h)", N, x3, y3, z3, ex3, ey3, ez3);
    end
    // affine chord rule
    zi  = invmod(Z2, p);
    u2  = mulmod(X2, mulmod(zi, zi, p), p);
    v2  = mulmod(Y2, mulmod(zi, mulmod(zi, zi, p), p), p);
    lam = mulmod(submod(v2, ay1, p), invmod(submod(u2, ax1, p), p), p);
    xa  = submod(submod(mulmod(lam, lam, p), ax1, p), u2, p);
    ya  = submod(mulmod(lam, submod(ax1, xa, p), p), ay1, p);
    zz  = mulmod(big_t'(z3), big_t'(z3), p);
    if (big_t'(x3) != mulmod(xa, zz, p)) begin failures++; $display("FAIL N=%0d affine x", N); end
    if (big_t'(y3) != mulmod(ya, mulmod(zz, big_t'(z3), p), p)) begin failures++; $display("FAIL N=%0d affine y", N); end
    @(posedge clk); #1;
    checks++;
    if (busy || done) begin failures++; $display("FAIL N=%0d busy/done after result", N); end
    X3o = big_t'(x3); Y3o = big_t'(y3); Z3o = big_t'(z3);
  endtask

  task automatic load_modulus(input big_t pm);
    int lat;
    p = pm;
    modulus = N'(pm);
    mod_load = 1;
    @(posedge clk); #1 mod_load = 0;
    lat = 0;
    while (!mod_ready) begin @(posedge clk); #1 lat++; end
    checks++;
    if (lat != 2 * int'(N) - 1) begin failures++; $display("FAIL N=%0d table took %0d", N, lat); end
    n_reloads++;
  endtask

  task automatic chain(input big_t pm);
    big_t X, Y, Z, ax, ay, zr;
    load_modulus(pm);
    // starting Jacobian point: random affine point scaled by random Z
    ax = rand_below(p); ay = rand_below(p);
    zr = rand_below(p - 1) + 1;
    X = mulmod(ax, mulmod(zr, zr, p), p);
    Y = mulmod(ay, mulmod(zr, mulmod(zr, zr, p), p), p);
    Z = zr;
    for (int k = 0; k < NADD; k++) begin
      ax = rand_below(p); ay = rand_below(p);
      one_add(ax, ay, X, Y, Z, X, Y, Z);
      if (Z == 0) begin         // x1 equalled x2 by chance: restart the chain
        X = 1; Y = 1; Z = 1;
      end
    end
  endtask

  initial begin
    big_t p2;
    finished = 0; checks = 0; failures = 0;
    n_add_reduce = 0; n_sub_wrap = 0; n_halve_odd = 0; n_reloads = 0; n_ignored_start = 0;
    rst_n = 0; mod_load = 0; start = 0; modulus = '0;
    x1 = '0; y1 = '0; x2 = '0; y2 = '0; z2 = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    checks++;
    start = 1;                  // no modulus yet: must be ignored
    @(posedge clk); #1 start = 0;
    if (busy) begin failures++; $display("FAIL N=%0d started without modulus", N); end
    chain(prime_below(int'(N)));
    // second modulus: 2^89 - 1 (prime) when it fits, else the first again
    p2 = (N >= 89) ? (big_t'(1) << 89) - 1 : prime_below(int'(N));
    chain(p2);
    finished = 1;
  end
endmodule
