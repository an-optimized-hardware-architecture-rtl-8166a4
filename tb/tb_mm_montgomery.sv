// tb_mm_montgomery: end-to-end testbench of mm_montgomery at its default
// size (1024-bit operands, 16-bit words, 65 processing elements).
// Runs corner-case products, random products (the first with a start pulse
// while busy, which must be ignored), and one full modular multiplication
// through the Montgomery domain (four products). Every product is compared
// with a bit-serial reference of the same algorithm and with the identity
// z * 2^n = x * y (mod m), and its latency is checked: 1088 compute cycles,
// done 1090 clock edges after the start edge. Both outcomes of the late
// select in the PEs and of the reduction bit q_i are counted, and a failure
// is counted for a mechanism that never happened.
module tb_mm_montgomery;
  localparam int unsigned N = mm_pkg::N_DEFAULT;
  localparam int unsigned W = mm_pkg::W_DEFAULT;
  localparam int unsigned NOPS = 20;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (40 * (N + 200)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned E = mm_pkg::num_words(N, W);
  localparam int unsigned LAT_COMPUTE = N + E - 1;  // cycles with a PE busy
  localparam int unsigned LAT_DONE    = N + E + 1;  // accept edge to done edge

  logic           rst_n = 1'b0, start = 1'b0;
  logic [N-1:0]   x = '0, y = '0, m = '0;
  logic           busy, done;
  logic [E*W-1:0] z;

  mm_montgomery dut (.*);

  // ------------------------------------------------------------ references
  // Bit-serial radix-2 Montgomery product without final subtraction; the
  // word-serial array must give exactly the same value.
  function automatic logic [N+1:0] ref_mp(logic [N-1:0] a, logic [N-1:0] b, logic [N-1:0] md);
    logic [N+1:0] s;
    s = '0;
    for (int i = 0; i < N; i++) begin
      if (a[i]) s = s + (N+2)'(b);
      if (s[0]) s = s + (N+2)'(md);
      s = s >> 1;
    end
    return s;
  endfunction

  function automatic logic [N-1:0] rand_n();
    logic [N-1:0] r;
    r = '0;
    for (int k = 0; k < N; k += 32) r = (r << 32) | N'($urandom);
    return r;
  endfunction

  function automatic logic [N-1:0] rand_mod();
    logic [N-1:0] r;
    r = rand_n();
    r[N-1] = 1'b1;
    r[0] = 1'b1;
    return r;
  endfunction

  // md has its top bit set, so a random n-bit value is below 2*md and one
  // subtraction brings it below md.
  function automatic logic [N-1:0] rand_below(logic [N-1:0] md);
    logic [N-1:0] r;
    r = rand_n();
    if (r >= md) r = r - md;
    return r;
  endfunction

  // Modular helpers built from shifts, additions and subtractions only.
  function automatic logic [N+1:0] mod_sub(logic [N+1:0] v, logic [N-1:0] md);
    return (v >= (N+2)'(md)) ? v - (N+2)'(md) : v;
  endfunction

  // v * 2^k mod md, for v < 2*md
  function automatic logic [N-1:0] mul_pow2_mod(logic [N+1:0] v, int k, logic [N-1:0] md);
    logic [N+1:0] r;
    r = mod_sub(v, md);
    for (int i = 0; i < k; i++) r = mod_sub(r << 1, md);
    return N'(r);
  endfunction

  // a * b mod md, for a, b < md (double and add, MSB first)
  function automatic logic [N-1:0] mul_mod(logic [N-1:0] a, logic [N-1:0] b, logic [N-1:0] md);
    logic [N+1:0] r;
    r = '0;
    for (int i = N - 1; i >= 0; i--) begin
      r = mod_sub(r << 1, md);
      if (b[i]) r = mod_sub(r + (N+2)'(a), md);
    end
    return N'(r);
  endfunction

  // ------------------------------------------------------------- counters
  int n_sel_odd = 0, n_sel_even = 0, n_q1 = 0, n_q0 = 0, n_ignored = 0;
  int n_ge_m = 0, n_ops = 0, n_domain = 0, compute_cycles = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (|dut.tok_pe) compute_cycles++;
      for (int j = 0; j < int'(E) - 1; j++) begin
        if (dut.held_q[j].valid) begin
          // the select bit of PE #j is S_0^(j+1): 1 picks the "odd" candidate
          if (dut.s0[j+1]) n_sel_odd++;
          else n_sel_even++;
        end
      end
      if (dut.tok_pe[0].valid) begin
        if (dut.q0) n_q1++;
        else n_q0++;
      end
    end
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d W=%0d: %s at %0t", N, W, what, $time);
    end
  endtask

  // One multiplication through the start/done handshake. poke: raise start
  // again while busy, with other operands; it must be ignored.
  task automatic run_op(input logic [N-1:0] a, input logic [N-1:0] b,
                        input logic [N-1:0] md, input bit poke,
                        output logic [N+1:0] res);
    int lat;
    int cc0;
    logic [N+1:0] exp_z;
    logic [N-1:0] lhs, rhs;
    @(negedge clk);
    x = a; y = b; m = md; start = 1'b1;
    cc0 = compute_cycles;
    @(negedge clk);
    start = 1'b0;
    lat = 0;  // edges counted after the accept edge
    check("busy after start", busy && !done);
    if (poke) begin
      repeat (3) @(negedge clk);
      lat += 3;
      x = rand_n(); y = rand_n(); m = rand_mod(); start = 1'b1;
      @(negedge clk);
      lat++;
      start = 1'b0;
      n_ignored++;
    end
    while (!done && lat < int'(LAT_DONE) + 20) begin
      @(negedge clk);
      lat++;
    end
    res = z[N+1:0];
    exp_z = ref_mp(a, b, md);
    check("done latency", lat == int'(LAT_DONE));
    check("compute cycles", compute_cycles - cc0 == int'(LAT_COMPUTE));
    check("z equals reference", z == (E*W)'(exp_z));
    check("z below 2M", z < (E*W)'({md, 1'b0}));
    lhs = mul_pow2_mod(z[N+1:0], N, md);
    rhs = mul_mod(a, b, md);
    check("z * 2^n = x * y mod m", lhs == rhs);
    if (z >= (E*W)'(md)) n_ge_m++;
    n_ops++;
    if (failures > 0 && failures < 10)
      $display("  x=%h y=%h m=%h z=%h ref=%h lat=%0d", a, b, md, z, exp_z, lat);
  endtask

  // The operation list runs through a single call of run_op, so that the
  // wide arithmetic of the checks is elaborated only once.
  //   ops 0..3        corner cases (X = 0, all-ones modulus, M = 2^(n-1)+1, 1*1)
  //   ops 4..4+NOPS-1 random operands below a random odd n-bit modulus; the
  //                   first gets a start pulse while busy
  //   last four ops   X*Y mod M through the Montgomery domain:
  //                   X' = MP(X, 2^2n mod M), Y' = MP(Y, 2^2n mod M),
  //                   Z' = MP(X', Y'), Z = MP(Z', 1); results are brought
  //                   below M between the products.
  initial begin
    logic [N+1:0] r;
    logic [N-1:0] md, ones, a, b, r2, dx, dy, xa, ya, red;
    logic [N-1:0] want;
    bit poke;
    int nops;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("idle after reset", !busy && !done);
    ones = '1;
    nops = 4 + int'(NOPS) + 4;
    red = '0; r2 = '0; dx = '0; dy = '0; xa = '0; ya = '0;
    for (int k = 0; k < nops; k++) begin
      poke = 1'b0;
      if (k == 0) begin
        md = ones; a = '0; b = ones - 1'b1;
      end else if (k == 1) begin
        md = ones; a = ones - 1'b1; b = ones - 1'b1;
      end else if (k == 2) begin
        md = '0; md[N-1] = 1'b1; md[0] = 1'b1; a = md - 1'b1; b = md - 1'b1;
      end else if (k == 3) begin
        a = N'(1); b = N'(1);
      end else if (k < 4 + int'(NOPS)) begin
        md = rand_mod(); a = rand_below(md); b = rand_below(md); poke = (k == 4);
      end else if (k == 4 + int'(NOPS)) begin
        md = rand_mod(); dx = rand_below(md); dy = rand_below(md); r2 = mul_pow2_mod((N+2)'(1), 2 * N, md);
        a = dx; b = r2;
      end else if (k == 5 + int'(NOPS)) begin
        xa = red; a = dy; b = r2;
      end else if (k == 6 + int'(NOPS)) begin
        ya = red; a = xa; b = ya;
      end else begin
        a = red; b = N'(1);
      end
      run_op(a, b, md, poke, r);
      red = (r >= (N+2)'(md)) ? N'(r - (N+2)'(md)) : N'(r);
    end
    want = mul_mod(dx, dy, md);
    check("Montgomery-domain round trip gives x*y mod m", red == want);
    n_domain++;
    // mechanisms that must have happened
    check("speculation: odd candidate selected", n_sel_odd > 0);
    check("speculation: even candidate selected", n_sel_even > 0);
    check("q_i = 1 occurred", n_q1 > 0);
    check("q_i = 0 occurred", n_q0 > 0);
    check("start while busy ignored", n_ignored > 0);
    $display("N=%0d W=%0d E=%0d: %0d products, %0d domain round trips, latency %0d compute cycles",
             N, W, E, n_ops, n_domain, LAT_COMPUTE);
    $display("  late selects odd=%0d even=%0d, q1=%0d q0=%0d, start ignored=%0d, results in [M,2M)=%0d",
             n_sel_odd, n_sel_even, n_q1, n_q0, n_ignored, n_ge_m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
