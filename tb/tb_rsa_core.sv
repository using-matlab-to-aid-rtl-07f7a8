// tb_rsa_core: end-to-end test of the RSA core at its default size
// (1024-bit operands, 64 words of 16 bits).
//
// For random odd 1024-bit moduli the testbench computes n' = -n^-1 mod 2^1024
// (Newton iteration) and r^2 mod n itself, loads n, n', r^2, x and e through
// the host port, runs an exponentiation and compares the result with x^e mod n
// computed by plain wide-integer square-and-multiply. Exponents: 17 (the
// usual public exponent, also with r mod n reused for a second message
// under the same key), 3, 5, 65537, a random 24-bit one, 1 and 0. The cycle
// count of each run is checked against the cost model of the core
// (ten Montgomery products for e = 17). It also counts how often each
// mechanism of the engine and the multiplier is exercised: restart tokens,
// not_domult (upper-half) steps, modulo-r-only products, multiplicand
// rotation, both outcomes of the final subtraction and reuse of r mod n.
module tb_rsa_core;
  import rsa_pkg::*;

  localparam int unsigned W  = WORD_W;
  localparam int unsigned NW = N_WORDS;
  localparam int unsigned NB = W * NW;
  localparam int unsigned MA = SLOT_W + $clog2(NW);
  localparam int unsigned EW = $clog2(NB) + 1;

  typedef logic [NB-1:0]   num_t;
  typedef logic [2*NB:0]   wide_t;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          host_we = 1'b0;
  logic [MA-1:0] host_addr = '0;
  logic [W-1:0]  host_wdata = '0;
  logic [W-1:0]  host_rdata;
  logic          start = 1'b0;
  logic          reuse_r = 1'b0;
  logic [EW-1:0] exp_len = '0;
  logic          busy, done;
  slot_e         res_slot;

  int checks = 0, failures = 0;
  int n_restart = 0, n_zero_step = 0, n_mod_r = 0, n_rotate = 0;
  int n_sub_taken = 0, n_sub_skipped = 0, n_square = 0, n_multiply = 0, n_reuse = 0;

  rsa_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, from inside the design
  always @(posedge clk) if (rst_n) begin
    if (dut.u_mont.u_engine.restart) n_restart++;
    if (dut.u_mont.u_engine.step && dut.u_mont.u_engine.not_domult) n_zero_step++;
    if (dut.u_mont.u_engine.shift) n_rotate++;
    if (dut.u_mont.phase == 4'd4 && dut.u_mont.phase_end) n_mod_r++;
    if (dut.u_mont.done) begin
      if (!dut.mm_b_sel) n_sub_taken++;
      else               n_sub_skipped++;
    end
    if (dut.u_exp.state == 4'd7)  n_square++;
    if (dut.u_exp.state == 4'd9) n_multiply++;
    if (dut.u_exp.state == 4'd2 && dut.u_exp.mm_done && dut.u_exp.reuse_q) n_reuse++;
  end

  // ------------------------------------------------------------ reference
  function automatic num_t rand_num();
    num_t v;
    for (int i = 0; i < NB / 32; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  function automatic num_t mulmod(num_t a, num_t b, num_t n);
    wide_t p;
    p = wide_t'(a) * wide_t'(b);
    return num_t'(p % wide_t'(n));
  endfunction

  function automatic num_t powmod(num_t x, num_t e, int len, num_t n);
    num_t acc = num_t'(1) % n;
    for (int i = len - 1; i >= 0; i--) begin
      acc = mulmod(acc, acc, n);
      if (e[i]) acc = mulmod(acc, x, n);
    end
    return acc;
  endfunction

  // n' = -n^-1 mod 2^NB by Newton iteration (inv doubles its correct bits)
  function automatic num_t nprime(num_t n);
    num_t inv = num_t'(1);
    for (int i = 0; i < 12; i++) inv = inv * (num_t'(2) - n * inv);
    return -inv;
  endfunction

  function automatic num_t r2mod(num_t n);
    wide_t r2 = wide_t'(1) << (2 * NB);
    return num_t'(r2 % wide_t'(n));
  endfunction

  // ------------------------------------------------------------ host port
  task automatic write_num(slot_e s, num_t v);
    for (int i = 0; i < NW; i++) begin
      host_we    <= 1'b1;
      host_addr  <= {s, ($clog2(NW))'(i)};
      host_wdata <= v[W*i +: W];
      @(posedge clk);
    end
    host_we <= 1'b0;
  endtask

  task automatic read_num(slot_e s, output num_t v);
    for (int i = 0; i < NW; i++) begin
      host_addr <= {s, ($clog2(NW))'(i)};
      @(posedge clk);   // address registered by the RAM
      @(negedge clk);
      v[W*i +: W] = host_rdata;
      @(posedge clk);
    end
  endtask

  // reuse: same modulus as the previous run, r mod n is not recomputed
  task automatic run_case(string name, num_t n, num_t x, num_t e, int len, bit reuse = 1'b0);
    num_t got, exp_z;
    int   cyc, ones, expected_cyc;
    if (!reuse) begin
      write_num(SLOT_N, n);
      write_num(SLOT_NP, nprime(n));
      write_num(SLOT_R2, r2mod(n));
    end
    write_num(SLOT_X, x);
    write_num(SLOT_E, e);
    exp_len <= EW'(len);
    reuse_r <= reuse;
    start   <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 1;
    while (!done) begin
      @(posedge clk);
      cyc++;
    end
    @(posedge clk);
    read_num(res_slot, got);
    exp_z = powmod(x, e, len, n);
    checks++;
    if (got !== exp_z) begin
      failures++;
      $display("FAIL %s: result mismatch\n got %h\n exp %h", name, got, exp_z);
    end
    // cost model: (3 + squarings + multiplies) Montgomery products of
    // 9*NW+21 cycles each plus one start cycle, two cycles per exponent bit
    // to fetch it, and two cycles at start and done
    ones = 0;
    for (int i = 0; i < len; i++) ones += int'(e[i]);
    expected_cyc = 2 + (3 - int'(reuse) + len + ones) * (9 * NW + 22) + 2 * len;
    checks++;
    if (cyc != expected_cyc) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", name, cyc, expected_cyc);
    end
    $display("%s: len=%0d ones=%0d cycles=%0d", name, len, ones, cyc);
  endtask

  function automatic num_t rand_modulus();
    num_t n = rand_num();
    n[NB-1] = 1'b1;
    n[0]    = 1'b1;
    return n;
  endfunction

  initial begin
    num_t n, x;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    n = rand_modulus();
    x = rand_num() % n;
    run_case("e=17 #1", n, x, num_t'(17), 5);
    x = rand_num() % n;
    run_case("e=17 #2", n, x, num_t'(17), 5);
    x = rand_num() % n;
    run_case("e=17 same key", n, x, num_t'(17), 5, 1'b1);
    x = rand_num() % n;
    run_case("e=3 same key", n, x, num_t'(3), 2, 1'b1);
    n = rand_modulus();
    x = rand_num() % n;
    run_case("e=3", n, x, num_t'(3), 2);
    run_case("e=5", n, x, num_t'(5), 3);
    n = rand_modulus();
    n[NB-1 -: 8] = 8'h80;     // small top word: more final subtractions
    x = rand_num() % n;
    run_case("e=65537", n, x, num_t'(65537), 17);
    x = rand_num() % n;
    run_case("e=random24", n, x, num_t'({1'b1, 23'($urandom)}), 24);
    run_case("e=1", n, x, num_t'(1), 1);
    run_case("e=0", n, x, num_t'(0), 0);

    $display("mechanisms: restart=%0d not_domult=%0d mod_r=%0d rotate=%0d sub_taken=%0d sub_skipped=%0d square=%0d multiply=%0d reuse=%0d",
             n_restart, n_zero_step, n_mod_r, n_rotate, n_sub_taken, n_sub_skipped, n_square, n_multiply, n_reuse);
    checks++; if (n_restart == 0)     begin failures++; $display("FAIL: no restart"); end
    checks++; if (n_zero_step == 0)   begin failures++; $display("FAIL: no not_domult step"); end
    checks++; if (n_mod_r == 0)       begin failures++; $display("FAIL: no modulo-r product"); end
    checks++; if (n_rotate == 0)      begin failures++; $display("FAIL: no multiplicand rotation"); end
    checks++; if (n_sub_taken == 0)   begin failures++; $display("FAIL: final subtraction never taken"); end
    checks++; if (n_sub_skipped == 0) begin failures++; $display("FAIL: final subtraction never skipped"); end
    checks++; if (n_square == 0)      begin failures++; $display("FAIL: no squaring"); end
    checks++; if (n_multiply == 0)    begin failures++; $display("FAIL: no multiply step"); end
    checks++; if (n_reuse == 0)       begin failures++; $display("FAIL: r mod n never reused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
