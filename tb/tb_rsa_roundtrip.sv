// tb_rsa_roundtrip: a complete RSA key in use on the core at its default
// 1024-bit size. The testbench generates two random 512-bit primes p and q
// (trial division by small primes, then Fermat tests to bases 2, 3 and 5),
// forms n = p*q, phi = (p-1)(q-1), the private exponent d = 17^-1 mod phi,
// n' and r^2 mod n. It then encrypts a random message with e = 17 on the
// core, checks the ciphertext against wide-integer arithmetic, decrypts it
// on the core with the full-length private exponent d and checks that the
// message comes back. The cycle counts of both operations are checked
// against the cost model and reported as operations per second at 150 MHz.
// All runs after the first reuse the stored r mod n, as the key is fixed.
module tb_rsa_roundtrip;
  import rsa_pkg::*;

  localparam int unsigned W  = WORD_W;
  localparam int unsigned NW = N_WORDS;
  localparam int unsigned NB = W * NW;
  localparam int unsigned HB = NB / 2;
  localparam int unsigned MA = SLOT_W + $clog2(NW);
  localparam int unsigned EW = $clog2(NB) + 1;

  typedef logic [NB-1:0] num_t;
  typedef logic [2*NB:0] wide_t;

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
  int small_primes[$];

  rsa_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic num_t mulmod(num_t a, num_t b, num_t n);
    return num_t'((wide_t'(a) * wide_t'(b)) % wide_t'(n));
  endfunction

  function automatic num_t powmod(num_t x, num_t e, int len, num_t n);
    num_t acc = num_t'(1) % n;
    for (int i = len - 1; i >= 0; i--) begin
      acc = mulmod(acc, acc, n);
      if (e[i]) acc = mulmod(acc, x, n);
    end
    return acc;
  endfunction

  function automatic int bitlen(num_t v);
    for (int i = NB - 1; i >= 0; i--) if (v[i]) return i + 1;
    return 0;
  endfunction

  function automatic num_t nprime(num_t n);
    num_t inv = num_t'(1);
    for (int i = 0; i < 12; i++) inv = inv * (num_t'(2) - n * inv);
    return -inv;
  endfunction

  function automatic num_t r2mod(num_t n);
    return num_t'((wide_t'(1) << (2 * NB)) % wide_t'(n));
  endfunction

  function automatic bit probably_prime(num_t c);
    int bases[3] = '{2, 3, 5};
    foreach (small_primes[i])
      if (c % num_t'(small_primes[i]) == 0) return 1'b0;
    foreach (bases[i])
      if (powmod(num_t'(bases[i]), c - 1, bitlen(c - 1), c) != num_t'(1)) return 1'b0;
    return 1'b1;
  endfunction

  // random HB-bit prime with its two top bits set and p mod 17 != 1
  function automatic num_t rand_prime();
    num_t c = '0;
    for (int i = 0; i < HB / 32; i++) c[32*i +: 32] = $urandom;
    c[HB-1 -: 2] = 2'b11;
    c[0] = 1'b1;
    while (!(c % num_t'(17) != num_t'(1) && probably_prime(c))) c = c + num_t'(2);
    return c;
  endfunction

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
      @(posedge clk);
      @(negedge clk);
      v[W*i +: W] = host_rdata;
      @(posedge clk);
    end
  endtask

  task automatic exponentiate(num_t x, num_t e, bit reuse, output num_t z, output int cyc);
    int len = bitlen(e);
    write_num(SLOT_X, x);
    write_num(SLOT_E, e);
    exp_len <= EW'(len);
    start   <= 1'b1;
    reuse_r <= reuse;
    @(posedge clk);
    start <= 1'b0;
    cyc = 1;
    while (!done) begin
      @(posedge clk);
      cyc++;
    end
    @(posedge clk);
    read_num(res_slot, z);
    checks++;
    if (cyc != 2 + (3 - int'(reuse) + len + $countones(e)) * (9 * NW + 22) + 2 * len) begin
      failures++;
      $display("FAIL: %0d cycles for a %0d-bit exponent", cyc, len);
    end
  endtask

  initial begin
    num_t p, q, n, phi, d, msg, c, back;
    int   cyc_e, cyc_d;
    // small primes below 1000 by a sieve
    for (int i = 3; i < 1000; i += 2) begin
      bit isp = 1'b1;
      foreach (small_primes[j]) if (i % small_primes[j] == 0) isp = 1'b0;
      if (isp) small_primes.push_back(i);
    end
    p = rand_prime();
    do q = rand_prime(); while (q == p);
    n   = p * q;
    phi = (p - 1) * (q - 1);
    d   = '0;
    for (int k = 1; k < 17; k++)
      if (((wide_t'(k) * wide_t'(phi) + 1) % 17) == 0) d = num_t'((wide_t'(k) * wide_t'(phi) + 1) / 17);
    checks++;
    if (mulmod(d, num_t'(17), phi) != num_t'(1)) begin failures++; $display("FAIL key generation"); end
    $display("key: n has %0d bits, d has %0d bits", bitlen(n), bitlen(d));

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    write_num(SLOT_N, n);
    write_num(SLOT_NP, nprime(n));
    write_num(SLOT_R2, r2mod(n));

    for (int t = 0; t < 2; t++) begin
      msg = '0;
      for (int i = 0; i < NB / 32; i++) msg[32*i +: 32] = $urandom;
      msg = msg % n;
      exponentiate(msg, num_t'(17), t > 0, c, cyc_e);
      checks++;
      if (c !== powmod(msg, num_t'(17), 5, n)) begin failures++; $display("FAIL encryption"); end
      exponentiate(c, d, 1'b1, back, cyc_d);
      checks++;
      if (back !== msg) begin failures++; $display("FAIL decryption does not return the message"); end
      $display("encrypt e=17: %0d cycles (%0d ops/s at 150 MHz); decrypt: %0d cycles (%0d ops/s at 150 MHz)",
               cyc_e, 150_000_000 / cyc_e, cyc_d, 150_000_000 / cyc_d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
