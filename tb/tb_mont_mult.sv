// tb_mont_mult: Montgomery products at 1024 bits against wide-integer
// arithmetic. The testbench models the operand RAM (one cycle read
// latency), loads n, n' and two operands, and checks that the result z is
// below n and that z*r = a*b (mod n), which fixes z = a*b*r^-1 mod n. It
// also checks the constant-one operand, an operand that shares its slot
// with the destination, that the source slots are left intact, the cycle
// count 9*NW+21 from start to done, and that both outcomes of the final
// subtraction occur.
module tb_mont_mult;
  import rsa_pkg::*;
  localparam int unsigned W = WORD_W, NW = N_WORDS, NB = W * NW;
  localparam int unsigned WA = $clog2(NW), MA = SLOT_W + WA;
  typedef logic [NB-1:0] num_t;
  typedef logic [2*NB:0] wide_t;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  slot_e a_slot = SLOT_X, b_slot = SLOT_R2, dst_u = SLOT_A0, dst_y2 = SLOT_A1, res_slot;
  logic busy, done, b, rd_en, wr_en;
  logic [MA-1:0] rd_addr, wr_addr;
  logic [W-1:0] rd_data = '0, wr_data;
  logic [W-1:0] mem [2**MA];
  int checks = 0, failures = 0, n_taken = 0, n_skipped = 0, n_top = 0;

  mont_mult #(.W(W), .NW(NW)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic num_t rand_num();
    num_t v;
    for (int i = 0; i < NB / 32; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction
  function automatic num_t mulmod(num_t a, num_t b, num_t n);
    return num_t'((wide_t'(a) * wide_t'(b)) % wide_t'(n));
  endfunction
  function automatic num_t nprime(num_t n);
    num_t inv = num_t'(1);
    for (int i = 0; i < 12; i++) inv = inv * (num_t'(2) - n * inv);
    return -inv;
  endfunction

  function automatic void put(slot_e s, num_t v);
    for (int i = 0; i < NW; i++) mem[{s, WA'(i)}] = v[W*i +: W];
  endfunction
  function automatic num_t get(slot_e s);
    num_t v;
    for (int i = 0; i < NW; i++) v[W*i +: W] = mem[{s, WA'(i)}];
    return v;
  endfunction

  task automatic montprod(string name, num_t n, num_t av, num_t bv, slot_e sa, slot_e sb, slot_e du, slot_e dy);
    num_t z, rmod, aa, bb;
    wide_t y1r;
    int cyc;
    if (sa != SLOT_ONE) put(sa, av);
    if (sb != SLOT_ONE) put(sb, bv);
    aa = (sa == SLOT_ONE) ? num_t'(1) : av;
    bb = (sb == SLOT_ONE) ? num_t'(1) : bv;
    @(negedge clk);
    a_slot = sa; b_slot = sb; dst_u = du; dst_y2 = dy; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    z = get(res_slot);
    if (res_slot == dy) n_taken++; else n_skipped++;
    if (dut.ucarry) n_top++;      // y1/r reached 2^(W*NW)
    rmod = num_t'((wide_t'(1) << NB) % wide_t'(n));
    // b is set when y1/r < n, y1 = a*b + ((a*b mod r)*n' mod r)*n
    y1r = wide_t'(aa) * wide_t'(bb);
    y1r = (y1r + wide_t'(num_t'(num_t'(y1r) * nprime(n))) * wide_t'(n)) >> NB;
    checks += 2;
    if (b !== (y1r < wide_t'(n))) begin failures++; $display("FAIL %s: b", name); end
    if (res_slot !== (b ? du : dy)) begin failures++; $display("FAIL %s: res_slot", name); end
    checks += 3;
    if (z >= n) begin failures++; $display("FAIL %s: result not reduced", name); end
    if (mulmod(z, rmod, n) !== mulmod(aa, bb, n)) begin failures++; $display("FAIL %s: wrong product", name); end
    if (cyc != 9 * NW + 21) begin failures++; $display("FAIL %s: %0d cycles", name, cyc); end
  endtask

  initial begin
    num_t n, a, b;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      n = rand_num(); n[0] = 1'b1; n[NB-1] = 1'b1;
      if (t >= 4) n[NB-1 -: 12] = 12'h800;     // more final subtractions
      put(SLOT_N, n);
      put(SLOT_NP, nprime(n));
      a = rand_num() % n;
      b = rand_num() % n;
      montprod("random", n, a, b, SLOT_X, SLOT_R2, SLOT_A0, SLOT_A1);
      checks += 2;
      if (get(SLOT_X) !== a || get(SLOT_N) !== n) begin failures++; $display("FAIL source slot changed"); end
      if (get(SLOT_NP) !== nprime(n)) begin failures++; $display("FAIL n' slot changed"); end
      montprod("one", n, a, b, SLOT_ONE, SLOT_R2, SLOT_XT0, SLOT_XT1);
      montprod("square in place", n, a, a, SLOT_A1, SLOT_A1, SLOT_A0, SLOT_A1);
      montprod("n-1", n, n - 1, n - 1, SLOT_X, SLOT_R2, SLOT_A0, SLOT_A1);
    end
    // moduli just below 2^(W*NW): y1/r can exceed W*NW bits
    for (int t = 0; t < 6; t++) begin
      n = '1;
      n[15:0] = 16'(($urandom % 32768) * 2 + 1);
      put(SLOT_N, n);
      put(SLOT_NP, nprime(n));
      a = n - num_t'($urandom % 64 + 1);
      b = n - num_t'($urandom % 64 + 1);
      montprod("top bit", n, a, b, SLOT_X, SLOT_R2, SLOT_A0, SLOT_A1);
    end
    $display("final subtraction taken %0d, skipped %0d, y1/r top bit %0d", n_taken, n_skipped, n_top);
    checks++;
    if (n_top == 0) begin failures++; $display("FAIL y1/r never reached the top bit"); end
    checks += 2;
    if (n_taken == 0)   begin failures++; $display("FAIL subtraction never taken"); end
    if (n_skipped == 0) begin failures++; $display("FAIL subtraction never skipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
