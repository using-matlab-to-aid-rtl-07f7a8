// tb_exp_ctrl: checks the square-and-multiply sequence of the controller.
// A small responder stands in for the Montgomery multiplier: it answers
// every start after a random delay and reports the result in one of the
// two destination slots at random. The testbench records each product
// requested (operands and destinations) and compares the list with the
// sequence expected for the exponent: x~ = (x, r^2), A = (1, r^2) unless
// the stored r mod n is reused, per bit
// a squaring (A, A) and for a one bit a multiply (A, x~), finally (1, A),
// where A and x~ always name the slot the previous result landed in.
module tb_exp_ctrl;
  import rsa_pkg::*;
  localparam int unsigned W = WORD_W, NW = N_WORDS, NB = W * NW;
  localparam int unsigned WA = $clog2(NW), MA = SLOT_W + WA, EW = $clog2(NB) + 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, reuse_r = 1'b0;
  logic [EW-1:0] exp_len = '0;
  logic busy, done, mm_start, mm_done = 1'b0, rd_en;
  slot_e res_slot, mm_a, mm_b, mm_dst_u, mm_dst_y2, mm_res = SLOT_A0;
  logic [MA-1:0] rd_addr;
  logic [W-1:0] rd_data = '0;
  logic [NB-1:0] e;
  int checks = 0, failures = 0;

  typedef struct packed { slot_e a, b, du, dy, r; } op_t;
  op_t ops[$];

  exp_ctrl #(.W(W), .NW(NW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exponent RAM, one cycle latency
  always @(posedge clk) if (rd_en) begin
    if (rd_addr[MA-1 -: SLOT_W] != SLOT_E) begin failures++; $display("FAIL read outside SLOT_E"); end
    rd_data <= e[W*rd_addr[WA-1:0] +: W];
  end

  // multiplier stand-in
  initial begin
    forever begin
      @(posedge clk);
      if (mm_start && rst_n) begin
        op_t o;
        o = '{mm_a, mm_b, mm_dst_u, mm_dst_y2, SLOT_N};
        o.r = (($urandom % 2) != 0) ? o.du : o.dy;
        ops.push_back(o);
        repeat (1 + $urandom % 5) @(posedge clk);
        mm_res  <= o.r;
        mm_done <= 1'b1;
        @(posedge clk);
        mm_done <= 1'b0;
      end
    end
  end

  function automatic void expect_op(int k, slot_e a, slot_e b, slot_e du, slot_e dy, string what);
    checks++;
    if (k >= ops.size()) begin
      failures++; $display("FAIL %s: product %0d missing", what, k);
    end else if (!(ops[k].a == a && ops[k].b == b && ops[k].du == du && ops[k].dy == dy)) begin
      failures++; $display("FAIL %s: product %0d is (%0d,%0d->%0d/%0d)", what, k, ops[k].a, ops[k].b, ops[k].du, ops[k].dy);
    end
  endfunction

  slot_e r_prev = SLOT_N;      // where r mod n landed in the last run that made it
  bit    have_r = 1'b0;        // a run since reset has made it

  task automatic run(int len, bit reuse);
    slot_e xt, a;
    int k, extra;
    ops.delete();
    @(negedge clk);
    exp_len = EW'(len); reuse_r = reuse; start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    reuse = reuse && have_r;     // the controller computes r mod n when it has none
    extra = reuse ? 0 : 1;
    if (ops.size() != 2 + extra + len + $countones(e)) begin
      failures++; $display("FAIL len=%0d: %0d products", len, ops.size()); return;
    end
    expect_op(0, SLOT_X, SLOT_R2, SLOT_XT0, SLOT_XT1, "x conversion");
    xt = ops[0].r;
    if (reuse) begin
      a = r_prev;
      k = 1;
    end else begin
      expect_op(1, SLOT_ONE, SLOT_R2, SLOT_R0, SLOT_R1, "A = r");
      a = ops[1].r;
      r_prev = a;
      have_r = 1'b1;
      k = 2;
    end
    for (int i = len - 1; i >= 0; i--) begin
      expect_op(k, a, a, SLOT_A0, SLOT_A1, "square");
      a = ops[k].r; k++;
      if (e[i]) begin
        expect_op(k, a, xt, SLOT_A0, SLOT_A1, "multiply");
        a = ops[k].r; k++;
      end
    end
    expect_op(k, SLOT_ONE, a, SLOT_A0, SLOT_A1, "back conversion");
    checks++;
    if (res_slot != ops[k].r) begin failures++; $display("FAIL res_slot"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    e = '0; e[4:0] = 5'b10001; run(5, 1'b1);     // reuse asked, nothing stored yet
    e = '0; e[4:0] = 5'b10001; run(5, 1'b1);     // reuse
    e = '0; e[16:0] = 17'h10001; run(17, 1'b0);
    for (int t = 0; t < 3; t++) begin
      e = '0;
      for (int i = 0; i < 2; i++) e[32*i +: 32] = $urandom;
      e[63:41] = '0;
      e[40] = 1'b1;
      run(41, t[0]);
    end
    e = '0; run(0, 1'b0);
    e = '0; run(0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
