// tb_mm_product: checks the product part of the engine: the products of a
// step appear two cycles later, restart and not_domult steps give zero
// products, the control tokens are delayed with the data, and the loaded
// multiplicand can be rotated out on dataout_m.
module tb_mm_product;
  localparam int unsigned W = 16, NW = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic restart = 1'b0, step = 1'b0, not_domult = 1'b0, shiftin_wren = 1'b0, shift = 1'b0;
  logic [W-1:0] multiplicator = '0, multiplicand = '0, dataout_m;
  logic [NW-1:0][2*W-1:0] qual_p;
  logic p_step, p_restart;
  logic [NW-1:0][W-1:0] x;
  int checks = 0, failures = 0;

  mm_product #(.W(W), .NW(NW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs, two cycles behind the inputs
  typedef struct packed { logic st, rs, z; logic [W-1:0] m; } tok_t;
  tok_t q[$];

  always @(posedge clk) if (rst_n) begin
    q.push_back('{step, restart, not_domult | restart, multiplicator});
  end

  always @(negedge clk) if (rst_n && q.size() >= 2) begin
    tok_t t;
    t = q.pop_front();
    checks++;
    if (p_step !== t.st || p_restart !== t.rs) begin failures++; $display("FAIL control delay"); end
    if (t.st || t.rs) begin
      for (int i = 0; i < NW; i++) begin
        logic [2*W-1:0] e;
        e = t.z ? '0 : (2*W)'(t.m) * (2*W)'(x[i]);
        checks++;
        if (qual_p[i] !== e) begin
          failures++;
          if (failures < 5) $display("FAIL lane %0d: %h expected %h", i, qual_p[i], e);
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < NW; i++) x[i] = W'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NW; i++) begin
      @(negedge clk); shiftin_wren = 1'b1; multiplicand = x[i];
    end
    @(negedge clk); shiftin_wren = 1'b0;
    // a mix of restart, multiply, not_domult and idle cycles
    for (int k = 0; k < 300; k++) begin
      int r;
      r = int'($urandom % 8);
      restart       = (r == 0);
      step          = (r >= 2);
      not_domult    = (r >= 6) || (k % 50 == 7 && step);
      multiplicator = (k == 5) ? '1 : W'($urandom);
      @(negedge clk);
    end
    restart = 1'b0; step = 1'b0; not_domult = 1'b0;
    repeat (4) @(negedge clk);
    // rotate the multiplicand out
    for (int i = 0; i < NW; i++) begin
      checks++;
      if (dataout_m !== x[i]) begin failures++; $display("FAIL dataout_m %0d", i); end
      shift = 1'b1; @(negedge clk); shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
