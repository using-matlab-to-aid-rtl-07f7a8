// tb_mult_engine: 1024 x 1024-bit products on the whole engine. Loads the
// multiplicand serially, streams the multiplicator with a restart and NW
// not_domult steps, and checks every output word against the wide product,
// the three-cycle latency, the rate of one word per cycle (low half after
// NW steps, full product after 2*NW), and a low-half-only product followed
// by a restart.
module tb_mult_engine;
  localparam int unsigned W = 16, NW = 64, NB = W * NW;
  logic clk = 1'b0, rst_n = 1'b0;
  logic restart = 1'b0, step = 1'b0, not_domult = 1'b0, shiftin_wren = 1'b0, shift = 1'b0;
  logic [W-1:0] multiplicator = '0, multiplicand = '0, dataout_m, word;
  logic valid;
  int checks = 0, failures = 0;
  int cyc = 0;

  mult_engine #(.W(W), .NW(NW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2*NB-1:0] prod;
  int out_k, out_first, out_last, step_first;

  always @(negedge clk) if (rst_n && valid) begin
    checks++;
    if (word !== prod[W*out_k +: W]) begin
      failures++;
      if (failures < 5) $display("FAIL word %0d: %h expected %h", out_k, word, prod[W*out_k +: W]);
    end
    if (out_k == 0) out_first = cyc;
    out_last = cyc;
    out_k++;
  end

  task automatic mult(logic [NB-1:0] x, logic [NB-1:0] y, int nsteps);
    prod = (2*NB)'(x) * (2*NB)'(y);
    for (int i = 0; i < NW; i++) begin
      @(negedge clk); shiftin_wren = 1'b1; multiplicand = x[W*i +: W];
    end
    @(negedge clk); shiftin_wren = 1'b0;
    restart = 1'b1;
    @(negedge clk); restart = 1'b0;
    out_k = 0;
    step_first = cyc;
    for (int k = 0; k < nsteps; k++) begin
      step = 1'b1;
      not_domult = (k >= NW);
      multiplicator = (k < NW) ? y[W*k +: W] : W'($urandom);   // ignored when not_domult
      @(negedge clk);
    end
    step = 1'b0; not_domult = 1'b0;
    repeat (5) @(negedge clk);
    checks += 3;
    if (out_k != nsteps) begin failures++; $display("FAIL %0d words, expected %0d", out_k, nsteps); end
    if (out_first - step_first != 3) begin failures++; $display("FAIL latency %0d", out_first - step_first); end
    if (out_last - out_first != nsteps - 1) begin failures++; $display("FAIL rate"); end
  endtask

  initial begin
    logic [NB-1:0] x, y;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    mult('1, '1, 2 * NW);
    for (int t = 0; t < 5; t++) begin
      for (int i = 0; i < NB / 32; i++) begin x[32*i +: 32] = $urandom; y[32*i +: 32] = $urandom; end
      mult(x, y, (t == 1) ? NW : 2 * NW);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
