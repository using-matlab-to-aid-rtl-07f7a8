// tb_mm_accum: feeds the accumulator the partial products of random
// 1024 x 1024-bit multiplications (computed here) and checks that the words
// shifted out are the words of the full product, least significant first,
// one cycle after each step. Also checks that a restart clears a
// half-finished sum, that idle cycles hold the state, and an all-ones
// product that drives every lane carry to its maximum.
module tb_mm_accum;
  localparam int unsigned W = 16, NW = 64, NB = W * NW;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NW-1:0][2*W-1:0] qual_p = '0;
  logic p_step = 1'b0, p_restart = 1'b0;
  logic [W-1:0] word;
  logic valid;
  int checks = 0, failures = 0;

  mm_accum #(.W(W), .NW(NW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [NB-1:0] x, logic [NB-1:0] y, int nsteps, bit gaps);
    logic [2*NB-1:0] prod;
    int k;
    prod = (2*NB)'(x) * (2*NB)'(y);
    @(negedge clk);
    p_restart = 1'b1; p_step = 1'b0; qual_p = '0;
    @(negedge clk);
    p_restart = 1'b0;
    k = 0;
    while (k < nsteps) begin
      if (gaps && ($urandom % 4 == 0)) begin
        p_step = 1'b0;
        qual_p = '1;        // must be ignored while p_step is low
        @(negedge clk);
        checks++;
        if (valid) begin failures++; $display("FAIL valid without step"); end
        continue;
      end
      p_step = 1'b1;
      for (int i = 0; i < NW; i++)
        qual_p[i] = (k < NW) ? (2*W)'(y[W*k +: W]) * (2*W)'(x[W*i +: W]) : '0;
      @(negedge clk);
      checks++;
      if (!valid || word !== prod[W*k +: W]) begin
        failures++;
        if (failures < 5) $display("FAIL word %0d: %h expected %h", k, word, prod[W*k +: W]);
      end
      k++;
    end
    p_step = 1'b0; qual_p = '0;
  endtask

  initial begin
    logic [NB-1:0] x, y;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run('1, '1, 2 * NW, 1'b0);
    for (int t = 0; t < 6; t++) begin
      for (int i = 0; i < NB / 32; i++) begin x[32*i +: 32] = $urandom; y[32*i +: 32] = $urandom; end
      run(x, y, (t == 2) ? NW : 2 * NW, t[0]);    // t==2: low half only, then restart
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
