// tb_ser2par: checks serial loading (first word written ends in word 0),
// the parallel view, rotation through dataout_m and holding when idle.
module tb_ser2par;
  localparam int unsigned W = 16, NW = 64;
  logic clk = 1'b0, wr_en = 1'b0, shift = 1'b0;
  logic [W-1:0] datain = '0, dataout_m;
  logic [NW-1:0][W-1:0] dataout, ref_v;
  int checks = 0, failures = 0;

  ser2par #(.W(W), .NW(NW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NW; i++) ref_v[i] = W'($urandom);
    for (int i = 0; i < NW; i++) begin
      @(negedge clk); wr_en = 1'b1; datain = ref_v[i];
    end
    @(negedge clk); wr_en = 1'b0;
    checks++; if (dataout !== ref_v) begin failures++; $display("FAIL load"); end
    // hold
    repeat (3) @(negedge clk);
    checks++; if (dataout !== ref_v) begin failures++; $display("FAIL hold"); end
    // rotate: words leave on dataout_m in order, then the register is back
    for (int i = 0; i < NW; i++) begin
      checks++;
      if (dataout_m !== ref_v[i]) begin failures++; $display("FAIL rotate word %0d", i); end
      shift = 1'b1;
      @(negedge clk);
      shift = 1'b0;
    end
    checks++; if (dataout !== ref_v) begin failures++; $display("FAIL after full rotation"); end
    // one more write shifts everything down by one word
    wr_en = 1'b1; datain = 16'hbeef; @(negedge clk); wr_en = 1'b0;
    checks++; if (dataout !== {16'hbeef, ref_v[NW-1:1]}) begin failures++; $display("FAIL shift-in"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
