// tb_word_ram: random writes and reads against a reference array; checks
// the one-cycle read latency and read-before-write on the same address.
module tb_word_ram;
  localparam int unsigned W = 16, DEPTH = 1024, AW = 10;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_m [DEPTH];
  int checks = 0, failures = 0;

  word_ram #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1'b1; waddr = AW'(i); wdata = W'($urandom); ref_m[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      logic [W-1:0] expect_d;
      @(negedge clk);
      re = 1'b1; raddr = AW'($urandom);
      we = ($urandom % 2) == 1; waddr = ($urandom % 4 == 0) ? raddr : AW'($urandom); wdata = W'($urandom);
      expect_d = ref_m[raddr];               // old data on a same-address write
      @(posedge clk);
      if (we) ref_m[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_d) begin
        failures++;
        if (failures < 5) $display("FAIL read %0d: %h expected %h", raddr, rdata, expect_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
