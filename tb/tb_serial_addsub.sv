// tb_serial_addsub: adds and subtracts random 256-bit numbers one 16-bit
// word at a time and compares sum, difference, final carry and borrow with
// wide-integer results.
module tb_serial_addsub;
  localparam int unsigned W = 16, NWD = 16, NB = W * NWD;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  logic [W-1:0] a = '0, b = '0, ya, ys;
  logic coa, cos;
  int checks = 0, failures = 0;

  serial_addsub #(.W(W), .SUB(1'b0)) u_add (.clk, .rst_n, .clear, .en, .a, .b, .y(ya), .co(coa));
  serial_addsub #(.W(W), .SUB(1'b1)) u_sub (.clk, .rst_n, .clear, .en, .a, .b, .y(ys), .co(cos));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] x, y, s, d;
    logic [NB:0] es, ed;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < NB / 32; i++) begin x[32*i +: 32] = $urandom; y[32*i +: 32] = $urandom; end
      if (t == 0) begin x = '1; y = '1; end
      if (t == 1) begin x = '0; y = NB'(1); end
      if (t == 2) y = x;
      if (t % 7 == 3) y[NB-1 -: 64] = x[NB-1 -: 64];   // long borrow chains
      @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
      for (int i = 0; i < NWD; i++) begin
        a = x[W*i +: W]; b = y[W*i +: W]; en = 1'b1;
        #1;
        s[W*i +: W] = ya; d[W*i +: W] = ys;
        if (i == NWD - 1) begin
          es = {1'b0, x} + {1'b0, y};
          ed = {1'b0, x} - {1'b0, y};
          checks += 2;
          if (coa !== es[NB]) begin failures++; $display("FAIL carry t=%0d", t); end
          if (cos !== ed[NB]) begin failures++; $display("FAIL borrow t=%0d", t); end
        end
        @(negedge clk);
      end
      en = 1'b0;
      checks += 2;
      if (s !== es[NB-1:0]) begin failures++; $display("FAIL sum t=%0d", t); end
      if (d !== ed[NB-1:0]) begin failures++; $display("FAIL diff t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
