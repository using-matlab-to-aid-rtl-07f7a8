// tb_vec_mult: checks the 64 parallel 16x16 products against the
// testbench's own multiplication, including the all-ones corner.
module tb_vec_mult;
  localparam int unsigned W = 16, NW = 64;
  logic [W-1:0] a;
  logic [NW-1:0][W-1:0] b;
  logic [NW-1:0][2*W-1:0] p;
  int checks = 0, failures = 0;

  vec_mult #(.W(W), .NW(NW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      a = (t == 0) ? '1 : W'($urandom);
      for (int i = 0; i < NW; i++) b[i] = (t == 0) ? '1 : W'($urandom);
      #1;
      for (int i = 0; i < NW; i++) begin
        longint unsigned e;
        e = longint'(a) * longint'(b[i]);
        checks++;
        if (p[i] !== 32'(e)) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d lane %0d: %h * %h = %h", t, i, a, b[i], p[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
