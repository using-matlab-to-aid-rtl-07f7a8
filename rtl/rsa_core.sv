// rsa_core: RSA modular exponentiation core, z = x^e mod n, for 1024-bit
// operands by default.
//
// Three parts: an operand RAM (word_ram, 16 slots of NW words of W bits,
// slot map in rsa_pkg), the Montgomery multiplier (mont_mult, built around
// the word-serial 16 x 1024-bit multiplication engine) and the
// square-and-multiply sequencer (exp_ctrl). The host loads n, n' = -n^-1
// mod 2^(W*NW), r^2 mod n, the message x and the exponent e into their slots
// while the core is idle, pulses start with the exponent length in bits, and
// reads z from slot res_slot after done. For further messages under the same
// modulus, start with reuse_r high: the conversion of 1 into Montgomery form
// (r mod n) is then taken from the previous run instead of recomputed.
//
// Host port: while busy is low, host_we writes host_wdata to host_addr
// ({slot, word}) and host_rdata returns the word at host_addr one cycle
// after it is presented. While busy is high the RAM belongs to the core and
// host accesses are ignored. With e = 17 (5 bits) an exponentiation is ten
// Montgomery products, 5992 cycles at the default size (nine products, 5394
// cycles, with reuse_r).
// The precomputation of n' and r^2 mod n is left to the host.
module rsa_core
  import rsa_pkg::*;
#(
  parameter int unsigned W  = WORD_W,
  parameter int unsigned NW = N_WORDS,
  localparam int unsigned WA = $clog2(NW),
  localparam int unsigned MA = SLOT_W + WA,
  localparam int unsigned EW = $clog2(W*NW) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // host RAM port
  input  logic          host_we,
  input  logic [MA-1:0] host_addr,
  input  logic [W-1:0]  host_wdata,
  output logic [W-1:0]  host_rdata,
  // control
  input  logic          start,
  input  logic          reuse_r,
  input  logic [EW-1:0] exp_len,
  output logic          busy,
  output logic          done,
  output slot_e         res_slot
);

  logic          mm_start, mm_done, mm_busy;
  // b output of the multiplier (y1/r < n for the last product); it is only
  // observed by testbenches, the result slot already carries the choice
  logic          mm_b_sel;
  slot_e         mm_a, mm_b, mm_dst_u, mm_dst_y2, mm_res;
  logic          mm_rd_en, mm_wr_en, ex_rd_en;
  logic [MA-1:0] mm_rd_addr, mm_wr_addr, ex_rd_addr;
  logic [W-1:0]  mm_wr_data, ram_rdata;
  logic          ram_we, ram_re;
  logic [MA-1:0] ram_waddr, ram_raddr;
  logic [W-1:0]  ram_wdata;

  // operand RAM and its port sharing: the multiplier while it runs, the
  // sequencer between products, the host while idle
  always_comb begin
    if (busy) begin
      ram_we    = mm_wr_en;
      ram_waddr = mm_wr_addr;
      ram_wdata = mm_wr_data;
      ram_re    = mm_rd_en | ex_rd_en;
      ram_raddr = mm_busy ? mm_rd_addr : ex_rd_addr;
    end else begin
      ram_we    = host_we;
      ram_waddr = host_addr;
      ram_wdata = host_wdata;
      ram_re    = 1'b1;
      ram_raddr = host_addr;
    end
  end

  word_ram #(.W(W), .DEPTH(2**MA)) u_ram (
    .clk  (clk),
    .we   (ram_we),
    .waddr(ram_waddr),
    .wdata(ram_wdata),
    .re   (ram_re),
    .raddr(ram_raddr),
    .rdata(ram_rdata)
  );

  assign host_rdata = ram_rdata;

  mont_mult #(.W(W), .NW(NW)) u_mont (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (mm_start),
    .a_slot  (mm_a),
    .b_slot  (mm_b),
    .dst_u   (mm_dst_u),
    .dst_y2  (mm_dst_y2),
    .busy    (mm_busy),
    .done    (mm_done),
    .res_slot(mm_res),
    .b       (mm_b_sel),
    .rd_en   (mm_rd_en),
    .rd_addr (mm_rd_addr),
    .rd_data (ram_rdata),
    .wr_en   (mm_wr_en),
    .wr_addr (mm_wr_addr),
    .wr_data (mm_wr_data)
  );

  exp_ctrl #(.W(W), .NW(NW)) u_exp (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .reuse_r  (reuse_r),
    .exp_len  (exp_len),
    .busy     (busy),
    .done     (done),
    .res_slot (res_slot),
    .mm_start (mm_start),
    .mm_a     (mm_a),
    .mm_b     (mm_b),
    .mm_dst_u (mm_dst_u),
    .mm_dst_y2(mm_dst_y2),
    .mm_done  (mm_done),
    .mm_res   (mm_res),
    .rd_en    (ex_rd_en),
    .rd_addr  (ex_rd_addr),
    .rd_data  (ram_rdata)
  );

  // the sequencer only reads the RAM between products (the assertion is
  // disabled in reset, hence rst_n is used both as reset and as a plain
  // signal)
  assert property (@(posedge clk) disable iff (!rst_n) !(mm_rd_en && ex_rd_en))
    else $error("rsa_core: operand RAM read port claimed twice");

endmodule
