// word_ram: simple dual-port block RAM of W-bit words.
//
// One write port and one read port on the same clock. The read is
// synchronous: rdata shows mem[raddr] one cycle after re is high, as in an
// FPGA block RAM; a read of the address being written returns the old word.
// The RAM is written as an array so that synthesis infers a block RAM.
// Contents are not reset. The reference design used an existing library
// RAM whose ports are not given; this port set is this design's choice.
module word_ram #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
