// ser2par: serial-to-parallel multiplicand register of the multiplication
// engine.
//
// Holds NW words of W bits. With wr_en high the register moves one word
// towards word 0 and datain enters at word NW-1, so after NW writes the first
// word written sits in word 0 (least significant word first). With shift
// high and wr_en low the register rotates by one word: word 0 leaves on
// dataout_m and re-enters at the top, so after NW rotations the contents are
// back in place. This lets the controller read the stored operand word by
// word without a second RAM port. dataout is the whole vector, dataout_m the
// current word 0. The block name and its ports (wr_en, datain, shift,
// dataout, dataout_m) follow the reference design; the exact shift and rotate
// behaviour is this design's choice. One cycle per operation, no reset of
// the data (it is always fully written before use).
module ser2par #(
  parameter int unsigned W  = 16,
  parameter int unsigned NW = 64
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [W-1:0]         datain,
  input  logic                 shift,
  output logic [NW-1:0][W-1:0] dataout,
  output logic [W-1:0]         dataout_m
);

  logic [NW-1:0][W-1:0] sreg;

  always_ff @(posedge clk) begin
    if (wr_en)
      sreg <= {datain, sreg[NW-1:1]};
    else if (shift)
      sreg <= {sreg[0], sreg[NW-1:1]};
  end

  assign dataout   = sreg;
  assign dataout_m = sreg[0];

endmodule
