// vec_mult: the "matrix multiply" of the multiplication engine.
//
// Multiplies one W-bit multiplicator word by each of the NW W-bit words of
// the multiplicand vector, giving NW products of 2W bits. With W=16 and
// NW=64 this is 64 independent 16x16 unsigned multipliers, each of which
// maps onto one FPGA DSP multiplier, instead of one 16x1024 product. The
// 16-bit by 64-word split is the reference architecture's; the operands
// are unsigned, as a multi-word product requires. Purely combinational;
// the unit delays around it in mm_product register it.
module vec_mult #(
  parameter int unsigned W  = 16,
  parameter int unsigned NW = 64
) (
  input  logic [W-1:0]           a,
  input  logic [NW-1:0][W-1:0]   b,
  output logic [NW-1:0][2*W-1:0] p
);

  always_comb begin
    for (int i = 0; i < NW; i++)
      p[i] = (2*W)'(a) * (2*W)'(b[i]);
  end

endmodule
