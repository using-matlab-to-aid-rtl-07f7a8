// mult_engine: word-serial NW*W x NW*W bit multiplier (1024 x 1024 bits by
// default), the engine of the Montgomery multiplication.
//
// The multiplicand X is first shifted into the engine, one W-bit word per
// cycle on shiftin_wren/multiplicand, least significant word first (NW
// cycles). A multiplication is then one restart token followed by steps:
// NW steps carrying the words of the multiplicator Y (least significant
// first) and, if the upper half is wanted, NW further steps with not_domult
// high. Every step yields one W-bit word of X*Y, least significant first, so
// X*Y mod 2^(W*NW) is complete after NW steps and the full 2*W*NW-bit product
// after 2*NW steps (64 and 128 cycles at the default size). Steps may be
// given back to back, one per cycle.
//
// Latency: the result word of a step given in cycle c appears on word/valid
// in cycle c+3 (multiplicator register, product register, accumulator).
// shift rotates the stored multiplicand by one word and dataout_m shows its
// current lowest word, so the stored operand can be read out serially.
module mult_engine #(
  parameter int unsigned W  = 16,
  parameter int unsigned NW = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         restart,
  input  logic         step,
  input  logic         not_domult,
  input  logic [W-1:0] multiplicator,
  input  logic         shiftin_wren,
  input  logic [W-1:0] multiplicand,
  input  logic         shift,
  output logic [W-1:0] dataout_m,
  output logic [W-1:0] word,
  output logic         valid
);

  logic [NW-1:0][2*W-1:0] qual_p;
  logic                   p_step, p_restart;

  mm_product #(.W(W), .NW(NW)) u_product (
    .clk          (clk),
    .rst_n        (rst_n),
    .restart      (restart),
    .step         (step),
    .not_domult   (not_domult),
    .multiplicator(multiplicator),
    .shiftin_wren (shiftin_wren),
    .multiplicand (multiplicand),
    .shift        (shift),
    .dataout_m    (dataout_m),
    .qual_p       (qual_p),
    .p_step       (p_step),
    .p_restart    (p_restart)
  );

  mm_accum #(.W(W), .NW(NW)) u_accum (
    .clk      (clk),
    .rst_n    (rst_n),
    .qual_p   (qual_p),
    .p_step   (p_step),
    .p_restart(p_restart),
    .word     (word),
    .valid    (valid)
  );

endmodule
