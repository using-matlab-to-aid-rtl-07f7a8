// serial_addsub: word-serial adder or subtractor.
//
// Adds (SUB=0) or subtracts (SUB=1) two long numbers presented one W-bit
// word per cycle, least significant word first. The result word y is
// combinational from a, b and the stored carry/borrow; co is the carry
// (addition) or borrow (subtraction) out of the current word, stored on each
// cycle with en high for the next word. clear resets the stored carry/borrow
// to zero before a new number. During the last word, co is the carry out of
// the whole sum or the borrow out of the whole difference (set when a < b). It provides the '+' (y1 = t + m2) and '-' (y2 = y1/r - n)
// nodes of the Montgomery data flow.
module serial_addsub #(
  parameter int unsigned W   = 16,
  parameter bit          SUB = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         co
);

  logic cy;   // carry / borrow into the current word

  logic [W:0] full;

  always_comb begin
    if (SUB) full = {1'b0, a} - {1'b0, b} - (W+1)'(cy);
    else     full = {1'b0, a} + {1'b0, b} + (W+1)'(cy);
  end

  assign y  = full[W-1:0];
  assign co = full[W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cy <= 1'b0;
    else if (clear) cy <= 1'b0;
    else if (en)    cy <= full[W];
  end

endmodule
