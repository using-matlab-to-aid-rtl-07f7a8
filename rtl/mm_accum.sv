// mm_accum: accumulator part of the word-serial multiplication engine.
//
// Keeps a running sum A = sum_j S[j] * 2^(W*j), j = 0..NW, in a redundant
// form: every lane S[j] holds W+2 bits (a W-bit word plus a 2-bit carry).
// On each step the NW products P[i] = b_k * X[i] of the product part are
// split into their low and high W-bit halves; the high half of P[i] is
// added to the low half of P[i+1], so lane j receives lo(P[j]) + hi(P[j-1])
// (lane NW only hi(P[NW-1])). With T[j] = S[j] + lo(P[j]) + hi(P[j-1]):
//   - the low W bits of T[0] are final and are shifted out as the result
//     word of this step (one result word per cycle, least significant first);
//   - the sum is shifted down one word: S[j] <= lo(T[j+1]) + carry(T[j]),
//     where carry(T[j]) is T[j] >> W (at most 3, two bits), and a zero word
//     is concatenated at the top, S[NW] <= carry(T[NW]).
// No carry ripples through more than one lane per cycle, so the adder is NW+1
// short adders. Lanes never exceed 2^W + 2, which keeps the carry at two
// bits. A restart token clears the accumulator (the feedback is switched to
// constant zero) and produces no result word.
//
// Timing: a product token in cycle c gives its result word on word/valid in
// cycle c+1. Steps with zero products (not_domult) keep shifting out the
// upper words of a product, so a full 2NW-word product takes NW multiplier
// steps plus NW zero steps. The word layout (lower W bits and upper 2 bits
// of a lane, zero concatenated at the top) follows the reference design;
// the exact lane arithmetic is worked out here.
module mm_accum #(
  parameter int unsigned W  = 16,
  parameter int unsigned NW = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NW-1:0][2*W-1:0] qual_p,
  input  logic                   p_step,
  input  logic                   p_restart,
  output logic [W-1:0]           word,
  output logic                   valid
);

  localparam int unsigned LW = W + 2;

  logic [NW:0][LW-1:0] s;       // accumulator lanes (unit delay 2)
  logic [NW:0][LW-1:0] t;       // lane sums of this step
  logic [NW:0][LW-1:0] s_next;

  always_comb begin
    for (int j = 0; j <= NW; j++) begin
      t[j] = s[j];
      if (j < NW) t[j] = t[j] + LW'(qual_p[j][W-1:0]);
      if (j > 0)  t[j] = t[j] + LW'(qual_p[j-1][2*W-1:W]);
    end
    for (int j = 0; j <= NW; j++) begin
      // carry of lane j: its upper two bits
      s_next[j] = LW'(t[j][LW-1:W]);
      if (j < NW) s_next[j] = s_next[j] + LW'(t[j+1][W-1:0]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s     <= '0;
      word  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= p_step;
      if (p_restart) begin
        s <= '0;
      end else if (p_step) begin
        s    <= s_next;
        word <= t[0][W-1:0];
      end
    end
  end

endmodule
