// exp_ctrl: square-and-multiply sequencer for z = x^e mod n.
//
// Drives the Montgomery multiplier (mont_mult) through the left-to-right
// binary exponentiation:
//   x~ = MontProd(x, r^2 mod n)      = x*r mod n
//   R  = MontProd(1, r^2 mod n)      = r mod n    (skipped with reuse_r)
//   A  = R
//   for i = len-1 downto 0:
//     A = MontProd(A, A)
//     if e[i]: A = MontProd(A, x~)
//   z  = MontProd(1, A)              = x^e mod n
// Every intermediate stays in Montgomery form (multiplied by r); only the
// first two and the last product convert in and out. r^2 mod n and n' are
// precomputed by the host, so the first conversion costs one product per
// new message. R = r mod n depends only on the modulus: it is kept in its own
// slot pair (R0/R1), and a start with reuse_r high skips recomputing it when
// an earlier run with the same modulus left it there. The host must keep
// reuse_r low after loading a new modulus; the first run after reset always
// computes R.
//
// Interface: start (one-cycle pulse while idle) with reuse_r and exp_len,
// the number of exponent bits to scan (the most significant is bit
// exp_len-1; 0 gives x^0 = 1). Exponent bits are read from slot SLOT_E of the operand RAM, one
// word every 16 bits, through rd_* (one cycle read latency). Results of the
// products alternate between two slots per value (x~: XT0/XT1, A: A0/A1);
// mm_res names where each one landed and res_slot where z is when done
// pulses. busy is high from start to done. Which slots are used and the
// exp_len input are choices of this design.
module exp_ctrl
  import rsa_pkg::*;
#(
  parameter int unsigned W  = WORD_W,
  parameter int unsigned NW = N_WORDS,
  localparam int unsigned WA = $clog2(NW),
  localparam int unsigned MA = SLOT_W + WA,
  localparam int unsigned EW = $clog2(W*NW) + 1       // exponent length width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          reuse_r,
  input  logic [EW-1:0] exp_len,
  output logic          busy,
  output logic          done,
  output slot_e         res_slot,
  // Montgomery multiplier
  output logic          mm_start,
  output slot_e         mm_a,
  output slot_e         mm_b,
  output slot_e         mm_dst_u,
  output slot_e         mm_dst_y2,
  input  logic          mm_done,
  input  slot_e         mm_res,
  // exponent read port
  output logic          rd_en,
  output logic [MA-1:0] rd_addr,
  input  logic [W-1:0]  rd_data
);

  typedef enum logic [3:0] {
    E_IDLE, E_XT, E_XT_W, E_A, E_A_W, E_BRD, E_BWAIT, E_SQ, E_SQ_W, E_MUL, E_MUL_W,
    E_FIN, E_FIN_W, E_DONE
  } state_e;

  state_e        state;
  logic [EW-1:0] idx;       // bit being processed
  logic          ebit;      // its value
  slot_e         xt_slot, a_slot, r_slot;
  logic          r_valid;   // r_slot holds r mod n from an earlier run
  logic          reuse_q;

  localparam int unsigned BW = $clog2(W);

  assign rd_en   = (state == E_BRD);
  assign rd_addr = {SLOT_E, WA'(idx >> BW)};

  always_comb begin
    mm_start  = 1'b0;
    mm_a      = a_slot;
    mm_b      = a_slot;
    mm_dst_u  = SLOT_A0;
    mm_dst_y2 = SLOT_A1;
    unique case (state)
      E_XT: begin
        mm_start  = 1'b1;
        mm_a      = SLOT_X;
        mm_b      = SLOT_R2;
        mm_dst_u  = SLOT_XT0;
        mm_dst_y2 = SLOT_XT1;
      end
      E_A: begin
        mm_start  = 1'b1;
        mm_a      = SLOT_ONE;
        mm_b      = SLOT_R2;
        mm_dst_u  = SLOT_R0;
        mm_dst_y2 = SLOT_R1;
      end
      E_SQ:  mm_start = 1'b1;
      E_MUL: begin
        mm_start = 1'b1;
        mm_b     = xt_slot;
      end
      E_FIN: begin
        mm_start = 1'b1;
        mm_a     = SLOT_ONE;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= E_IDLE;
      idx      <= '0;
      ebit     <= 1'b0;
      xt_slot  <= SLOT_XT0;
      a_slot   <= SLOT_A0;
      r_slot   <= SLOT_R0;
      r_valid  <= 1'b0;
      reuse_q  <= 1'b0;
      res_slot <= SLOT_A0;
    end else begin
      unique case (state)
        E_IDLE: if (start) begin
          idx     <= exp_len - 1'b1;
          reuse_q <= reuse_r && r_valid;
          state   <= E_XT;
        end
        E_XT:    state <= E_XT_W;
        E_XT_W:  if (mm_done) begin
          xt_slot <= mm_res;
          if (reuse_q) begin
            a_slot <= r_slot;
            state  <= (idx == '1) ? E_FIN : E_BRD;   // exp_len == 0
          end else begin
            state  <= E_A;
          end
        end
        E_A:     state <= E_A_W;
        E_A_W:   if (mm_done) begin
          r_slot  <= mm_res;
          r_valid <= 1'b1;
          a_slot  <= mm_res;
          state   <= (idx == '1) ? E_FIN : E_BRD;   // exp_len == 0
        end
        E_BRD:   state <= E_BWAIT;
        E_BWAIT: begin
          ebit  <= rd_data[idx[BW-1:0]];
          state <= E_SQ;
        end
        E_SQ:    state <= E_SQ_W;
        E_SQ_W:  if (mm_done) begin
          a_slot <= mm_res;
          state  <= ebit ? E_MUL : ((idx == '0) ? E_FIN : E_BRD);
          if (!ebit) idx <= idx - 1'b1;
        end
        E_MUL:   state <= E_MUL_W;
        E_MUL_W: if (mm_done) begin
          a_slot <= mm_res;
          state  <= (idx == '0) ? E_FIN : E_BRD;
          idx    <= idx - 1'b1;
        end
        E_FIN:   state <= E_FIN_W;
        E_FIN_W: if (mm_done) begin
          res_slot <= mm_res;
          state    <= E_DONE;
        end
        default: state <= E_IDLE;   // E_DONE
      endcase
    end
  end

  assign busy = (state != E_IDLE);
  assign done = (state == E_DONE);

endmodule
