// mont_mult: Montgomery product z = a*b*r^-1 mod n, r = 2^(W*NW).
//
// Follows the Montgomery data flow: t = a*b; m = t*n' mod r; m2 = m*n;
// y1 = t + m2; y1/r (drop the low NW words); y2 = y1/r - n; the result is
// y1/r if that is below n (the subtraction borrows) and y2 otherwise. All
// three products run on one word-serial mult_engine, each after its
// multiplicand has been shifted into the engine:
//   LOAD_B  b -> engine                       NW cycles
//   MUL_T   stream a, then NW zero steps;     t (2NW words) -> T RAM
//   LOAD_NP n' -> engine
//   MUL_M   stream t[0..NW-1], NW steps only; m (= t*n' mod r) -> slot M
//   LOAD_N  n -> engine
//   MUL_Y   stream m, then NW zero steps; each word of m*n is added to the
//           matching word of t as it leaves the engine; the upper NW words
//           of the sum (y1/r) are written to slot dst_u, its carry kept
//   SUB     read y1/r back, subtract n word by word (n is read out of the
//           engine by rotating its multiplicand register), write to dst_y2
// The low NW words of y1 are zero by construction (checked by an
// assertion). b is set when y1/r < n (the subtraction borrowed and y1/r has
// no bit W*NW), and res_slot names the slot holding the result: dst_u when
// b is set, dst_y2 otherwise. Both are valid from done to the next start.
// A Montgomery product takes 9*NW+21 cycles from start to done (597 at the
// default size).
//
// Operands a and b live in the shared operand RAM (rsa_pkg slot map) and are
// read through rd_*, with one cycle read latency; results are written
// through wr_*. Reading SLOT_ONE yields the number 1. Operands must be below
// n, and a, b may name the destination slots: they are no longer read when
// the destination slots are written. start is a one-cycle pulse when idle;
// done pulses for one cycle when res_slot is valid. t is kept in a private
// 2NW-word RAM. The phase order, the RAM split and the slot handling are
// this design's choices.
module mont_mult
  import rsa_pkg::*;
#(
  parameter int unsigned W  = WORD_W,
  parameter int unsigned NW = N_WORDS,
  localparam int unsigned WA = $clog2(NW),        // word index width
  localparam int unsigned MA = SLOT_W + WA        // operand RAM address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  slot_e         a_slot,
  input  slot_e         b_slot,
  input  slot_e         dst_u,
  input  slot_e         dst_y2,
  output logic          busy,
  output logic          done,
  output slot_e         res_slot,
  output logic          b,
  output logic          rd_en,
  output logic [MA-1:0] rd_addr,
  input  logic [W-1:0]  rd_data,
  output logic          wr_en,
  output logic [MA-1:0] wr_addr,
  output logic [W-1:0]  wr_data
);

  typedef enum logic [3:0] {
    P_IDLE, P_LOAD_B, P_MUL_T, P_LOAD_NP, P_MUL_M, P_LOAD_N, P_MUL_Y, P_SUB, P_DONE
  } phase_e;

  typedef enum logic [1:0] {SRC_MAIN, SRC_TRAM, SRC_ONE} src_e;

  localparam int unsigned CW = $clog2(2*NW + 2) + 1;

  phase_e        phase;
  logic [CW-1:0] icnt;    // issue-side counter of the phase
  logic [CW-1:0] ocnt;    // result-side counter of the phase
  slot_e         a_q, b_q, u_q, y2_q;

  // issue side, combinational
  logic          iss_rd, iss_restart, iss_step, iss_zero;
  src_e          iss_src;
  logic [WA-1:0] iss_word;
  slot_e         iss_slot;

  // issue side, one cycle later (aligned with RAM read data)
  logic          f_rd, f_restart, f_step, f_zero, f_w0;
  src_e          f_src;
  logic [W-1:0]  f_data;

  // engine
  logic          eng_wren, eng_shift, eng_valid;
  logic [W-1:0]  eng_word, eng_mout;

  // T RAM
  logic          t_we, t_re;
  logic [WA:0]   t_waddr, t_raddr;
  logic [W-1:0]  t_rdata;

  // y1 = t + m2 path
  logic          y_v;
  logic [CW-1:0] y_idx;
  logic [W-1:0]  y_m2;
  logic          add_clr, add_en, add_co;
  logic [W-1:0]  add_y;

  // y2 = y1/r - n path
  logic          sub_clr, sub_en, sub_co;
  logic [W-1:0]  sub_y;
  logic          ucarry;

  logic          phase_end;

  // -------------------------------------------------------------- issue side
  always_comb begin
    iss_rd      = 1'b0;
    iss_restart = 1'b0;
    iss_step    = 1'b0;
    iss_zero    = 1'b0;
    iss_src     = SRC_MAIN;
    iss_slot    = a_q;
    iss_word    = WA'(icnt);
    unique case (phase)
      P_LOAD_B, P_LOAD_NP, P_LOAD_N: begin
        iss_rd   = (icnt < CW'(NW));
        iss_slot = (phase == P_LOAD_B) ? b_q : (phase == P_LOAD_NP) ? SLOT_NP : SLOT_N;
      end
      P_MUL_T, P_MUL_M, P_MUL_Y: begin
        // icnt 0: restart; 1..NW: operand words; NW+1..2NW: zero steps
        iss_word    = WA'(icnt - 1'b1);
        iss_restart = (icnt == '0);
        iss_rd      = (icnt >= CW'(1)) && (icnt <= CW'(NW));
        iss_zero    = (icnt > CW'(NW)) && (icnt <= CW'(2*NW)) && (phase != P_MUL_M);
        iss_step    = iss_rd | iss_zero;
        iss_src     = (phase == P_MUL_M) ? SRC_TRAM : SRC_MAIN;
        iss_slot    = (phase == P_MUL_T) ? a_q : SLOT_M;
      end
      P_SUB: begin
        iss_rd   = (icnt < CW'(NW));
        iss_slot = u_q;
      end
      default: ;
    endcase
    if (iss_src == SRC_MAIN && iss_slot == SLOT_ONE) iss_src = SRC_ONE;
  end

  assign rd_en   = iss_rd && (iss_src == SRC_MAIN);
  assign rd_addr = {iss_slot, iss_word};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_rd      <= 1'b0;
      f_restart <= 1'b0;
      f_step    <= 1'b0;
      f_zero    <= 1'b0;
      f_w0      <= 1'b0;
      f_src     <= SRC_MAIN;
    end else begin
      f_rd      <= iss_rd;
      f_restart <= iss_restart;
      f_step    <= iss_step;
      f_zero    <= iss_zero;
      f_w0      <= (iss_word == '0);
      f_src     <= iss_src;
    end
  end

  always_comb begin
    unique case (f_src)
      SRC_TRAM: f_data = t_rdata;
      SRC_ONE:  f_data = f_w0 ? W'(1) : '0;
      default:  f_data = rd_data;
    endcase
  end

  // ------------------------------------------------------------------ engine
  assign eng_wren  = f_rd && (phase == P_LOAD_B || phase == P_LOAD_NP || phase == P_LOAD_N);
  assign eng_shift = f_rd && (phase == P_SUB);

  mult_engine #(.W(W), .NW(NW)) u_engine (
    .clk          (clk),
    .rst_n        (rst_n),
    .restart      (f_restart),
    .step         (f_step),
    .not_domult   (f_zero),
    .multiplicator(f_zero ? '0 : f_data),
    .shiftin_wren (eng_wren),
    .multiplicand (f_data),
    .shift        (eng_shift),
    .dataout_m    (eng_mout),
    .word         (eng_word),
    .valid        (eng_valid)
  );

  // ------------------------------------------------------------------- T RAM
  assign t_we    = eng_valid && (phase == P_MUL_T);
  assign t_waddr = ocnt[WA:0];
  assign t_re    = (iss_rd && phase == P_MUL_M) || (eng_valid && phase == P_MUL_Y);
  assign t_raddr = (phase == P_MUL_M) ? {1'b0, iss_word} : ocnt[WA:0];

  word_ram #(.W(W), .DEPTH(2*NW)) u_tram (
    .clk  (clk),
    .we   (t_we),
    .waddr(t_waddr),
    .wdata(eng_word),
    .re   (t_re),
    .raddr(t_raddr),
    .rdata(t_rdata)
  );

  // ----------------------------------------------------- y1 = t + m2, y2 = y1/r - n
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_v   <= 1'b0;
      y_idx <= '0;
      y_m2  <= '0;
    end else begin
      y_v   <= eng_valid && (phase == P_MUL_Y);
      y_idx <= ocnt;
      y_m2  <= eng_word;
    end
  end

  assign add_clr = (phase == P_LOAD_N);
  assign add_en  = y_v;

  serial_addsub #(.W(W), .SUB(1'b0)) u_add (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(add_clr),
    .en   (add_en),
    .a    (t_rdata),
    .b    (y_m2),
    .y    (add_y),
    .co   (add_co)
  );

  assign sub_clr = (phase == P_MUL_Y);
  assign sub_en  = f_rd && (phase == P_SUB);

  serial_addsub #(.W(W), .SUB(1'b1)) u_sub (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(sub_clr),
    .en   (sub_en),
    .a    (rd_data),
    .b    (eng_mout),
    .y    (sub_y),
    .co   (sub_co)
  );

  // ------------------------------------------------------------- RAM writes
  always_comb begin
    wr_en   = 1'b0;
    wr_addr = '0;
    wr_data = '0;
    unique case (phase)
      P_MUL_M: begin
        wr_en   = eng_valid;
        wr_addr = {SLOT_M, WA'(ocnt)};
        wr_data = eng_word;
      end
      P_MUL_Y: begin
        wr_en   = y_v && (y_idx >= CW'(NW));
        wr_addr = {u_q, WA'(y_idx - CW'(NW))};
        wr_data = add_y;
      end
      P_SUB: begin
        wr_en   = f_rd;
        wr_addr = {y2_q, WA'(ocnt)};
        wr_data = sub_y;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------- sequencing
  always_comb begin
    unique case (phase)
      P_LOAD_B, P_LOAD_NP, P_LOAD_N: phase_end = f_rd && (ocnt == CW'(NW - 1));
      P_MUL_T:                       phase_end = eng_valid && (ocnt == CW'(2*NW - 1));
      P_MUL_M:                       phase_end = eng_valid && (ocnt == CW'(NW - 1));
      P_MUL_Y:                       phase_end = y_v && (y_idx == CW'(2*NW - 1));
      P_SUB:                         phase_end = f_rd && (ocnt == CW'(NW - 1));
      default:                       phase_end = 1'b0;
    endcase
  end

  logic ocnt_inc;
  assign ocnt_inc = (phase == P_MUL_Y || phase == P_MUL_T || phase == P_MUL_M) ? eng_valid : f_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= P_IDLE;
      icnt     <= '0;
      ocnt     <= '0;
      a_q      <= SLOT_N;
      b_q      <= SLOT_N;
      u_q      <= SLOT_A0;
      y2_q     <= SLOT_A1;
      res_slot <= SLOT_A0;
      b        <= 1'b0;
      ucarry   <= 1'b0;
    end else if (phase == P_IDLE) begin
      if (start) begin
        a_q   <= a_slot;
        b_q   <= b_slot;
        u_q   <= dst_u;
        y2_q  <= dst_y2;
        phase <= P_LOAD_B;
        icnt  <= '0;
        ocnt  <= '0;
      end
    end else if (phase == P_DONE) begin
      phase <= P_IDLE;
    end else if (phase_end) begin
      icnt <= '0;
      ocnt <= '0;
      unique case (phase)
        P_LOAD_B:  phase <= P_MUL_T;
        P_MUL_T:   phase <= P_LOAD_NP;
        P_LOAD_NP: phase <= P_MUL_M;
        P_MUL_M:   phase <= P_LOAD_N;
        P_LOAD_N:  phase <= P_MUL_Y;
        P_MUL_Y: begin
          phase  <= P_SUB;
          ucarry <= add_co;       // bit W*NW of y1/r
        end
        default: begin // P_SUB
          phase <= P_DONE;
          // y1/r < n exactly when y1/r - n borrows and y1/r has no top bit
          res_slot <= (sub_co && !ucarry) ? u_q : y2_q;
          b        <= sub_co && !ucarry;
        end
      endcase
    end else begin
      if (icnt != '1) icnt <= icnt + 1'b1;
      if (ocnt_inc)   ocnt <= ocnt + 1'b1;
    end
  end

  assign busy = (phase != P_IDLE);
  assign done = (phase == P_DONE);

  // the low half of y1 = t + m*n is zero by construction
  assert property (@(posedge clk) disable iff (!rst_n)
                   y_v && (y_idx < CW'(NW)) |-> add_y == '0)
    else $error("mont_mult: low half of t + m*n is not zero");

endmodule
