// mm_product: product part of the word-serial multiplication engine.
//
// The multiplicand (NW words) is shifted into a ser2par register. Each
// engine step takes one W-bit multiplicator word, registers it (unit delay
// 3), multiplies it by the whole multiplicand vector in vec_mult (NW
// parallel WxW multipliers) and registers the NW 2W-bit products (unit
// delay 4). A switch then replaces the products by zero when the step was a
// restart or a not_domult step (restart OR not_domult selects the constant
// 0). not_domult steps let the accumulator keep shifting out the upper half
// of a product without adding anything.
//
// Interface: a step token (step, restart, not_domult, multiplicator) given
// in cycle c appears on qual_p / p_step / p_restart in cycle c+2. restart
// and step are not given together. The control bits are delayed along with
// the data inside this block (a choice of this design) so that the caller
// presents them with the multiplicator word. The multiplicand must not be
// written while steps are in flight.
module mm_product #(
  parameter int unsigned W  = 16,
  parameter int unsigned NW = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // step control
  input  logic                   restart,
  input  logic                   step,
  input  logic                   not_domult,
  input  logic [W-1:0]           multiplicator,
  // multiplicand loading
  input  logic                   shiftin_wren,
  input  logic [W-1:0]           multiplicand,
  input  logic                   shift,
  output logic [W-1:0]           dataout_m,
  // gated products, two cycles after the step
  output logic [NW-1:0][2*W-1:0] qual_p,
  output logic                   p_step,
  output logic                   p_restart
);

  logic [NW-1:0][W-1:0]   mcand;
  logic [W-1:0]           mult_q;      // unit delay 3
  logic                   step_q, restart_q, zero_q;
  logic [NW-1:0][2*W-1:0] prod, prod_q; // unit delay 4
  logic                   step_q2, restart_q2, zero_q2;

  ser2par #(.W(W), .NW(NW)) u_ser2par (
    .clk      (clk),
    .wr_en    (shiftin_wren),
    .datain   (multiplicand),
    .shift    (shift),
    .dataout  (mcand),
    .dataout_m(dataout_m)
  );

  vec_mult #(.W(W), .NW(NW)) u_vec_mult (
    .a(mult_q),
    .b(mcand),
    .p(prod)
  );

  always_ff @(posedge clk) begin
    mult_q <= multiplicator;
    prod_q <= prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q     <= 1'b0;
      restart_q  <= 1'b0;
      zero_q     <= 1'b0;
      step_q2    <= 1'b0;
      restart_q2 <= 1'b0;
      zero_q2    <= 1'b0;
    end else begin
      step_q     <= step;
      restart_q  <= restart;
      zero_q     <= restart | not_domult;
      step_q2    <= step_q;
      restart_q2 <= restart_q;
      zero_q2    <= zero_q;
    end
  end

  // switch: constant 0 on restart or not_domult
  assign qual_p    = zero_q2 ? '0 : prod_q;
  assign p_step    = step_q2;
  assign p_restart = restart_q2;

endmodule
