// Multiply-accumulate (MAC) unit: acc <- acc + x*y or acc <- acc - x*y.
//
// Structure, a two-stage pipeline:
//   stage 1  vedic_mult, an N x N Urdhva-Tiryakbhyam (Vedic) multiplier
//            built recursively from half-size multipliers and Kogge-Stone
//            adders, forms the 2N-bit product; product_reg registers it
//            together with its control bits.
//   stage 2  add_sub, a 2N-bit Kogge-Stone adder/subtractor made of
//            reversible gates, adds the registered product to (or subtracts
//            it from) the accumulator value fed back from the accumulator
//            register, which loads the result.
//
// Interface and timing:
//   in_valid, x, y, sub, clr are sampled on a rising clk edge. in_valid = 1
//   issues x*y; sub = 1 subtracts the product instead of adding it; clr = 1
//   drops the old sum (with in_valid the sum restarts at +/- x*y, without
//   it the accumulator is zeroed). One operation per clock can be issued.
//   An operation sampled at edge t is in the product register after edge t
//   and in acc after edge t+1; acc_valid is 1 in the cycle following each
//   update of acc. Operands are unsigned; the 2N-bit
//   accumulator wraps modulo 2^(2N). rst_n is asynchronous, active low.
//
// The blocks, their order and the feedback loop, the Vedic multiplier with
// Kogge-Stone adders and the 64-bit operand width follow the MAC the design
// is based on. The accumulator width of 2N, unsigned operands, the clear
// input, the pipeline control and the reset are this design's choices.
module mac_top
  import mac_pkg::*;
#(
  parameter int unsigned N = MAC_N
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic           sub,
  input  logic           clr,
  output logic [2*N-1:0] acc,
  output logic           acc_valid
);
  localparam int unsigned W = 2 * N;

  mac_ctrl_t      in_ctrl, p_ctrl;
  logic [W-1:0]   prod, p_prod;
  logic [W-1:0]   add_a, add_b, add_y;

  // Stage 1: multiply and register.
  vedic_mult #(.N(N)) u_mult (.a(x), .b(y), .p(prod));

  assign in_ctrl = '{valid: in_valid, clr: clr, op: (sub ? OP_SUB : OP_ADD)};

  product_reg #(.W(W)) u_preg (
    .clk(clk), .rst_n(rst_n),
    .d_ctrl(in_ctrl), .d_prod(prod),
    .q_ctrl(p_ctrl), .q_prod(p_prod)
  );

  // Stage 2: add/subtract into the accumulator.
  always_comb begin
    add_a = p_ctrl.clr   ? '0 : acc;
    add_b = p_ctrl.valid ? p_prod : '0;
  end

  add_sub #(.W(W)) u_addsub (.a(add_a), .b(add_b), .op(p_ctrl.op), .y(add_y));

  accumulator #(.W(W)) u_acc (
    .clk(clk), .rst_n(rst_n),
    .en(p_ctrl.valid | p_ctrl.clr), .d(add_y),
    .q(acc), .q_valid(acc_valid)
  );
endmodule
