// fig2_datapath: register-transfer data path of the small conditional example
//
//     if (p > q) y = ((a + b) + c) * d * e;   else y = (a + b) * e;
//
// scheduled in four time steps: step 1 computes p > q and a + b; step 2 adds c on branch 1;
// step 3 multiplies by d on branch 1 and joins the branches; step 4 multiplies by e.
//
// Resources are one comparator, one adder and one multiplier (16-bit library units), shared
// through multiplexers. Values are bound to registers so that no value lives longer than two
// time steps, which lets the same data path run the schedule unpipelined or folded with an
// initiation interval of 2:
//   RC   <- p > q                 (the condition value; read by the controller in step 2)
//   R1   <- a + b                 (step 1)
//   R2   <- R1 + c  or  R1        (step 2, multiplexer selects branch 1 or branch 0)
//   R3   <- R2 * d  or  R2        (step 3, tri-state join bus: multiplier or R2 drives it)
//   ROUT <- R3 * e                (step 4)
// The operations, their steps and the branch structure follow the example; the register and
// multiplexer binding and the bus used for the join are this design's choices.
//
// Ports: clk_dp (data-path clock), rst_n, ctrl (registered control word, see csg_pkg::ctrl_t),
// in (primary inputs, each read in its step), cond (RC, to the controller), result (ROUT), and
// r1..r3 for observation. Every register loads at the rising edge of clk_dp when its write
// signal is set.
module fig2_datapath import csg_pkg::*; (
  input  logic         clk_dp,
  input  logic         rst_n,
  input  ctrl_t        ctrl,
  input  operands_t    in,
  output logic         cond,
  output logic [W-1:0] result,
  output logic [W-1:0] r1,
  output logic [W-1:0] r2,
  output logic [W-1:0] r3
);
  logic [W-1:0] cmp_y, add_a, add_b, add_y, mul_a, mul_b, mul_y, r2_d, join_bus;

  // functional units
  fu #(.OP(FU_CMP)) u_cmp (.a(in.p), .b(in.q), .y(cmp_y));
  fu #(.OP(FU_ADD)) u_add (.a(add_a), .b(add_b), .y(add_y));
  fu #(.OP(FU_MUL)) u_mul (.a(mul_a), .b(mul_b), .y(mul_y));

  // operand multiplexers
  dp_mux #(.N(2)) u_mux_add_a (.in({r1, in.a}), .sel(ctrl.add_a_sel), .y(add_a));
  dp_mux #(.N(2)) u_mux_add_b (.in({in.c, in.b}), .sel(ctrl.add_b_sel), .y(add_b));
  dp_mux #(.N(2)) u_mux_mul_a (.in({r3, r2}), .sel(ctrl.mul_a_sel), .y(mul_a));
  dp_mux #(.N(2)) u_mux_mul_b (.in({in.e, in.d}), .sel(ctrl.mul_b_sel), .y(mul_b));

  // branch select of step 2 and join bus of step 3
  dp_mux #(.N(2)) u_mux_r2 (.in({add_y, r1}), .sel(ctrl.r2_sel), .y(r2_d));
  dp_bus #(.N(2)) u_join (.in({mul_y, r2}), .en({ctrl.r3_en_mul, ctrl.r3_en_pass}),
                          .y(join_bus));

  // registers
  dp_reg #(.WIDTH(1)) u_rc (.clk_dp, .rst_n, .we(ctrl.rc_we), .d(cmp_y[0]), .q(cond));
  dp_reg u_r1   (.clk_dp, .rst_n, .we(ctrl.r1_we),   .d(add_y),    .q(r1));
  dp_reg u_r2   (.clk_dp, .rst_n, .we(ctrl.r2_we),   .d(r2_d),     .q(r2));
  dp_reg u_r3   (.clk_dp, .rst_n, .we(ctrl.r3_we),   .d(join_bus), .q(r3));
  dp_reg u_rout (.clk_dp, .rst_n, .we(ctrl.rout_we), .d(mul_y),    .q(result));

endmodule
