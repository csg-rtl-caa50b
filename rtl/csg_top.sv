// csg_top: the conditional example of control path synthesis in all four forms, side by side.
//
//   np_sr   unpipelined schedule (ring of 4 states), controller with a status register
//   np_nsr  unpipelined schedule, controller without status registers (5 states)
//   pl_sr   schedule folded with initiation interval 2 (ring of 2 states), status register
//   pl_nsr  folded schedule, controller without status registers (3 states)
//
// The two unpipelined systems share the operand port np_in and the two pipelined ones share
// pl_in, so each pair shows the two controller styles computing the same results cycle for
// cycle. Each system has its own data path (see fig2_system and fig2_datapath).
//
// Clocking: clk_dp and clk_cp are two non-overlapping clocks; a rising edge of clk_cp (issue a
// time step) is always followed by a rising edge of clk_dp (execute it) before the next clk_cp
// edge. rst_n is an asynchronous active-low reset. An unpipelined system reads a new operand set
// every 4 cycles, a pipelined one every 2; see fig2_system for the step-by-step input timing.
module csg_top import csg_pkg::*; (
  input  logic         clk_dp,
  input  logic         clk_cp,
  input  logic         rst_n,
  input  operands_t    np_in,
  input  operands_t    pl_in,
  output logic [W-1:0] np_sr_result,
  output logic [W-1:0] np_nsr_result,
  output logic [W-1:0] pl_sr_result,
  output logic [W-1:0] pl_nsr_result,
  output ctrl_t        np_sr_ctrl,
  output ctrl_t        np_nsr_ctrl,
  output ctrl_t        pl_sr_ctrl,
  output ctrl_t        pl_nsr_ctrl,
  output logic [3:0]   cond,
  output logic [3:0][2:0] state
);
  fig2_system #(.PIPELINED(1'b0), .USE_SR(1'b1)) u_np_sr (
    .clk_dp, .clk_cp, .rst_n, .in(np_in), .result(np_sr_result), .ctrl(np_sr_ctrl),
    .cond(cond[0]), .state(state[0])
  );
  fig2_system #(.PIPELINED(1'b0), .USE_SR(1'b0)) u_np_nsr (
    .clk_dp, .clk_cp, .rst_n, .in(np_in), .result(np_nsr_result), .ctrl(np_nsr_ctrl),
    .cond(cond[1]), .state(state[1])
  );
  fig2_system #(.PIPELINED(1'b1), .USE_SR(1'b1)) u_pl_sr (
    .clk_dp, .clk_cp, .rst_n, .in(pl_in), .result(pl_sr_result), .ctrl(pl_sr_ctrl),
    .cond(cond[2]), .state(state[2])
  );
  fig2_system #(.PIPELINED(1'b1), .USE_SR(1'b0)) u_pl_nsr (
    .clk_dp, .clk_cp, .rst_n, .in(pl_in), .result(pl_nsr_result), .ctrl(pl_nsr_ctrl),
    .cond(cond[3]), .state(state[3])
  );
endmodule
