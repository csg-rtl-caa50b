// fig2_system: the conditional example with its controller: fig2_datapath steered by either a
// status-register controller (ctrl_sr) or a controller without status registers (ctrl_nsr).
//
// PIPELINED = 0 runs the four-step schedule as a ring of four time steps: a new set of inputs
// every 4 clock cycles. PIPELINED = 1 folds it with an initiation interval of 2: steps 1 and 3
// share one state and steps 2 and 4 the other, a new set of inputs every 2 cycles, each result 4
// cycles after its inputs. USE_SR picks the controller style. The condition value p > q is born
// in step 1, read from the data path in step 2 and reserved in step 3; with status registers it
// is copied into one status register while step 2 is issued, without them it splits the state
// of step 3 in two. Both styles issue the same control signals cycle by cycle.
//
// Clocking: two non-overlapping clocks; each rising edge of clk_cp issues one time step, and the
// rising edge of clk_dp that follows executes it. After reset the first clk_cp edge issues step
// 1 (the first folded step when pipelined). Inputs of iteration j are read at cycle
// j*II + (step-1), counting cycles from 0 at the first clk_cp edge; ROUT holds its result after
// the clk_dp edge of cycle j*II + 3 (II = 4 unpipelined, 2 pipelined).
//
// Ports: clk_dp, clk_cp, rst_n, in (operands), result, ctrl (current control word), cond (the
// data-path condition register), state (controller state register, zero-extended to 3 bits).
module fig2_system import csg_pkg::*; #(
  parameter bit PIPELINED = 1'b0,
  parameter bit USE_SR    = 1'b1
) (
  input  logic         clk_dp,
  input  logic         clk_cp,
  input  logic         rst_n,
  input  operands_t    in,
  output logic [W-1:0] result,
  output ctrl_t        ctrl,
  output logic         cond,
  output logic [2:0]   state
);
  fig2_datapath u_dp (
    .clk_dp, .rst_n, .ctrl, .in, .cond, .result, .r1(), .r2(), .r3()
  );

  if (USE_SR) begin : g_sr
    localparam int unsigned SW = PIPELINED ? PL_SR_SW : NP_SR_SW;
    logic [SW-1:0] st;
    ctrl_sr #(
      .SW     (SW),
      .N_TERMS(PIPELINED ? PL_SR_TERMS : NP_SR_TERMS),
      .PERS   (PIPELINED ? pl_sr_pers() : np_sr_pers())
    ) u_ctrl (
      .clk_cp, .rst_n, .cond_in(cond), .ctrl, .state(st), .status()
    );
    assign state = 3'(st);
  end else begin : g_nsr
    localparam int unsigned SW = PIPELINED ? PL_NSR_SW : NP_NSR_SW;
    logic [SW-1:0] st;
    ctrl_nsr #(
      .SW     (SW),
      .N_TERMS(PIPELINED ? PL_NSR_TERMS : NP_NSR_TERMS),
      .PERS   (PIPELINED ? pl_nsr_pers() : np_nsr_pers())
    ) u_ctrl (
      .clk_cp, .rst_n, .cond_in(cond), .ctrl, .state(st)
    );
    assign state = 3'(st);
  end
endmodule
