// ctrl_sr: a controller that uses status registers (Mealy finite state machine).
//
// Because status registers remember the condition values, the state diagram is a plain ring:
// one state per time step of a non-pipelined schedule, or one per step of the initiation
// interval of a pipelined (folded) schedule, each state naming the next one. The parts are:
//  * the state register, SW flip-flops on the control-path clock, reset to the first state;
//  * N_SR status registers (status_regs);
//  * a PLA whose inputs are {status registers, condition inputs, state} and whose outputs are
//    {next state, per status register {source select, load}, control word};
//  * output registers that hold the control word while the data path executes, so that the
//    data path never sees the PLA outputs change under it.
// In a state with no condition value alive the control word depends on the state alone; with
// conditions alive the PLA terms that look at them add the conditional control signals (the
// if-then-else and case forms of a state). All of this follows the status-register controller
// style; the PLA personality itself (no minimisation, codes in time-step order) is this design's.
//
// Timing, with two non-overlapping clocks where each data-path clock edge is followed by a
// control-path clock edge: at a rising edge of clk_cp the PLA has evaluated the state to be
// issued, using the condition values the data path stored at the previous clk_dp edge; the
// control word is captured in the output registers and the state register moves to the next
// state. The following rising edge of clk_dp executes that step in the data path. So a condition
// value written at the end of step B steers control signals from step B+1 on.
//
// Ports: clk_cp, rst_n, cond_in[N_COND] (condition values from data-path registers),
// ctrl[CTRL_W] (registered control signals), state (the state register, for observation),
// status (the status registers, for observation).
module ctrl_sr import csg_pkg::*; #(
  parameter int unsigned SW          = NP_SR_SW,
  parameter int unsigned N_COND      = 1,
  parameter int unsigned N_SR        = 1,
  parameter int unsigned CW          = CTRL_W,
  parameter int unsigned N_TERMS     = NP_SR_TERMS,
  parameter pla_pers_t   PERS        = np_sr_pers(),
  parameter logic [SW-1:0] RESET_STATE = '0,
  localparam int unsigned SELW = (N_COND + N_SR > 1) ? $clog2(N_COND + N_SR) : 1,
  localparam int unsigned N_IN  = SW + N_COND + N_SR,
  localparam int unsigned N_OUT = CW + N_SR * (1 + SELW) + SW
) (
  input  logic              clk_cp,
  input  logic              rst_n,
  input  logic [N_COND-1:0] cond_in,
  output logic [CW-1:0]     ctrl,
  output logic [SW-1:0]     state,
  output logic [N_SR-1:0]   status
);
  logic [N_OUT-1:0]           pla_out;
  logic [SW-1:0]              next_state;
  logic [CW-1:0]              ctrl_next;
  logic [N_SR-1:0]            sr_load;
  logic [N_SR-1:0][SELW-1:0]  sr_sel;

  pla #(.N_IN(N_IN), .N_OUT(N_OUT), .N_TERMS(N_TERMS), .PERS(PERS)) u_pla (
    .in ({status, cond_in, state}),
    .out(pla_out)
  );

  always_comb begin
    ctrl_next  = pla_out[CW-1:0];
    next_state = pla_out[N_OUT-1 -: SW];
    for (int r = 0; r < N_SR; r++) begin
      sr_load[r] = pla_out[CW + r*(1+SELW)];
      sr_sel[r]  = pla_out[CW + r*(1+SELW) + 1 +: SELW];
    end
  end

  status_regs #(.N_SR(N_SR), .N_COND(N_COND)) u_sr (
    .clk_cp, .rst_n, .cond_in, .load(sr_load), .sel(sr_sel), .q(status)
  );

  // state register and output registers
  always_ff @(posedge clk_cp or negedge rst_n) begin
    if (!rst_n) begin
      state <= RESET_STATE;
      ctrl  <= '0;
    end else begin
      state <= next_state;
      ctrl  <= ctrl_next;
    end
  end
endmodule
