// ctrl_nsr: a controller without status registers (Mealy finite state machine).
//
// Condition values that must be remembered are kept in the state itself: a time step in which
// k condition values are reserved is represented by up to 2**k states, one per combination of
// those values, and a state branches to two successors exactly where a condition value begins
// its reserved period. For a pipelined schedule the states of a folded time step are the
// Cartesian product of the state sets of the time steps folded onto it. The parts are the state
// register, a PLA with inputs {condition inputs, state} and outputs {next state, control word},
// and output registers. That construction follows the controller style without status
// registers; the state codes (time-step order) and the unminimised PLA are this design's.
//
// Timing is that of ctrl_sr: at a rising edge of clk_cp the control word of the state being left
// is captured in the output registers and the state register advances; the data path executes
// the step at the next rising edge of clk_dp. Unused state codes have no PLA term and so fall
// back to code 0.
//
// Ports: clk_cp, rst_n, cond_in[N_COND], ctrl[CTRL_W], state (for observation).
module ctrl_nsr import csg_pkg::*; #(
  parameter int unsigned   SW          = NP_NSR_SW,
  parameter int unsigned   N_COND      = 1,
  parameter int unsigned   CW          = CTRL_W,
  parameter int unsigned   N_TERMS     = NP_NSR_TERMS,
  parameter pla_pers_t     PERS        = np_nsr_pers(),
  parameter logic [SW-1:0] RESET_STATE = '0,
  localparam int unsigned N_IN  = SW + N_COND,
  localparam int unsigned N_OUT = CW + SW
) (
  input  logic              clk_cp,
  input  logic              rst_n,
  input  logic [N_COND-1:0] cond_in,
  output logic [CW-1:0]     ctrl,
  output logic [SW-1:0]     state
);
  logic [N_OUT-1:0] pla_out;

  pla #(.N_IN(N_IN), .N_OUT(N_OUT), .N_TERMS(N_TERMS), .PERS(PERS)) u_pla (
    .in ({cond_in, state}),
    .out(pla_out)
  );

  // state register and output registers
  always_ff @(posedge clk_cp or negedge rst_n) begin
    if (!rst_n) begin
      state <= RESET_STATE;
      ctrl  <= '0;
    end else begin
      state <= pla_out[N_OUT-1 -: SW];
      ctrl  <= pla_out[CW-1:0];
    end
  end
endmodule
