// status_regs: the status registers of a controller. Each register keeps one condition value
// during its reserved period, after the data-path register that produced it may be reused.
//
// Register r loads, at the rising edge of the control-path clock, when load[r] = 1. Its source is
// chosen by sel[r]: values 0 .. N_COND-1 pick a condition input from the data path, values
// N_COND .. N_COND+N_SR-1 pick another status register, so that a condition-value instance can
// be moved from register to register as a pipeline advances. Which value goes to which register
// is decided when the controller is built (by left-edge allocation over the condition-value
// lifetimes); this block only holds the registers. Reset to zero is this design's choice.
//
// Ports: clk_cp, rst_n, cond_in[N_COND], load[N_SR], sel[N_SR], q[N_SR].
module status_regs #(
  parameter int unsigned N_SR   = 1,
  parameter int unsigned N_COND = 1,
  localparam int unsigned N_SRC = N_COND + N_SR,
  localparam int unsigned SELW  = (N_SRC > 1) ? $clog2(N_SRC) : 1
) (
  input  logic                      clk_cp,
  input  logic                      rst_n,
  input  logic [N_COND-1:0]         cond_in,
  input  logic [N_SR-1:0]           load,
  input  logic [N_SR-1:0][SELW-1:0] sel,
  output logic [N_SR-1:0]           q
);
  logic [N_SRC-1:0] src;
  assign src = {q, cond_in};

  always_ff @(posedge clk_cp or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else
      for (int r = 0; r < N_SR; r++)
        if (load[r]) q[r] <= (int'(sel[r]) < N_SRC) ? src[sel[r]] : 1'b0;
  end
endmodule
