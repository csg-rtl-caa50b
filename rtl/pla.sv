// pla: a programmable logic array, the combinational part of a controller.
//
// The AND plane forms N_TERMS product terms. Term t is 1 when every input i with CARE[t][i] = 1
// equals VAL[t][i]; inputs with CARE = 0 are not connected to that term. The OR plane drives
// output o with the OR of all terms t that have ORP[t][o] = 1. The personality (CARE, VAL, ORP)
// is a parameter, so one module serves every controller; csg_pkg builds the personalities of the
// example controllers. The default personality is the non-pipelined status-register controller.
//
// Ports: in[N_IN], out[N_OUT]. Combinational; the controller registers the outputs.
module pla import csg_pkg::*; #(
  parameter int unsigned N_IN    = NP_SR_SW + 2,
  parameter int unsigned N_OUT   = CTRL_W + 2 + NP_SR_SW,
  parameter int unsigned N_TERMS = NP_SR_TERMS,
  parameter pla_pers_t   PERS    = np_sr_pers()
) (
  input  logic [N_IN-1:0]  in,
  output logic [N_OUT-1:0] out
);
  logic [N_TERMS-1:0] term;

  always_comb begin
    for (int t = 0; t < N_TERMS; t++)
      term[t] = ((in ^ PERS.val[t][N_IN-1:0]) & PERS.care[t][N_IN-1:0]) == '0;
    out = '0;
    for (int t = 0; t < N_TERMS; t++)
      if (term[t]) out |= PERS.orp[t][N_OUT-1:0];
  end
endmodule
