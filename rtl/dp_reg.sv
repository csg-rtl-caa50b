// dp_reg: a data-path register. Positive-edge D flip-flops clocked by the data-path clock,
// loaded when the controller raises its register write signal (we) and holding otherwise.
//
// The asynchronous active-low reset to zero is this design's choice; the register classes and
// the positive-edge D flip-flop come from the clocking scheme the controllers are built for.
//
// Ports: clk_dp, rst_n, we, d, q. Timing: q takes d at the rising edge of clk_dp when we = 1.
module dp_reg #(
  parameter int unsigned WIDTH = csg_pkg::W
) (
  input  logic             clk_dp,
  input  logic             rst_n,
  input  logic             we,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk_dp or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (we) q <= d;
  end
endmodule
