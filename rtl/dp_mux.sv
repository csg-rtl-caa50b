// dp_mux: an N-input data-path multiplexer. The controller's multiplexer port select signal
// (sel, binary encoded) picks which input port reaches the output.
//
// Binary encoding of the select word is this design's choice (it is how several mux ports share
// few control bits). A select value beyond the last port gives zero.
//
// Ports: in[N] data inputs, sel, y. Combinational.
module dp_mux #(
  parameter int unsigned WIDTH = csg_pkg::W,
  parameter int unsigned N     = 2,
  localparam int unsigned SW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][WIDTH-1:0] in,
  input  logic [SW-1:0]           sel,
  output logic [WIDTH-1:0]        y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++)
      if (sel == SW'(i)) y = in[i];
  end
endmodule
