// dp_bus: a data-path bus with N tri-state drivers. Driver i puts in[i] on the bus while its
// tri-state-driver enable en[i] is 1.
//
// The bus is written as the AND-OR network that a two-valued model of tri-state drivers gives:
// with no driver enabled it reads zero (a floating bus in silicon). That modelling is this
// design's choice. At most one driver may be enabled at a time; an assertion checks it.
//
// Ports: in[N], en[N], y. Combinational.
module dp_bus #(
  parameter int unsigned WIDTH = csg_pkg::W,
  parameter int unsigned N     = 2
) (
  input  logic [N-1:0][WIDTH-1:0] in,
  input  logic [N-1:0]            en,
  output logic [WIDTH-1:0]        y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++)
      y |= in[i] & {WIDTH{en[i]}};
  end

  always_comb
    assert ($onehot0(en)) else $error("dp_bus: more than one driver enabled");
endmodule
