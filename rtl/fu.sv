// fu: one functional unit of the 16-bit design library: comparator (>), adder, subtractor or
// multiplier, chosen by the OP parameter.
//
// Purely combinational. The comparator returns 1 in bit 0 when a > b, as the library lists a
// "Comparator (>)"; the operands are taken as unsigned, which is this design's choice. The
// multiplier keeps the low W bits of the product so that every unit has a W-bit result; that,
// too, is a choice of this design. Adder and subtractor wrap modulo 2**W.
//
// Ports: a, b operands; y result. No clock; the library quotes 34 ns to 48 ns of delay, which
// fits in one time step.
module fu import csg_pkg::*; #(
  parameter int unsigned WIDTH = csg_pkg::W,
  parameter fu_op_t      OP    = FU_ADD
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    unique case (OP)
      FU_CMP: y = {{(WIDTH-1){1'b0}}, (a > b)};
      FU_ADD: y = a + b;
      FU_SUB: y = a - b;
      FU_MUL: y = a * b;  // a WIDTH-bit context keeps the low bits of the product
      default: y = '0;
    endcase
  end
endmodule
