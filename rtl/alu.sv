// Single-rail ALU of the solver datapath.
//
// Combinational, like a synchronous ALU: with bundled data the matched
// delay element of the ALU's acknowledge generator covers its worst-case
// delay, so the ALU itself needs no completion detection. Operations (two's
// complement, W bits): ADD a+b, SUB a-b, LT (a<b signed, result 0 or 1).
// The operation set is the one the solver's loop needs; the document only
// names ALUs as functional units.
module alu
  import diffeq_pkg::*;
#(
  parameter int W = 16
) (
  input  alu_op_e       op,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic [W-1:0]  y
);
  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_LT:  y = {{(W-1){1'b0}}, ($signed(a) < $signed(b))};
      default: y = '0;
    endcase
  end
endmodule
