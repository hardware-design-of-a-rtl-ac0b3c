// eqmux_op: one comparator operator of the comparator array.
//
// It compares operand a with operand b and passes operand c when they are
// equal and operand d when they differ: o = (a == b) ? c : d. With c tied
// to the constant 1 and d to the constant 0 it turns a sample base and a
// target base into a 1-bit match flag, which is how the processing unit
// uses it. The four-operand form (a, b, c, d in, o out) follows the
// operator of the design; the widths are parameters, set by default to a
// 2-bit base and a 1-bit flag.
//
// Purely combinational: the result is valid in the same cycle as the
// operands, and the surrounding registers form the pipeline.
module eqmux_op #(
  parameter int unsigned W  = 2,  // width of the compared operands
  parameter int unsigned OW = 1   // width of the selected operands
) (
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [OW-1:0] c,   // result on a == b
  input  logic [OW-1:0] d,   // result on a != b
  output logic [OW-1:0] o
);

  always_comb begin
    if (a == b) o = c;
    else        o = d;
  end

endmodule
