// sx_alu: the single 32-bit ALU of the stack processor's data path.
//
// Operand a comes from multiplexer x (p1: TS, SP, FP or NX) and operand b from
// multiplexer y (p2: FF, arg, arg[23:2] or AA). The result drives tbus, which
// feeds the register bank, the PC (via mux j) and the memory address (via mux
// a). Purely combinational. The data path connections follow the published
// design; the set of operations is this design's own, chosen to cover the
// assumed instruction set (stack arithmetic, comparisons, pointer +/-1). The
// "R" operations take b as the left operand, because the second stack
// element sits in FF (p2) while the top sits in TS (p1). `zero` flags a
// zero result and is the only status the control unit looks at.
module sx_alu
  import sx_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        zero
);
  always_comb begin
    unique case (op)
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_RSUB:  y = b - a;
      ALU_MUL:   y = a * b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_RSHL:  y = b << a[4:0];
      ALU_RSHR:  y = b >> a[4:0];
      ALU_EQ:    y = {31'd0, a == b};
      ALU_RLT:   y = {31'd0, $signed(b) < $signed(a)};
      ALU_RGT:   y = {31'd0, $signed(b) > $signed(a)};
      ALU_NOT:   y = ~a;
      ALU_INC:   y = a + 32'd1;
      ALU_DEC:   y = a - 32'd1;
      default:   y = a;
    endcase
  end
  assign zero = (y == 32'd0);
endmodule
