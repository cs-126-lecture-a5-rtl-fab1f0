// toy_alu: the TOY arithmetic-logic unit.
//
// Two WIDTH-bit operands, one WIDTH-bit result, and a 3-bit ALUctrl that
// selects one of the seven operations the lecture lists: add, subtract,
// multiply, exclusive or, and, shift right, shift left. Every operation is
// computed in parallel and a mux picks one, the simplest circuit with this
// function (the lecture gives the function, not the insides).
//
// Design choices: the control codes (see toy_pkg::alu_op_e), code 7 passing
// operand a through, the product keeping its low WIDTH bits, and shifts being
// logical by the low log2(WIDTH) bits of b.
//
// Timing: purely combinational.
module toy_alu
  import toy_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          alu_ctrl,
  output logic [WIDTH-1:0] y
);
  localparam int unsigned SH_W = $clog2(WIDTH);

  logic [SH_W-1:0] shamt;
  assign shamt = b[SH_W-1:0];

  always_comb begin
    unique case (alu_ctrl)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_MUL:  y = a * b;
      ALU_XOR:  y = a ^ b;
      ALU_AND:  y = a & b;
      ALU_SHR:  y = a >> shamt;
      ALU_SHL:  y = a << shamt;
      default:  y = a;
    endcase
  end
endmodule
