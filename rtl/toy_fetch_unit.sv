// toy_fetch_unit: the single-cycle TOY instruction fetch unit.
//
// The PC addresses the instruction memory, whose word is the current
// instruction. An adder forms PC + 1, and a mux chooses the next PC under the
// 2-bit nPCsel: PC + 1 for the next instruction in line, imm8 (the jump
// target carried in the instruction itself), or the ALU output for a jump
// through registers. The fourth code holds the PC, which is how a halted
// machine stops; it is this design's addition.
//
// Interface: run gates the PC update, so a host can load memory first.
// Timing: the PC loads the next PC at the rising clock edge when run is on;
// the instruction and PC + 1 are combinational from the PC. Active-low
// rst_n clears the PC to 0 (reset value is this design's choice).
module toy_fetch_unit
  import toy_pkg::*;
#(
  parameter int unsigned PC_W = 8,
  parameter int unsigned DW   = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  npc_sel_e        npc_sel,
  input  logic [PC_W-1:0] imm8,
  input  logic [PC_W-1:0] alu_target,
  output logic [PC_W-1:0] pc,
  output logic [PC_W-1:0] pc_plus1,
  output logic [DW-1:0]   instr,
  // instruction memory load port
  input  logic            prog_we,
  input  logic [PC_W-1:0] prog_addr,
  input  logic [DW-1:0]   prog_data
);
  logic [PC_W-1:0] next_pc;

  assign pc_plus1 = pc + PC_W'(1);

  always_comb begin
    unique case (npc_sel)
      NPC_INC: next_pc = pc_plus1;
      NPC_IMM: next_pc = imm8;
      NPC_ALU: next_pc = alu_target;
      default: next_pc = pc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   pc <= '0;
    else if (run) pc <= next_pc;
  end

  toy_imem #(.AW(PC_W), .DW(DW)) u_imem (
    .clk      (clk),
    .addr     (pc),
    .rdata    (instr),
    .prog_we  (prog_we),
    .prog_addr(prog_addr),
    .prog_data(prog_data)
  );
endmodule
