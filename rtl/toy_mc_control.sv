// toy_mc_control: control of the multicycle TOY processor.
//
// In the multicycle design the control depends on both the instruction and
// time: its inputs are the instruction's opcode and indexed-addressing bit,
// the Cond register (flags of R0 captured in the execute stage) and the
// stage counter. For each stage it enables the temporary registers that
// stage fills, sets the ALU, memory and write-back selects, says when the PC
// is written and from where, and tells the counter its next value.
//
// Stages visited per instruction (this design's schedule; the lecture only
// says short instructions skip unnecessary cycles):
//   ALU ops        fetch decode execute write-back          (4 cycles)
//   lda, jl        fetch decode write-back                  (3 cycles)
//   load           fetch decode execute memory write-back   (5 cycles)
//   store, bz, bp,
//   jr, jmp        fetch decode execute memory              (4 cycles)
//   halt           fetch decode, then the processor stops   (2 cycles)
// The PC is written in an instruction's last stage: from NPC normally, from
// Imm for a taken branch or a jump, from Result for jr.
// Timing: purely combinational.
module toy_mc_control
  import toy_pkg::*;
(
  input  opcode_e    opcode,
  input  logic       r0_hi,
  input  logic [1:0] cond,
  input  stage_e     stage,
  output mc_ctrl_t   ctrl
);
  logic is_alu_op;
  assign is_alu_op = (opcode inside {OP_ADD, OP_SUB, OP_MUL, OP_XOR, OP_AND, OP_SHR, OP_SHL});

  always_comb begin
    ctrl = '{ir_we: 1'b0, dec_we: 1'b0, ex_we: 1'b0, mdata_we: 1'b0,
             alu_ctr: ALU_ADD, addr_sel: 1'b0, mem_wr: 1'b0, reg_wr: 1'b0,
             wb_sel: WB_ALU, pc_we: 1'b0, pc_src: PC_NPC,
             next_stage: ST_FETCH, halt: 1'b0};
    unique case (stage)
      ST_FETCH: begin
        ctrl.ir_we      = 1'b1;
        ctrl.next_stage = ST_DECODE;
      end
      ST_DECODE: begin
        ctrl.dec_we = 1'b1;
        if (opcode == OP_HALT)                    ctrl.halt       = 1'b1;
        else if (opcode inside {OP_LDA, OP_JL})   ctrl.next_stage = ST_WB;
        else                                      ctrl.next_stage = ST_EXEC;
      end
      ST_EXEC: begin
        ctrl.ex_we = 1'b1;
        unique case (opcode)
          OP_SUB:  ctrl.alu_ctr = ALU_SUB;
          OP_MUL:  ctrl.alu_ctr = ALU_MUL;
          OP_XOR:  ctrl.alu_ctr = ALU_XOR;
          OP_AND:  ctrl.alu_ctr = ALU_AND;
          OP_SHR:  ctrl.alu_ctr = ALU_SHR;
          OP_SHL:  ctrl.alu_ctr = ALU_SHL;
          default: ctrl.alu_ctr = ALU_ADD;
        endcase
        ctrl.next_stage = is_alu_op ? ST_WB : ST_MEM;
      end
      ST_MEM: begin
        ctrl.addr_sel = r0_hi;
        unique case (opcode)
          OP_LD: begin ctrl.mdata_we = 1'b1; ctrl.next_stage = ST_WB; end
          OP_ST: begin ctrl.mem_wr = 1'b1; ctrl.pc_we = 1'b1; end
          OP_BZ: begin ctrl.pc_we = 1'b1; if (cond[COND_ZERO]) ctrl.pc_src = PC_IMM; end
          OP_BP: begin ctrl.pc_we = 1'b1; if (cond[COND_POS])  ctrl.pc_src = PC_IMM; end
          OP_JR:  begin ctrl.pc_we = 1'b1; ctrl.pc_src = PC_RESULT; end
          OP_JMP: begin ctrl.pc_we = 1'b1; ctrl.pc_src = PC_IMM; end
          default: ;
        endcase
      end
      ST_WB: begin
        ctrl.reg_wr = 1'b1;
        ctrl.pc_we  = 1'b1;
        unique case (opcode)
          OP_LD:   ctrl.wb_sel = WB_MEM;
          OP_LDA:  ctrl.wb_sel = WB_IMM;
          OP_JL:   begin ctrl.wb_sel = WB_PC1; ctrl.pc_src = PC_IMM; end
          default: ctrl.wb_sel = WB_ALU;
        endcase
      end
      default: ;
    endcase
  end
endmodule
