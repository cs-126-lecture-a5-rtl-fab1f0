// toy_pkg: types and constants shared by the TOY processor blocks.
//
// TOY is a 16-bit machine with eight 16-bit registers and 256-word
// instruction and data memories. An instruction is one 16-bit word with four
// 4-bit fields: opcode [15:12], r0 [11:8], r1 [7:4], r2 [3:0]. Register
// selects are 3 bits wide, so a register number is the low three bits of its
// field; the top bit of the r0 field selects indexed addressing for loads and
// stores. imm8 is [7:0] (the r1 and r2 fields together).
//
// The field layout, the 3-bit register selects, the seven ALU operations and
// the control-signal names and widths follow the lecture. The opcode numbers,
// the ALU control codes and the mux select codes are this design's own
// choice; the lecture leaves the instruction set to the reader.
package toy_pkg;

  typedef enum logic [3:0] {
    OP_HALT = 4'h0,  // stop
    OP_ADD  = 4'h1,  // R[r0] = R[r1] + R[r2]
    OP_SUB  = 4'h2,  // R[r0] = R[r1] - R[r2]
    OP_MUL  = 4'h3,  // R[r0] = R[r1] * R[r2]  (low 16 bits)
    OP_XOR  = 4'h4,  // R[r0] = R[r1] ^ R[r2]
    OP_AND  = 4'h5,  // R[r0] = R[r1] & R[r2]
    OP_SHR  = 4'h6,  // R[r0] = R[r1] >> R[r2]
    OP_SHL  = 4'h7,  // R[r0] = R[r1] << R[r2]
    OP_LDA  = 4'h8,  // R[r0] = imm8 (zero-extended)
    OP_LD   = 4'h9,  // R[r0] = M[ea]
    OP_ST   = 4'hA,  // M[ea] = R[r0]
    OP_BZ   = 4'hB,  // if R[r0] == 0 then PC = imm8
    OP_BP   = 4'hC,  // if R[r0] >  0 then PC = imm8 (signed)
    OP_JR   = 4'hD,  // PC = R[r1] + R[r2]
    OP_JL   = 4'hE,  // R[r0] = PC + 1, PC = imm8
    OP_JMP  = 4'hF   // PC = imm8
  } opcode_e;
  // Effective address ea: imm8 when IR[11] = 0, R[r1] + R[r2] when IR[11] = 1.

  // ALUctrl, 3 bits: the seven operations in the order the lecture lists them.
  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,
    ALU_SUB  = 3'd1,
    ALU_MUL  = 3'd2,
    ALU_XOR  = 3'd3,
    ALU_AND  = 3'd4,
    ALU_SHR  = 3'd5,
    ALU_SHL  = 3'd6,
    ALU_PASS = 3'd7   // output = a
  } alu_op_e;

  // nPCsel, 2 bits: source of the next PC.
  typedef enum logic [1:0] {
    NPC_INC  = 2'd0,  // PC + 1
    NPC_IMM  = 2'd1,  // imm8
    NPC_ALU  = 2'd2,  // ALU result
    NPC_HOLD = 2'd3   // keep PC (halt)
  } npc_sel_e;

  // WBsel, 2 bits: source of the register write data.
  typedef enum logic [1:0] {
    WB_ALU = 2'd0,
    WB_MEM = 2'd1,
    WB_PC1 = 2'd2,    // PC + 1 (jump and link)
    WB_IMM = 2'd3     // zero-extended imm8 (load address)
  } wb_sel_e;

  // Cond, 2 bits, from the datapath: flags of R[r0].
  localparam int unsigned COND_ZERO = 0;  // R[r0] == 0
  localparam int unsigned COND_POS  = 1;  // R[r0] > 0 (signed)

  // Control word of the single-cycle processor (signals of the lecture's
  // datapath/control picture, plus halt).
  typedef struct packed {
    npc_sel_e npc_sel;
    logic     reg_wr;
    alu_op_e  alu_ctr;
    logic     mem_wr;
    logic     addr_sel;  // 0: imm8, 1: ALU result (indexed)
    wb_sel_e  wb_sel;
    logic     halt;
  } sc_ctrl_t;

  // Stage numbers of the multicycle processor (counter values).
  typedef enum logic [2:0] {
    ST_FETCH  = 3'd0,
    ST_DECODE = 3'd1,
    ST_EXEC   = 3'd2,
    ST_MEM    = 3'd3,
    ST_WB     = 3'd4
  } stage_e;

  // Source of the next PC in the multicycle processor (its memory-stage mux).
  typedef enum logic [1:0] {
    PC_NPC    = 2'd0,  // NPC register (PC + 1)
    PC_IMM    = 2'd1,  // Imm register
    PC_RESULT = 2'd2   // Result register (ALU output)
  } pc_src_e;

  // Control word of the multicycle processor for one stage of one
  // instruction: temporary-register enables, mux selects, writes, and the
  // counter's next value.
  typedef struct packed {
    logic     ir_we;      // fetch: IR and NPC load
    logic     dec_we;     // decode: R0, R1, R2 and Imm load
    logic     ex_we;      // execute: Result and Cond load
    logic     mdata_we;   // memory: MData loads
    alu_op_e  alu_ctr;
    logic     addr_sel;   // data address: 0 Imm, 1 Result (indexed)
    logic     mem_wr;
    logic     reg_wr;
    wb_sel_e  wb_sel;     // WB_ALU = Result, WB_MEM = MData, WB_PC1 = NPC, WB_IMM = Imm
    logic     pc_we;
    pc_src_e  pc_src;
    stage_e   next_stage;
    logic     halt;
  } mc_ctrl_t;

endpackage
