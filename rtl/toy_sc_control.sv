// toy_sc_control: control of the single-cycle TOY processor.
//
// The lecture builds this control as one large combinational circuit: a
// decoder takes 7 input bits (the 4-bit opcode, the top bit of the r0 field,
// which marks indexed addressing, and the 2-bit Cond from the datapath) and
// turns exactly one of its 2**7 = 128 outputs on. A decoder output that is on
// means "this instruction is executing and these conditions hold". Each
// control bit is then an OR gate over the decoder outputs for which that bit
// must be on. This module is built the same way: a one-hot decoder and one
// OR over a mask per control bit. The masks are constants computed at
// elaboration from the instruction set in toy_pkg (which decoder lines feed
// which gate is this design's, following from its opcode map).
//
// Outputs (names and widths from the lecture): nPCsel 2, RegWr, ALUctr 3,
// MemWr, AddrSel, WBsel 2, plus halt, which ends the fetch-execute loop.
// Timing: purely combinational.
module toy_sc_control
  import toy_pkg::*;
(
  input  opcode_e    opcode,
  input  logic       r0_hi,
  input  logic [1:0] cond,
  output sc_ctrl_t   ctrl
);
  localparam int unsigned NIN  = 7;
  localparam int unsigned NOUT = 2**NIN;
  localparam int unsigned NCTL = $bits(sc_ctrl_t);

  // Control word wanted on decoder line `line` = {opcode, r0_hi, cond}.
  function automatic sc_ctrl_t word_for(input logic [NIN-1:0] line);
    opcode_e    op;
    logic       hi;
    logic [1:0] c;
    sc_ctrl_t   w;
    op = opcode_e'(line[6:3]);
    hi = line[2];
    c  = line[1:0];
    w  = '{npc_sel: NPC_INC, reg_wr: 1'b0, alu_ctr: ALU_ADD, mem_wr: 1'b0,
           addr_sel: 1'b0, wb_sel: WB_ALU, halt: 1'b0};
    case (op)
      OP_HALT: begin w.npc_sel = NPC_HOLD; w.halt = 1'b1; end
      OP_ADD:  begin w.reg_wr = 1'b1; w.alu_ctr = ALU_ADD; end
      OP_SUB:  begin w.reg_wr = 1'b1; w.alu_ctr = ALU_SUB; end
      OP_MUL:  begin w.reg_wr = 1'b1; w.alu_ctr = ALU_MUL; end
      OP_XOR:  begin w.reg_wr = 1'b1; w.alu_ctr = ALU_XOR; end
      OP_AND:  begin w.reg_wr = 1'b1; w.alu_ctr = ALU_AND; end
      OP_SHR:  begin w.reg_wr = 1'b1; w.alu_ctr = ALU_SHR; end
      OP_SHL:  begin w.reg_wr = 1'b1; w.alu_ctr = ALU_SHL; end
      OP_LDA:  begin w.reg_wr = 1'b1; w.wb_sel = WB_IMM; end
      OP_LD:   begin w.reg_wr = 1'b1; w.wb_sel = WB_MEM; w.addr_sel = hi; end
      OP_ST:   begin w.mem_wr = 1'b1; w.addr_sel = hi; end
      OP_BZ:   if (c[COND_ZERO]) w.npc_sel = NPC_IMM;
      OP_BP:   if (c[COND_POS])  w.npc_sel = NPC_IMM;
      OP_JR:   w.npc_sel = NPC_ALU;
      OP_JL:   begin w.npc_sel = NPC_IMM; w.reg_wr = 1'b1; w.wb_sel = WB_PC1; end
      OP_JMP:  w.npc_sel = NPC_IMM;
      default: ;
    endcase
    return w;
  endfunction

  // OR-gate inputs: mask[b][line] is 1 when control bit b is on for line.
  typedef logic [NCTL-1:0][NOUT-1:0] mask_t;

  function automatic mask_t build_masks();
    mask_t    m;
    sc_ctrl_t w;
    m = '0;
    for (int unsigned line = 0; line < NOUT; line++) begin
      w = word_for(NIN'(line));
      for (int b = 0; b < NCTL; b++) m[b][line] = w[b];
    end
    return m;
  endfunction

  localparam mask_t MASK = build_masks();

  logic [NIN-1:0]  dec_in;
  logic [NOUT-1:0] dec_out;
  logic [NCTL-1:0] ctrl_bits;

  assign dec_in = {opcode, r0_hi, cond};

  // 7-to-128 decoder
  always_comb begin
    dec_out = '0;
    dec_out[dec_in] = 1'b1;
  end

  // one OR gate per control bit
  always_comb begin
    for (int b = 0; b < NCTL; b++) ctrl_bits[b] = |(dec_out & MASK[b]);
  end

  assign ctrl = sc_ctrl_t'(ctrl_bits);

  // exactly one decoder output is on
  always_comb a_onehot: assert ($onehot(dec_out));
endmodule
