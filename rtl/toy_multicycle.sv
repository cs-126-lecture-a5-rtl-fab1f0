// toy_multicycle: the multicycle TOY processor.
//
// The single-cycle datapath is cut into five pieces, fetch, decode, execute,
// memory and write-back, and each instruction spends one short clock cycle in
// each piece it needs. Temporary registers between the pieces hold the
// intermediate values: IR and NPC (= PC + 1) after fetch; R0, R1, R2 (the
// three registers the instruction names) and Imm (imm8 zero-extended by Ext)
// after decode; Result (ALU output) and Cond (flags of R0) after execute;
// MData (the data-memory word) after memory. Write-back chooses among
// Result, MData, NPC and Imm for the register file, and the next-PC mux
// chooses among NPC, Imm and Result. A stage counter keeps time, and the
// control (toy_mc_control) reads it together with the instruction; short
// instructions skip stages, so they take 2 to 5 cycles.
//
// The stage split, the temporary registers, the separate PC adder and the
// counter-driven control follow the lecture. The instruction set, the
// schedule of stages per instruction, the fourth write-back input (NPC, for
// jump and link), the host ports and run/halted are this design's choices.
//
// Interface: as toy_single_cycle. With run high the processor advances one
// stage per rising clock edge; after a halt instruction's decode stage it
// raises halted and stops. stage shows the counter. Active-low rst_n clears
// the PC, the counter and halted. The assertions at the end are off during
// reset, so rst_n is both an asynchronous reset and a sampled signal.
module toy_multicycle
  import toy_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NREGS = 8,
  parameter int unsigned PC_W  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  output logic             halted,
  output logic [PC_W-1:0]  pc,
  output logic [2:0]       stage,
  output logic [WIDTH-1:0] ir,
  input  logic             prog_we,
  input  logic [PC_W-1:0]  prog_addr,
  input  logic [WIDTH-1:0] prog_data,
  input  logic             dmem_host_we,
  input  logic [PC_W-1:0]  dmem_host_addr,
  input  logic [WIDTH-1:0] dmem_host_wdata,
  output logic [WIDTH-1:0] dmem_host_rdata
);
  localparam int unsigned SEL_W = $clog2(NREGS);

  mc_ctrl_t         ctrl;
  logic             active;
  logic [WIDTH-1:0] imem_rdata;
  logic [PC_W-1:0]  npc_r, imm_r, npc_d, mem_addr;
  logic [WIDTH-1:0] r0_r, r1_r, r2_r, result_r, mdata_r;
  logic [1:0]       cond_r;
  logic [WIDTH-1:0] bus0_in, bus0_out, bus1, bus2, alu_y, dmem_rdata;
  logic [PC_W-1:0]  pc_next;

  assign active = run && !halted;

  // ---------------- fetch ----------------
  toy_imem #(.AW(PC_W), .DW(WIDTH)) u_imem (
    .clk      (clk),
    .addr     (pc),
    .rdata    (imem_rdata),
    .prog_we  (prog_we),
    .prog_addr(prog_addr),
    .prog_data(prog_data)
  );

  assign npc_d = pc + PC_W'(1);  // the fetch-stage adder

  always_ff @(posedge clk) begin
    if (active && ctrl.ir_we) begin
      ir    <= imem_rdata;
      npc_r <= npc_d;
    end
  end

  // ---------------- decode ----------------
  toy_regfile #(.WIDTH(WIDTH), .NREGS(NREGS)) u_rf (
    .clk     (clk),
    .write   (active && ctrl.reg_wr),
    .r0      (ir[8 +: SEL_W]),
    .r1      (ir[4 +: SEL_W]),
    .r2      (ir[0 +: SEL_W]),
    .bus0_in (bus0_in),
    .bus0_out(bus0_out),
    .bus1    (bus1),
    .bus2    (bus2)
  );

  always_ff @(posedge clk) begin
    if (active && ctrl.dec_we) begin
      r0_r  <= bus0_out;
      r1_r  <= bus1;
      r2_r  <= bus2;
      imm_r <= ir[7:0];  // Ext: zero extension happens where Imm is used
    end
  end

  // ---------------- execute ----------------
  toy_alu #(.WIDTH(WIDTH)) u_alu (
    .a       (r1_r),
    .b       (r2_r),
    .alu_ctrl(ctrl.alu_ctr),
    .y       (alu_y)
  );

  always_ff @(posedge clk) begin
    if (active && ctrl.ex_we) begin
      result_r          <= alu_y;
      cond_r[COND_ZERO] <= (r0_r == '0);
      cond_r[COND_POS]  <= !r0_r[WIDTH-1] && (r0_r != '0);
    end
  end

  // ---------------- memory ----------------
  assign mem_addr = ctrl.addr_sel ? result_r[PC_W-1:0] : imm_r;

  toy_dmem #(.AW(PC_W), .DW(WIDTH)) u_dmem (
    .clk       (clk),
    .addr      (mem_addr),
    .wdata     (r0_r),
    .mem_wr    (active && ctrl.mem_wr),
    .rdata     (dmem_rdata),
    .host_we   (dmem_host_we),
    .host_addr (dmem_host_addr),
    .host_wdata(dmem_host_wdata),
    .host_rdata(dmem_host_rdata)
  );

  always_ff @(posedge clk) begin
    if (active && ctrl.mdata_we) mdata_r <= dmem_rdata;
  end

  always_comb begin
    unique case (ctrl.pc_src)
      PC_IMM:    pc_next = imm_r;
      PC_RESULT: pc_next = result_r[PC_W-1:0];
      default:   pc_next = npc_r;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     pc <= '0;
    else if (active && ctrl.pc_we)  pc <= pc_next;
  end

  // ---------------- write-back ----------------
  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  bus0_in = mdata_r;
      WB_PC1:  bus0_in = WIDTH'(npc_r);
      WB_IMM:  bus0_in = WIDTH'(imm_r);
      default: bus0_in = result_r;
    endcase
  end

  // ---------------- control ----------------
  // The counter steps by itself; control loads it only to skip stages or to
  // end an instruction before write-back.
  logic [2:0] stage_inc;
  assign stage_inc = (stage == 3'(ST_WB)) ? 3'(ST_FETCH) : stage + 3'd1;

  stage_counter #(.NSTAGES(5)) u_cnt (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (active),
    .load    (3'(ctrl.next_stage) != stage_inc),
    .load_val(ctrl.next_stage),
    .cnt     (stage)
  );

  toy_mc_control u_ctrl (
    .opcode(opcode_e'(ir[15:12])),
    .r0_hi (ir[11]),
    .cond  (cond_r),
    .stage (stage_e'(stage)),
    .ctrl  (ctrl)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    halted <= 1'b0;
    else if (active && ctrl.halt)  halted <= 1'b1;
  end

  // The counter only ever holds the five stage numbers, and a stage never
  // both writes memory and writes a register.
  a_stage_range: assert property (@(posedge clk) disable iff (!rst_n) stage <= 3'(ST_WB));
  a_one_write:   assert property (@(posedge clk) disable iff (!rst_n) !(ctrl.mem_wr && ctrl.reg_wr));
  // A halted processor keeps its PC.
  a_halt_holds:  assert property (@(posedge clk) disable iff (!rst_n) halted |=> $stable(pc));
endmodule
