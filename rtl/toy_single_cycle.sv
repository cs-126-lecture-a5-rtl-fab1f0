// toy_single_cycle: the single-cycle TOY processor.
//
// Each turn of the fetch-execute loop finishes in one clock cycle. In that
// cycle the fetch unit reads the instruction at the PC; its register fields
// go straight to the arithmetic datapath (toy_arith_path: register file and
// ALU), whose register file puts R[r1] and R[r2] on bus1 and
// bus2 and R[r0] on bus0; the ALU combines bus1 and bus2; the data memory is
// read (or, for a store, written) at imm8 or, with indexed addressing, at the
// ALU sum; and at the clock edge the write-back mux result is written to
// R[r0] and the PC takes its next value. The control is one combinational
// circuit (toy_sc_control) driven by the opcode, the indexed-addressing bit
// and the Cond flags of R[r0].
//
// The datapath pieces, their connections and the control signal names follow
// the lecture. The instruction set (toy_pkg), the write-back sources, the
// host ports and the run/halted handshake are this design's choices.
//
// Interface: load the instruction memory through prog_* and the data memory
// through dmem_host_* while run is low, release rst_n, then hold run high.
// The processor executes one instruction per rising clock edge until it
// executes halt, then raises halted and stops changing state. Active-low
// rst_n clears the PC and halted; registers and memories are not cleared.
// Only the low PC_W bits of the ALU output are used, as jump targets and
// indexed addresses. The assertions at the end are off during reset, so
// rst_n is both an asynchronous reset and a sampled signal; lint notes this.
module toy_single_cycle
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
  output logic [WIDTH-1:0] instr,
  input  logic             prog_we,
  input  logic [PC_W-1:0]  prog_addr,
  input  logic [WIDTH-1:0] prog_data,
  input  logic             dmem_host_we,
  input  logic [PC_W-1:0]  dmem_host_addr,
  input  logic [WIDTH-1:0] dmem_host_wdata,
  output logic [WIDTH-1:0] dmem_host_rdata
);
  localparam int unsigned SEL_W = $clog2(NREGS);

  sc_ctrl_t         ctrl;
  logic             active;
  logic [PC_W-1:0]  pc_plus1;
  logic [WIDTH-1:0] bus0_out, alu_y, mem_rdata, wb_ext;
  logic [PC_W-1:0]  imm8, mem_addr;
  logic [1:0]       cond;

  assign active = run && !halted;
  assign imm8   = instr[7:0];
  assign cond[COND_ZERO] = (bus0_out == '0);
  assign cond[COND_POS]  = !bus0_out[WIDTH-1] && (bus0_out != '0);

  toy_fetch_unit #(.PC_W(PC_W), .DW(WIDTH)) u_fetch (
    .clk       (clk),
    .rst_n     (rst_n),
    .run       (active),
    .npc_sel   (ctrl.npc_sel),
    .imm8      (imm8),
    .alu_target(alu_y[PC_W-1:0]),
    .pc        (pc),
    .pc_plus1  (pc_plus1),
    .instr     (instr),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_data (prog_data)
  );

  toy_sc_control u_ctrl (
    .opcode(opcode_e'(instr[15:12])),
    .r0_hi (instr[11]),
    .cond  (cond),
    .ctrl  (ctrl)
  );

  // register file and ALU in their write-back loop
  toy_arith_path #(.WIDTH(WIDTH), .NREGS(NREGS)) u_arith (
    .clk     (clk),
    .reg_wr  (ctrl.reg_wr && active),
    .r0      (instr[8 +: SEL_W]),
    .r1      (instr[4 +: SEL_W]),
    .r2      (instr[0 +: SEL_W]),
    .alu_ctrl(ctrl.alu_ctr),
    .ext_sel (ctrl.wb_sel != WB_ALU),
    .ext_data(wb_ext),
    .alu_y   (alu_y),
    .bus0_out(bus0_out)
  );

  assign mem_addr = ctrl.addr_sel ? alu_y[PC_W-1:0] : imm8;

  toy_dmem #(.AW(PC_W), .DW(WIDTH)) u_dmem (
    .clk       (clk),
    .addr      (mem_addr),
    .wdata     (bus0_out),
    .mem_wr    (ctrl.mem_wr && active),
    .rdata     (mem_rdata),
    .host_we   (dmem_host_we),
    .host_addr (dmem_host_addr),
    .host_wdata(dmem_host_wdata),
    .host_rdata(dmem_host_rdata)
  );

  // write-back sources other than the ALU
  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb_ext = mem_rdata;
      WB_PC1:  wb_ext = WIDTH'(pc_plus1);
      default: wb_ext = WIDTH'(imm8);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     halted <= 1'b0;
    else if (active && ctrl.halt)   halted <= 1'b1;
  end

  // An instruction writes memory or a register, never both, and a halted
  // processor keeps its PC.
  a_one_write:  assert property (@(posedge clk) disable iff (!rst_n) !(ctrl.mem_wr && ctrl.reg_wr));
  a_halt_holds: assert property (@(posedge clk) disable iff (!rst_n) halted |=> $stable(pc));
endmodule
