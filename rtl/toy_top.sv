// toy_top: the lecture's hardware side by side.
//
// Two implementations of the same 16-bit TOY processor, each with its own
// memories and ports: toy_single_cycle finishes every instruction in one long
// clock cycle; toy_multicycle spends one short cycle per stage and lets short
// instructions skip stages. Next to them stand the two small circuits the
// lecture uses to introduce datapath and control: the one-port register file
// (regfile_1port) and the register/mux/register example (reg_mux_example).
// The four share clk and rst_n and nothing else; their ports are brought out
// with prefixes sc_, mc_, rf_ and ex_. Timing is that of each part.
module toy_top #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NREGS = 8,
  parameter int unsigned PC_W  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // single-cycle processor
  input  logic             sc_run,
  output logic             sc_halted,
  output logic [PC_W-1:0]  sc_pc,
  output logic [WIDTH-1:0] sc_instr,
  input  logic             sc_prog_we,
  input  logic [PC_W-1:0]  sc_prog_addr,
  input  logic [WIDTH-1:0] sc_prog_data,
  input  logic             sc_dmem_we,
  input  logic [PC_W-1:0]  sc_dmem_addr,
  input  logic [WIDTH-1:0] sc_dmem_wdata,
  output logic [WIDTH-1:0] sc_dmem_rdata,
  // multicycle processor
  input  logic             mc_run,
  output logic             mc_halted,
  output logic [PC_W-1:0]  mc_pc,
  output logic [2:0]       mc_stage,
  output logic [WIDTH-1:0] mc_ir,
  input  logic             mc_prog_we,
  input  logic [PC_W-1:0]  mc_prog_addr,
  input  logic [WIDTH-1:0] mc_prog_data,
  input  logic             mc_dmem_we,
  input  logic [PC_W-1:0]  mc_dmem_addr,
  input  logic [WIDTH-1:0] mc_dmem_wdata,
  output logic [WIDTH-1:0] mc_dmem_rdata,
  // one-port register file
  input  logic                     rf_write,
  input  logic [$clog2(NREGS)-1:0] rf_address,
  input  logic [WIDTH-1:0]         rf_data_in,
  output logic [WIDTH-1:0]         rf_data_out,
  // register / mux / register example
  input  logic             ex_we1,
  input  logic             ex_we2,
  input  logic             ex_we3,
  input  logic             ex_select,
  input  logic [WIDTH-1:0] ex_in1,
  input  logic [WIDTH-1:0] ex_in2,
  output logic [WIDTH-1:0] ex_reg1,
  output logic [WIDTH-1:0] ex_reg2,
  output logic [WIDTH-1:0] ex_reg3
);
  toy_single_cycle #(.WIDTH(WIDTH), .NREGS(NREGS), .PC_W(PC_W)) u_sc (
    .clk            (clk),
    .rst_n          (rst_n),
    .run            (sc_run),
    .halted         (sc_halted),
    .pc             (sc_pc),
    .instr          (sc_instr),
    .prog_we        (sc_prog_we),
    .prog_addr      (sc_prog_addr),
    .prog_data      (sc_prog_data),
    .dmem_host_we   (sc_dmem_we),
    .dmem_host_addr (sc_dmem_addr),
    .dmem_host_wdata(sc_dmem_wdata),
    .dmem_host_rdata(sc_dmem_rdata)
  );

  toy_multicycle #(.WIDTH(WIDTH), .NREGS(NREGS), .PC_W(PC_W)) u_mc (
    .clk            (clk),
    .rst_n          (rst_n),
    .run            (mc_run),
    .halted         (mc_halted),
    .pc             (mc_pc),
    .stage          (mc_stage),
    .ir             (mc_ir),
    .prog_we        (mc_prog_we),
    .prog_addr      (mc_prog_addr),
    .prog_data      (mc_prog_data),
    .dmem_host_we   (mc_dmem_we),
    .dmem_host_addr (mc_dmem_addr),
    .dmem_host_wdata(mc_dmem_wdata),
    .dmem_host_rdata(mc_dmem_rdata)
  );

  regfile_1port #(.K(WIDTH), .N(NREGS)) u_rf1 (
    .clk     (clk),
    .write   (rf_write),
    .address (rf_address),
    .data_in (rf_data_in),
    .data_out(rf_data_out)
  );

  reg_mux_example #(.WIDTH(WIDTH)) u_ex (
    .clk          (clk),
    .write_enable1(ex_we1),
    .write_enable2(ex_we2),
    .write_enable3(ex_we3),
    .select       (ex_select),
    .in1          (ex_in1),
    .in2          (ex_in2),
    .reg1_q       (ex_reg1),
    .reg2_q       (ex_reg2),
    .reg3_q       (ex_reg3)
  );
endmodule
