// toy_arith_path: the TOY arithmetic (execution) datapath.
//
// The register file and the ALU wired into a loop: r1 and r2 put two
// registers on bus1 and bus2, the ALU combines them under ALUctrl, and the
// result goes back on bus0, where the clock edge writes it into the register
// r0 names when RegWr is on. On its own this executes R[r0] = R[r1] op
// R[r2] in one cycle; the register numbers and ALUctrl come straight from
// the instruction via the control. Reads are combinational; the write
// happens at the rising clock edge.
//
// In the full single-cycle processor the value written back is not always
// the ALU's: ext_sel switches bus0 to ext_data (a memory word, PC + 1 or an
// immediate). That input is this design's way of letting the write-back mux
// join the loop; with ext_sel = 0 the block is the loop as the lecture draws
// it. bus0_out shows R[r0] for stores and branch tests.
module toy_arith_path
  import toy_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NREGS = 8,
  localparam int unsigned SEL_W = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             reg_wr,
  input  logic [SEL_W-1:0] r0,
  input  logic [SEL_W-1:0] r1,
  input  logic [SEL_W-1:0] r2,
  input  alu_op_e          alu_ctrl,
  input  logic             ext_sel,
  input  logic [WIDTH-1:0] ext_data,
  output logic [WIDTH-1:0] alu_y,
  output logic [WIDTH-1:0] bus0_out
);
  logic [WIDTH-1:0] bus0_in, bus1, bus2;

  toy_regfile #(.WIDTH(WIDTH), .NREGS(NREGS)) u_rf (
    .clk     (clk),
    .write   (reg_wr),
    .r0      (r0),
    .r1      (r1),
    .r2      (r2),
    .bus0_in (bus0_in),
    .bus0_out(bus0_out),
    .bus1    (bus1),
    .bus2    (bus2)
  );

  toy_alu #(.WIDTH(WIDTH)) u_alu (
    .a       (bus1),
    .b       (bus2),
    .alu_ctrl(alu_ctrl),
    .y       (alu_y)
  );

  assign bus0_in = ext_sel ? ext_data : alu_y;
endmodule
