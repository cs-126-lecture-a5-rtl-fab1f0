// toy_regfile: the TOY register file, NREGS registers of WIDTH bits.
//
// Three 3-bit register numbers come straight from the instruction. r1 and r2
// choose which registers appear on the read busses bus1 and bus2. r0 names
// the register written from bus0 at the clock edge when write is on; when
// write is off the register r0 names appears on bus0, which is how a store
// or a branch reads its third register. All reads are combinational.
//
// The lecture draws bus0 as a single two-way bus. Here it is two one-way
// ports, bus0_in and bus0_out, so no tristate bus is needed; bus0_out shows
// R[r0] whatever write is. Registers are written on the rising clock edge
// and are not cleared by reset.
module toy_regfile #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NREGS = 8,
  localparam int unsigned SEL_W = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             write,
  input  logic [SEL_W-1:0] r0,
  input  logic [SEL_W-1:0] r1,
  input  logic [SEL_W-1:0] r2,
  input  logic [WIDTH-1:0] bus0_in,
  output logic [WIDTH-1:0] bus0_out,
  output logic [WIDTH-1:0] bus1,
  output logic [WIDTH-1:0] bus2
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (write) regs[r0] <= bus0_in;
  end

  assign bus0_out = regs[r0];
  assign bus1     = regs[r1];
  assign bus2     = regs[r2];
endmodule
