// toy_imem: TOY instruction memory, 2**AW words of DW bits.
//
// The processor reads the word at addr combinationally (the lecture treats
// memory reads as combinational logic whose result is valid after a delay).
// A host port, prog_we/prog_addr/prog_data, writes a word at the rising clock
// edge; it is how a program is loaded and is this design's addition, since
// the lecture does not say how instructions get into memory. Contents are not
// cleared by reset.
module toy_imem #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] rdata,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [DW-1:0] prog_data
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign rdata = mem[addr];
endmodule
