// toy_dmem: TOY data memory, 2**AW words of DW bits.
//
// The processor port reads the word at addr combinationally and writes wdata
// there at the rising clock edge when mem_wr (MemWr) is on. A second, host
// port reads and writes the memory so a test or a host can set up data and
// inspect results; it is this design's addition. When both ports write in the
// same cycle to the same word, the processor's write wins. The 8-bit address
// matches the 8-bit immediate address of an instruction; the lecture prints
// no size for this memory. Contents are not cleared by reset.
module toy_dmem #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  input  logic          mem_wr,
  output logic [DW-1:0] rdata,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  logic [DW-1:0] host_wdata,
  output logic [DW-1:0] host_rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
    if (mem_wr)  mem[addr]      <= wdata;
  end

  assign rdata      = mem[addr];
  assign host_rdata = mem[host_addr];
endmodule
