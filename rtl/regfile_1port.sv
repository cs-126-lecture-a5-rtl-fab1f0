// regfile_1port: a register file of N words of K bits with one address port.
//
// A single address selects the word that appears on the output and, when
// write is on, the word that takes the input at the rising clock edge.
// Because there is only one address, a cycle cannot read one word and write
// another: this is the limitation the lecture points out before it
// introduces the three-port TOY register file.
//
// The sizes n and k are symbols in the lecture; the defaults (8 words of 16
// bits) are the TOY sizes, this design's choice. Reads are combinational;
// words are not cleared by reset.
module regfile_1port #(
  parameter int unsigned K = 16,
  parameter int unsigned N = 8,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          write,
  input  logic [AW-1:0] address,
  input  logic [K-1:0]  data_in,
  output logic [K-1:0]  data_out
);
  logic [K-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (write) regs[address] <= data_in;
  end

  assign data_out = regs[address];
endmodule
