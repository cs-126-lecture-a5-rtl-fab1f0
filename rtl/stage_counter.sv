// stage_counter: the multicycle processor's time-keeping counter.
//
// It holds the stage of the instruction being executed, 0 fetch, 1 decode,
// 2 execute, 3 memory, 4 write-back, and the control reads it alongside the
// instruction. Each enabled rising clock edge either steps the count by one
// (wrapping from NSTAGES-1 to 0) or, when load is on, sets it to load_val:
// loading 0 ends an instruction early and loading a later stage skips the
// stages between, which is how short instructions avoid unnecessary cycles.
// The load port is this design's choice; active-low rst_n clears the count.
module stage_counter #(
  parameter int unsigned NSTAGES = 5,
  localparam int unsigned CW = $clog2(NSTAGES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          load,
  input  logic [CW-1:0] load_val,
  output logic [CW-1:0] cnt
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       cnt <= '0;
    else if (en && load)              cnt <= load_val;
    else if (en && cnt == CW'(NSTAGES - 1)) cnt <= '0;
    else if (en)                      cnt <= cnt + CW'(1);
  end
endmodule
