// reg_mux_example: the lecture's definition-by-example of datapath and control.
//
// Two registers, Reg1 and Reg2, each load their input at the rising clock
// edge when their write enable is on. A two-way mux chooses one of them by
// Select, and Reg3 loads the mux output at the clock edge when WriteEnable3
// is on; with it off Reg3 keeps its value. The same picture is used to show
// how a value is "clocked" from one stage to the next: Reg1/Reg2 belong to
// stage n, the mux and Reg3 to stage n+1.
//
// The lecture draws the control circuit dashed and gives no function for
// it, so Select and the three write enables are inputs here. The bus width
// is not printed (16 is assumed), nor which mux input Select = 0 chooses
// (Reg1 here). Registers are not reset.
module reg_mux_example #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             write_enable1,
  input  logic             write_enable2,
  input  logic             write_enable3,
  input  logic             select,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  output logic [WIDTH-1:0] reg1_q,
  output logic [WIDTH-1:0] reg2_q,
  output logic [WIDTH-1:0] reg3_q
);
  logic [WIDTH-1:0] mux_y;

  always_ff @(posedge clk) begin
    if (write_enable1) reg1_q <= in1;
    if (write_enable2) reg2_q <= in2;
    if (write_enable3) reg3_q <= mux_y;
  end

  assign mux_y = select ? reg2_q : reg1_q;
endmodule
