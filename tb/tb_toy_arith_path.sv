// tb_toy_arith_path: the arithmetic datapath as the one-cycle loop
// R[r0] = R[r1] op R[r2]. Registers are first set through the ext_data input,
// then random operations run with the ALU result written back, and every
// register value, ALU result and bus0 read is compared with a shadow model.
module tb_toy_arith_path;
  import toy_pkg::*;
  logic        clk = 0, reg_wr = 0, ext_sel = 0;
  logic [2:0]  r0 = 0, r1 = 0, r2 = 0;
  alu_op_e     alu_ctrl = ALU_ADD;
  logic [15:0] ext_data = 0, alu_y, bus0_out;
  logic [15:0] shadow [8];
  int unsigned checks = 0, failures = 0, loops = 0;

  always #5 clk = ~clk;

  toy_arith_path dut (.clk(clk), .reg_wr(reg_wr), .r0(r0), .r1(r1), .r2(r2), .alu_ctrl(alu_ctrl),
                      .ext_sel(ext_sel), .ext_data(ext_data), .alu_y(alu_y), .bus0_out(bus0_out));

  function automatic logic [15:0] op(alu_op_e o, logic [15:0] a, logic [15:0] b);
    logic [31:0] p;
    case (o)
      ALU_ADD: return a + b;
      ALU_SUB: return a - b;
      ALU_MUL: begin p = 32'(a) * 32'(b); return p[15:0]; end
      ALU_XOR: return a ^ b;
      ALU_AND: return a & b;
      ALU_SHR: return a >> b[3:0];
      ALU_SHL: return a << b[3:0];
      default: return a;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); reg_wr = 1; ext_sel = 1; r0 = 3'(i); ext_data = 16'($urandom_range(1, 40)); shadow[i] = ext_data;
    end
    // the lecture's example, r0 = r1 + r2, with r3 = r1 + r2
    @(negedge clk); ext_sel = 0; reg_wr = 1; r0 = 3; r1 = 1; r2 = 2; alu_ctrl = ALU_ADD;
    #1; check(alu_y == shadow[1] + shadow[2], "example sum on the ALU");
    @(posedge clk); shadow[3] = shadow[1] + shadow[2]; #1;
    check(bus0_out == shadow[3], "example sum written to r3");
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      r0 = 3'($urandom); r1 = 3'($urandom); r2 = 3'($urandom);
      alu_ctrl = alu_op_e'($urandom_range(0, 6));
      reg_wr = 1'($urandom); ext_sel = ($urandom_range(0, 7) == 0); ext_data = 16'($urandom);
      #1;
      check(alu_y == op(alu_ctrl, shadow[r1], shadow[r2]), "ALU result");
      check(bus0_out == shadow[r0], "bus0 read");
      @(posedge clk);
      if (reg_wr) begin
        shadow[r0] = ext_sel ? ext_data : op(alu_ctrl, shadow[r1], shadow[r2]);
        if (!ext_sel) loops++;
      end
      #1;
      check(bus0_out == shadow[r0], "register after edge");
    end
    check(loops > 0, "ALU result written back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
