// tb_toy_sc_control: all 128 input combinations of the single-cycle
// control (opcode, indexed bit, two Cond flags), each checked field by field
// against the instruction definitions written out here as a table.
module tb_toy_sc_control;
  import toy_pkg::*;
  opcode_e    opcode;
  logic       r0_hi;
  logic [1:0] cond;
  sc_ctrl_t   ctrl;
  int unsigned checks = 0, failures = 0;

  toy_sc_control dut (.opcode(opcode), .r0_hi(r0_hi), .cond(cond), .ctrl(ctrl));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL op=%h hi=%0d cond=%b: %s", opcode, r0_hi, cond, what); end
  endtask

  initial begin
    for (int i = 0; i < 128; i++) begin
      logic       rw, mw, branch;
      logic [2:0] alu;
      logic [1:0] wb, npc;
      {opcode, r0_hi, cond} = 7'(i);
      #1;
      // expected values
      rw  = (opcode >= 4'h1 && opcode <= 4'h9) || opcode == 4'hE;
      mw  = (opcode == 4'hA);
      alu = (opcode >= 4'h1 && opcode <= 4'h7) ? 3'(opcode - 1) : 3'd0;
      wb  = (opcode == 4'h8) ? 2'd3 : (opcode == 4'h9) ? 2'd1 : (opcode == 4'hE) ? 2'd2 : 2'd0;
      branch = (opcode == 4'hB && cond[0]) || (opcode == 4'hC && cond[1]) || opcode == 4'hE || opcode == 4'hF;
      npc = (opcode == 4'h0) ? 2'd3 : (opcode == 4'hD) ? 2'd2 : branch ? 2'd1 : 2'd0;
      check(ctrl.reg_wr == rw, "RegWr");
      check(ctrl.mem_wr == mw, "MemWr");
      check(ctrl.halt == (opcode == 4'h0), "halt");
      check(ctrl.npc_sel == npc_sel_e'(npc), "nPCsel");
      if (rw) check(ctrl.wb_sel == wb_sel_e'(wb), "WBsel");
      if (opcode >= 4'h1 && opcode <= 4'h7) check(ctrl.alu_ctr == alu_op_e'(alu), "ALUctr");
      if (opcode == 4'h9 || opcode == 4'hA) begin
        check(ctrl.addr_sel == r0_hi, "AddrSel");
        if (r0_hi) check(ctrl.alu_ctr == ALU_ADD, "indexed address adds");
      end
      if (opcode == 4'hD) check(ctrl.alu_ctr == ALU_ADD, "jr adds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
