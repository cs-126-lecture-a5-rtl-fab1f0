// tb_toy_mc_control: every opcode, indexed bit, Cond value and stage of the
// multicycle control, checked against the stage schedule written out here:
// which temporary register loads in each stage, where the counter goes next,
// and when and from where the PC and the register file are written.
module tb_toy_mc_control;
  import toy_pkg::*;
  opcode_e    opcode;
  logic       r0_hi;
  logic [1:0] cond;
  stage_e     stage;
  mc_ctrl_t   ctrl;
  int unsigned checks = 0, failures = 0;

  toy_mc_control dut (.opcode(opcode), .r0_hi(r0_hi), .cond(cond), .stage(stage), .ctrl(ctrl));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL op=%h st=%0d hi=%0d cond=%b: %s", opcode, stage, r0_hi, cond, what); end
  endtask

  // stages visited, as a bit set {wb, mem, exec, decode, fetch}
  function automatic logic [4:0] visits(logic [3:0] op);
    if (op == 4'h0)                  return 5'b00011;
    if (op >= 4'h1 && op <= 4'h7)    return 5'b10111;
    if (op == 4'h8 || op == 4'hE)    return 5'b10011;
    if (op == 4'h9)                  return 5'b11111;
    return 5'b01111;
  endfunction

  initial begin
    for (int i = 0; i < 128; i++) begin
      for (int s = 0; s < 5; s++) begin
        logic [4:0] v;
        int         nxt, last;
        {opcode, r0_hi, cond} = 7'(i);
        stage = stage_e'(s);
        #1;
        v = visits(opcode);
        nxt = 0;
        for (int t = 4; t > s; t--) if (v[t]) nxt = t;
        last = 0;
        for (int t = 0; t < 5; t++) if (v[t]) last = t;
        if (!v[s]) continue;
        if (opcode != 4'h0) check(ctrl.next_stage == stage_e'(nxt), $sformatf("next stage %0d", ctrl.next_stage));
        check(ctrl.ir_we == (s == 0), "IR load in fetch");
        check(ctrl.dec_we == (s == 1), "R0/R1/R2/Imm load in decode");
        check(ctrl.ex_we == (s == 2), "Result/Cond load in execute");
        check(ctrl.mdata_we == (s == 3 && opcode == 4'h9), "MData load");
        check(ctrl.mem_wr == (s == 3 && opcode == 4'hA), "MemWr");
        check(ctrl.reg_wr == (s == 4), "RegWr in write-back");
        check(ctrl.halt == (s == 1 && opcode == 4'h0), "halt");
        check(ctrl.pc_we == (s == last && opcode != 4'h0), "PC written in last stage");
        if (ctrl.pc_we) begin
          pc_src_e want;
          want = PC_NPC;
          if (opcode == 4'hF || opcode == 4'hE) want = PC_IMM;
          if (opcode == 4'hB && cond[0]) want = PC_IMM;
          if (opcode == 4'hC && cond[1]) want = PC_IMM;
          if (opcode == 4'hD) want = PC_RESULT;
          check(ctrl.pc_src == want, "PC source");
        end
        if (s == 2 && opcode >= 4'h1 && opcode <= 4'h7) check(ctrl.alu_ctr == alu_op_e'(3'(opcode - 4'd1)), "ALUctr");
        if (s == 2 && (opcode == 4'h9 || opcode == 4'hA || opcode == 4'hD)) check(ctrl.alu_ctr == ALU_ADD, "address add");
        if (s == 3 && (opcode == 4'h9 || opcode == 4'hA)) check(ctrl.addr_sel == r0_hi, "AddrSel");
        if (s == 4) check(ctrl.wb_sel == ((opcode == 4'h9) ? WB_MEM : (opcode == 4'h8) ? WB_IMM :
                                          (opcode == 4'hE) ? WB_PC1 : WB_ALU), "WBsel");
      end
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
