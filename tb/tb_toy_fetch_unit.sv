// tb_toy_fetch_unit: loads a known pattern into the fetch unit's instruction
// memory, then drives random nPCsel, imm8, ALU targets and run, and checks
// the PC, PC + 1 and the fetched word against a model of the next-PC mux.
module tb_toy_fetch_unit;
  import toy_pkg::*;
  logic        clk = 0, rst_n = 0, run = 0, prog_we = 0;
  npc_sel_e    npc_sel = NPC_INC;
  logic [7:0]  imm8 = 0, alu_target = 0, pc, pc_plus1, prog_addr = 0, mpc;
  logic [15:0] instr, prog_data = 0;
  int unsigned checks = 0, failures = 0;
  int unsigned used [4];

  always #5 clk = ~clk;

  toy_fetch_unit dut (.clk(clk), .rst_n(rst_n), .run(run), .npc_sel(npc_sel), .imm8(imm8),
                      .alu_target(alu_target), .pc(pc), .pc_plus1(pc_plus1), .instr(instr),
                      .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data));

  function automatic logic [15:0] pattern(logic [7:0] i);
    return {~i, i};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (used[i]) used[i] = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_data = pattern(8'(i));
    end
    @(negedge clk); prog_we = 0; rst_n = 1;
    #1; mpc = 0;
    check(pc == 0, "reset pc");
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      npc_sel = npc_sel_e'($urandom_range(0, 3));
      imm8 = 8'($urandom); alu_target = 8'($urandom); run = ($urandom_range(0, 7) != 0);
      #1;
      check(instr == pattern(pc), "instruction at pc");
      check(pc_plus1 == 8'(mpc + 1), "pc + 1");
      @(posedge clk);
      if (run) begin
        used[npc_sel]++;
        case (npc_sel)
          NPC_INC: mpc = mpc + 1;
          NPC_IMM: mpc = imm8;
          NPC_ALU: mpc = alu_target;
          default: ;
        endcase
      end
      #1;
      check(pc == mpc, $sformatf("pc %h expected %h", pc, mpc));
    end
    for (int i = 0; i < 4; i++) check(used[i] > 0, "every nPCsel used");
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
