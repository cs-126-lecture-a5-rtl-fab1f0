// tb_toy_multicycle: self-checking test of the multicycle TOY processor.
//
// Each test loads a program and its data through the host ports, runs the
// processor until it halts and compares every data-memory word, the final PC
// and the number of clock cycles with the reference model in toy_tb_pkg,
// which adds up each instruction's stage count (2 for halt, 3 for lda and
// jump-and-link, 5 for load, 4 for the rest). A monitor also measures the
// length of every instruction from the stage counter and checks how many
// instructions took 2, 3, 4 and 5 cycles. The first program is a directed one whose
// results are also checked against values worked out by hand; the rest are
// random programs that always terminate and store all registers at the end.
module tb_toy_multicycle;
  import toy_pkg::*;
  import toy_tb_pkg::*;

  localparam int unsigned NRANDOM = 40;

  logic        clk = 0, rst_n = 0, run = 0, halted;
  logic [7:0]  pc;
  logic [15:0] instr;
  logic [2:0]  stage;
  int unsigned len_seen [6];
  int unsigned cur_len;
  logic        prog_we = 0, dm_we = 0;
  logic [7:0]  prog_addr = 0, dm_addr = 0;
  logic [15:0] prog_data = 0, dm_wdata = 0, dm_rdata;
  int unsigned checks = 0, failures = 0, cycles;

  always #5 clk = ~clk;

  toy_multicycle dut (
    .clk(clk), .rst_n(rst_n), .run(run), .halted(halted), .pc(pc), .stage(stage), .ir(instr),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .dmem_host_we(dm_we), .dmem_host_addr(dm_addr), .dmem_host_wdata(dm_wdata),
    .dmem_host_rdata(dm_rdata)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Load memories from the model, run to halt, return the cycle count.
  task automatic load_and_run(toy_tb_pkg::toy_model m, output int unsigned ncyc);
    run = 0; rst_n = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 8'(i); prog_data = m.im[i];
      dm_we = 1; dm_addr = 8'(i); dm_wdata = m.dm[i];
    end
    @(negedge clk);
    prog_we = 0; dm_we = 0; rst_n = 1;
    @(negedge clk);
    run = 1;
    ncyc = 0;
    foreach (len_seen[i]) len_seen[i] = 0;
    cur_len = 0;
    while (!halted && ncyc < 20000) begin
      @(posedge clk); ncyc++;
      cur_len++;
      #1;
      // an instruction ends when the counter returns to fetch or the machine halts
      if (stage == 3'd0 || halted) begin
        if (cur_len < 6) len_seen[cur_len]++;
        cur_len = 0;
      end
    end
    @(negedge clk);
    run = 0;
  endtask

  task automatic compare(toy_tb_pkg::toy_model ref_m, int unsigned ncyc, string tag);
    check(halted, {tag, ": halted"});
    check(pc == ref_m.pc, $sformatf("%s: pc %0h expected %0h", tag, pc, ref_m.pc));
    check(ncyc == ref_m.mc_total, $sformatf("%s: %0d cycles, expected %0d", tag, ncyc, ref_m.mc_total));
    begin
      int unsigned exp_len [6];
      foreach (exp_len[i]) exp_len[i] = 0;
      for (int op = 0; op < 16; op++) exp_len[mc_cycles(opcode_e'(op))] += ref_m.op_count[op];
      for (int l = 2; l <= 5; l++)
        check(len_seen[l] == exp_len[l], $sformatf("%s: %0d instructions of %0d cycles, expected %0d", tag, len_seen[l], l, exp_len[l]));
    end
    for (int i = 0; i < 256; i++) begin
      dm_addr = 8'(i);
      #1;
      check(dm_rdata == ref_m.dm[i], $sformatf("%s: M[%02h]=%04h expected %04h", tag, i, dm_rdata, ref_m.dm[i]));
    end
  endtask

  initial begin
    toy_tb_pkg::toy_model m, ref_m;
    int unsigned ncyc;
    static logic [15:0] arr [5] = '{16'd3, 16'd1, 16'd4, 16'd1, 16'd5};

    // directed program
    m = new();
    gen_directed(m);
    m.dm[8'h0F] = 16'd5;
    foreach (arr[i]) m.dm['h10 + i] = arr[i];
    ref_m = new();
    ref_m.im = m.im; ref_m.dm = m.dm;
    void'(ref_m.run(10000));
    load_and_run(m, ncyc);
    compare(ref_m, ncyc, "directed");
    // hand-computed: sum 14, square 196, 196 >> 1 = 98, M[0x11] = 0, 202 cycles
    dm_addr = 8'h20; #1; check(dm_rdata == 16'd14,  "directed: sum");
    dm_addr = 8'h21; #1; check(dm_rdata == 16'd196, "directed: square");
    dm_addr = 8'h22; #1; check(dm_rdata == 16'd98,  "directed: shift");
    dm_addr = 8'h11; #1; check(dm_rdata == 16'd0,   "directed: indexed store");
    check(ncyc == 202, $sformatf("directed: %0d cycles, expected 202", ncyc));
    check(pc == 8'h10, "directed: final pc");

    // random programs
    for (int t = 0; t < NRANDOM; t++) begin
      m = new();
      gen_random(m, 60);
      ref_m = new();
      ref_m.im = m.im; ref_m.dm = m.dm;
      void'(ref_m.run(10000));
      load_and_run(m, ncyc);
      compare(ref_m, ncyc, $sformatf("random %0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
