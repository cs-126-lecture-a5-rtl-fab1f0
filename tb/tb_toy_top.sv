// tb_toy_top: end-to-end test of toy_top at its default sizes.
//
// Both processors get the same program and data, run side by side until they
// halt, and are compared with the reference model: every data-memory word,
// the final PC, and the cycle count (one per instruction for the
// single-cycle processor, the sum of the stage counts for the multicycle
// one). The first program is the directed one, the rest random. Meanwhile the
// one-port register file and the register/mux/register example are driven
// with random traffic and checked against shadow models.
//
// Each mechanism is counted and must occur at least once: branch taken and
// not taken, indexed load/store, jump-and-link and jump-register, halt,
// multicycle instructions of 2, 3, 4 and 5 cycles (stage skipping), one-port
// register file write and read, Reg3 copy and hold.
module tb_toy_top;
  import toy_pkg::*;
  import toy_tb_pkg::*;

  localparam int unsigned NRANDOM = 20;

  logic        clk = 0, rst_n = 0;
  logic        sc_run = 0, sc_halted, mc_run = 0, mc_halted;
  logic [7:0]  sc_pc, mc_pc;
  logic [2:0]  mc_stage;
  logic [15:0] sc_instr, mc_ir;
  logic        sc_prog_we = 0, mc_prog_we = 0, sc_dmem_we = 0, mc_dmem_we = 0;
  logic [7:0]  sc_prog_addr = 0, mc_prog_addr = 0, sc_dmem_addr = 0, mc_dmem_addr = 0;
  logic [15:0] sc_prog_data = 0, mc_prog_data = 0, sc_dmem_wdata = 0, mc_dmem_wdata = 0;
  logic [15:0] sc_dmem_rdata, mc_dmem_rdata;
  logic        rf_write = 0;
  logic [2:0]  rf_address = 0;
  logic [15:0] rf_data_in = 0, rf_data_out;
  logic        ex_we1 = 0, ex_we2 = 0, ex_we3 = 0, ex_select = 0;
  logic [15:0] ex_in1 = 0, ex_in2 = 0, ex_reg1, ex_reg2, ex_reg3;

  int unsigned checks = 0, failures = 0;
  // mechanism counters
  int unsigned n_taken = 0, n_not_taken = 0, n_indexed = 0, n_call = 0, n_jr = 0, n_halt = 0;
  int unsigned n_len [6];
  int unsigned n_rf_write = 0, n_rf_read = 0, n_copy = 0, n_hold = 0;

  always #5 clk = ~clk;

  toy_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---- side traffic on the two small example circuits ----
  logic [15:0] rf_shadow [8];
  logic [15:0] m1, m2, m3;
  logic        side_on = 0;

  initial begin
    for (int i = 0; i < 8; i++) rf_shadow[i] = '0;
    wait (side_on);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); rf_write = 1; rf_address = 3'(i); rf_data_in = '0;
    end
    @(negedge clk); ex_we1 = 1; ex_we2 = 1; ex_we3 = 1; ex_in1 = 0; ex_in2 = 0; ex_select = 0; rf_write = 0;
    @(negedge clk);
    m1 = 0; m2 = 0; m3 = 0;
    forever begin
      @(negedge clk);
      rf_write = 1'($urandom); rf_address = 3'($urandom); rf_data_in = 16'($urandom);
      ex_we1 = 1'($urandom); ex_we2 = 1'($urandom); ex_we3 = 1'($urandom); ex_select = 1'($urandom);
      ex_in1 = 16'($urandom); ex_in2 = 16'($urandom);
      #1;
      check(rf_data_out == rf_shadow[rf_address], "one-port register file read");
      n_rf_read++;
      @(posedge clk);
      if (rf_write) begin rf_shadow[rf_address] = rf_data_in; n_rf_write++; end
      if (ex_we3) begin m3 = ex_select ? m2 : m1; n_copy++; end else n_hold++;
      if (ex_we1) m1 = ex_in1;
      if (ex_we2) m2 = ex_in2;
      #1;
      check(ex_reg1 == m1 && ex_reg2 == m2 && ex_reg3 == m3, "register/mux/register example");
    end
  end

  // ---- processors ----
  task automatic load_both(toy_tb_pkg::toy_model m);
    sc_run = 0; mc_run = 0; rst_n = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      sc_prog_we = 1; sc_prog_addr = 8'(i); sc_prog_data = m.im[i];
      mc_prog_we = 1; mc_prog_addr = 8'(i); mc_prog_data = m.im[i];
      sc_dmem_we = 1; sc_dmem_addr = 8'(i); sc_dmem_wdata = m.dm[i];
      mc_dmem_we = 1; mc_dmem_addr = 8'(i); mc_dmem_wdata = m.dm[i];
    end
    @(negedge clk);
    sc_prog_we = 0; mc_prog_we = 0; sc_dmem_we = 0; mc_dmem_we = 0; rst_n = 1;
  endtask

  task automatic run_both(output int unsigned sc_cyc, output int unsigned mc_cyc);
    int unsigned cur;
    @(negedge clk);
    sc_run = 1; mc_run = 1;
    sc_cyc = 0; mc_cyc = 0; cur = 0;
    while ((!sc_halted || !mc_halted) && mc_cyc < 50000) begin
      @(posedge clk);
      if (!sc_halted) sc_cyc++;
      if (!mc_halted) begin mc_cyc++; cur++; end
      #1;
      if (cur != 0 && (mc_stage == 3'd0 || mc_halted)) begin
        if (cur < 6) n_len[cur]++;
        cur = 0;
      end
    end
    @(negedge clk);
    sc_run = 0; mc_run = 0;
  endtask

  task automatic run_program(toy_tb_pkg::toy_model m, string tag);
    toy_tb_pkg::toy_model ref_m;
    int unsigned sc_cyc, mc_cyc;
    ref_m = new();
    ref_m.im = m.im; ref_m.dm = m.dm;
    void'(ref_m.run(10000));
    load_both(m);
    run_both(sc_cyc, mc_cyc);
    check(sc_halted && mc_halted, {tag, ": both halted"});
    check(sc_pc == ref_m.pc && mc_pc == ref_m.pc, {tag, ": final pc"});
    check(sc_cyc == ref_m.ninstr, $sformatf("%s: single-cycle %0d cycles, expected %0d", tag, sc_cyc, ref_m.ninstr));
    check(mc_cyc == ref_m.mc_total, $sformatf("%s: multicycle %0d cycles, expected %0d", tag, mc_cyc, ref_m.mc_total));
    for (int i = 0; i < 256; i++) begin
      sc_dmem_addr = 8'(i); mc_dmem_addr = 8'(i);
      #1;
      check(sc_dmem_rdata == ref_m.dm[i], $sformatf("%s: single-cycle M[%02h]", tag, i));
      check(mc_dmem_rdata == ref_m.dm[i], $sformatf("%s: multicycle M[%02h]", tag, i));
    end
    n_taken += ref_m.taken; n_not_taken += ref_m.not_taken; n_indexed += ref_m.indexed;
    n_call += ref_m.op_count[OP_JL]; n_jr += ref_m.op_count[OP_JR]; n_halt += ref_m.op_count[OP_HALT];
  endtask

  initial begin
    toy_tb_pkg::toy_model m;
    foreach (n_len[i]) n_len[i] = 0;
    side_on = 1;
    m = new();
    gen_directed(m);
    m.dm[8'h0F] = 16'd5;
    m.dm[8'h10] = 16'd3; m.dm[8'h11] = 16'd1; m.dm[8'h12] = 16'd4; m.dm[8'h13] = 16'd1; m.dm[8'h14] = 16'd5;
    run_program(m, "directed");
    sc_dmem_addr = 8'h20; mc_dmem_addr = 8'h21; #1;
    check(sc_dmem_rdata == 16'd14 && mc_dmem_rdata == 16'd196, "directed: sum and square");
    for (int t = 0; t < NRANDOM; t++) begin
      m = new();
      gen_random(m, 80);
      run_program(m, $sformatf("random %0d", t));
    end
    $display("mechanisms: taken=%0d not_taken=%0d indexed=%0d call=%0d jr=%0d halt=%0d len2=%0d len3=%0d len4=%0d len5=%0d rf_wr=%0d rf_rd=%0d copy=%0d hold=%0d",
             n_taken, n_not_taken, n_indexed, n_call, n_jr, n_halt, n_len[2], n_len[3], n_len[4], n_len[5],
             n_rf_write, n_rf_read, n_copy, n_hold);
    check(n_taken > 0, "branch taken happened");
    check(n_not_taken > 0, "branch not taken happened");
    check(n_indexed > 0, "indexed addressing happened");
    check(n_call > 0, "jump and link happened");
    check(n_jr > 0, "jump register happened");
    check(n_halt > 0, "halt happened");
    for (int l = 2; l <= 5; l++) check(n_len[l] > 0, $sformatf("%0d-cycle instruction happened", l));
    check(n_rf_write > 0 && n_rf_read > 0, "one-port register file used");
    check(n_copy > 0 && n_hold > 0, "Reg3 copy and hold happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
