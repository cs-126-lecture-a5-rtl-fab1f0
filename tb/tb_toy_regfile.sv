// tb_toy_regfile: random reads and writes of the three-port TOY register
// file against a shadow array. Checks bus1/bus2 reads, bus0 showing R[r0]
// when write is off, and that a register changes only at a clock edge with
// write on.
module tb_toy_regfile;
  logic        clk = 0, write = 0;
  logic [2:0]  r0 = 0, r1 = 0, r2 = 0;
  logic [15:0] bus0_in = 0, bus0_out, bus1, bus2;
  logic [15:0] shadow [8];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  toy_regfile dut (.clk(clk), .write(write), .r0(r0), .r1(r1), .r2(r2),
                   .bus0_in(bus0_in), .bus0_out(bus0_out), .bus1(bus1), .bus2(bus2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    // fill every register
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      write = 1; r0 = 3'(i); bus0_in = 16'($urandom); shadow[i] = bus0_in;
    end
    @(negedge clk); write = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      r0 = 3'($urandom); r1 = 3'($urandom); r2 = 3'($urandom);
      write = 1'($urandom); bus0_in = 16'($urandom);
      #1;
      check(bus1 == shadow[r1], $sformatf("bus1 r%0d", r1));
      check(bus2 == shadow[r2], $sformatf("bus2 r%0d", r2));
      check(bus0_out == shadow[r0], $sformatf("bus0 r%0d", r0));
      @(posedge clk);
      if (write) shadow[r0] = bus0_in;
      #1;
      check(bus0_out == shadow[r0], "bus0 after edge");
    end
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
