// tb_toy_dmem: random processor-port and host-port accesses to the data
// memory against a shadow array, including both ports writing the same word
// in one cycle (the processor's write wins).
module tb_toy_dmem;
  logic        clk = 0, mem_wr = 0, host_we = 0;
  logic [7:0]  addr = 0, host_addr = 0;
  logic [15:0] wdata = 0, rdata, host_wdata = 0, host_rdata;
  logic [15:0] shadow [256];
  int unsigned checks = 0, failures = 0, collisions = 0;

  always #5 clk = ~clk;

  toy_dmem dut (.clk(clk), .addr(addr), .wdata(wdata), .mem_wr(mem_wr), .rdata(rdata),
                .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata), .host_rdata(host_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); host_we = 1; host_addr = 8'(i); host_wdata = 16'($urandom); shadow[i] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      addr = 8'($urandom_range(0, 15)); host_addr = 8'($urandom_range(0, 15));
      mem_wr = 1'($urandom); host_we = 1'($urandom);
      wdata = 16'($urandom); host_wdata = 16'($urandom);
      #1;
      check(rdata == shadow[addr], "cpu read");
      check(host_rdata == shadow[host_addr], "host read");
      @(posedge clk);
      if (host_we) shadow[host_addr] = host_wdata;
      if (mem_wr)  shadow[addr] = wdata;
      if (host_we && mem_wr && addr == host_addr) collisions++;
    end
    @(negedge clk); mem_wr = 0; host_we = 0;
    for (int i = 0; i < 256; i++) begin
      host_addr = 8'(i); addr = 8'(255 - i); #1;
      check(host_rdata == shadow[i], "final host read");
      check(rdata == shadow[255 - i], "final cpu read");
    end
    check(collisions > 0, "same-word writes occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
