// tb_toy_imem: fills the instruction memory through its load port with a
// known pattern, then reads every word back at random order on the read port.
module tb_toy_imem;
  logic        clk = 0, prog_we = 0;
  logic [7:0]  addr = 0, prog_addr = 0;
  logic [15:0] rdata, prog_data = 0;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  toy_imem dut (.clk(clk), .addr(addr), .rdata(rdata), .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data));

  function automatic logic [15:0] pattern(int unsigned i);
    return 16'((i * 40503 + 12345) ^ (i << 7));
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_data = pattern(i);
    end
    @(negedge clk); prog_we = 0;
    for (int k = 0; k < 1000; k++) begin
      addr = 8'($urandom); #1; checks++;
      if (rdata != pattern(int'(addr))) begin failures++; if (failures < 20) $display("FAIL a=%h %h", addr, rdata); end
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
