// tb_regfile_1port: random single-address reads and writes of the one-port
// register file against a shadow array. The output must show the addressed
// word before the edge and the newly written word after it.
module tb_regfile_1port;
  logic        clk = 0, write = 0;
  logic [2:0]  address = 0;
  logic [15:0] data_in = 0, data_out;
  logic [15:0] shadow [8];
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  regfile_1port dut (.clk(clk), .write(write), .address(address), .data_in(data_in), .data_out(data_out));

  initial begin
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); write = 1; address = 3'(i); data_in = 16'($urandom); shadow[i] = data_in;
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      address = 3'($urandom); write = 1'($urandom); data_in = 16'($urandom);
      #1; checks++;
      if (data_out != shadow[address]) begin failures++; if (failures < 20) $display("FAIL before edge a=%0d", address); end
      @(posedge clk);
      if (write) shadow[address] = data_in;
      #1; checks++;
      if (data_out != shadow[address]) begin failures++; if (failures < 20) $display("FAIL after edge a=%0d", address); end
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
