// tb_stage_counter: random enable and load on the stage counter against a
// model: counting 0..4 and wrapping, loading a stage, holding when disabled.
module tb_stage_counter;
  logic       clk = 0, rst_n = 0, en = 0, load = 0;
  logic [2:0] load_val = 0, cnt;
  int         m;
  int unsigned checks = 0, failures = 0, wraps = 0;

  always #5 clk = ~clk;

  stage_counter dut (.clk(clk), .rst_n(rst_n), .en(en), .load(load), .load_val(load_val), .cnt(cnt));

  initial begin
    #12 rst_n = 1;
    m = 0;
    checks++; if (cnt != 0) failures++;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0); load = ($urandom_range(0, 3) == 0); load_val = 3'($urandom_range(0, 4));
      @(posedge clk);
      if (en) begin
        if (load) m = int'(load_val);
        else if (m == 4) begin m = 0; wraps++; end
        else m = m + 1;
      end
      #1; checks++;
      if (cnt != 3'(m)) begin failures++; if (failures < 20) $display("FAIL cnt=%0d expected %0d", cnt, m); end
    end
    checks++; if (wraps == 0) failures++;
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
