// tb_reg_mux_example: random write enables and selects on the
// register/mux/register example, against a cycle model kept here. Reg3 must
// copy Reg1 or Reg2 (by Select) at an edge with WriteEnable3 on, and keep its
// value with it off; both cases are counted and must occur.
module tb_reg_mux_example;
  logic        clk = 0, we1 = 0, we2 = 0, we3 = 0, sel = 0;
  logic [15:0] in1 = 0, in2 = 0, q1, q2, q3;
  logic [15:0] m1, m2, m3;
  int unsigned checks = 0, failures = 0, copies = 0, holds = 0;

  always #5 clk = ~clk;

  reg_mux_example dut (.clk(clk), .write_enable1(we1), .write_enable2(we2), .write_enable3(we3),
                       .select(sel), .in1(in1), .in2(in2), .reg1_q(q1), .reg2_q(q2), .reg3_q(q3));

  initial begin
    @(negedge clk); we1 = 1; we2 = 1; we3 = 0; in1 = 16'h1111; in2 = 16'h2222;
    @(negedge clk); we3 = 1; sel = 0; we1 = 0; we2 = 0;
    @(negedge clk);
    m1 = 16'h1111; m2 = 16'h2222; m3 = 16'h1111;
    for (int k = 0; k < 2000; k++) begin
      we1 = 1'($urandom); we2 = 1'($urandom); we3 = 1'($urandom); sel = 1'($urandom);
      in1 = 16'($urandom); in2 = 16'($urandom);
      @(posedge clk);
      if (we3) begin m3 = sel ? m2 : m1; copies++; end else holds++;
      if (we1) m1 = in1;
      if (we2) m2 = in2;
      #1;
      checks += 3;
      if (q1 != m1) failures++;
      if (q2 != m2) failures++;
      if (q3 != m3) begin failures++; if (failures < 20) $display("FAIL reg3 %h expected %h", q3, m3); end
      @(negedge clk);
    end
    checks += 2;
    if (copies == 0) failures++;
    if (holds == 0) failures++;
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
