// tb_toy_alu: checks every ALU operation on corner and random operands
// against results computed here with plain SystemVerilog operators.
module tb_toy_alu;
  import toy_pkg::*;
  logic [15:0] a, b, y;
  alu_op_e     op;
  int unsigned checks = 0, failures = 0;

  toy_alu dut (.a(a), .b(b), .alu_ctrl(op), .y(y));

  function automatic logic [15:0] expect_y(alu_op_e o, logic [15:0] x, logic [15:0] z);
    logic [31:0] p;
    case (o)
      ALU_ADD: return 16'(32'(x) + 32'(z));
      ALU_SUB: return 16'(32'(x) - 32'(z));
      ALU_MUL: begin p = 32'(x) * 32'(z); return p[15:0]; end
      ALU_XOR: return x ^ z;
      ALU_AND: return x & z;
      ALU_SHR: return 16'(32'(x) >> (z % 16));
      ALU_SHL: return 16'((32'(x) << (z % 16)) & 32'hFFFF);
      default: return x;
    endcase
  endfunction

  initial begin
    static logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h00F3};
    for (int o = 0; o < 8; o++) begin
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) begin
          op = alu_op_e'(o); a = corners[i]; b = corners[j];
          #1; checks++;
          if (y !== expect_y(op, a, b)) begin
            failures++; $display("FAIL op=%0d a=%h b=%h y=%h", o, a, b, y);
          end
        end
      for (int k = 0; k < 500; k++) begin
        op = alu_op_e'(o); a = 16'($urandom); b = 16'($urandom);
        #1; checks++;
        if (y !== expect_y(op, a, b)) begin
          failures++; if (failures < 20) $display("FAIL op=%0d a=%h b=%h y=%h", o, a, b, y);
        end
      end
    end
    // worked examples
    op = ALU_MUL; a = 16'd300; b = 16'd300; #1; checks++; if (y != 16'h5F90) failures++;  // 90000 mod 65536
    op = ALU_SHR; a = 16'h8000; b = 16'd15; #1; checks++; if (y != 16'h0001) failures++;
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
