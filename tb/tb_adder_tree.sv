// tb_adder_tree: self-checking test of the 8-operand, 16-bit adder tree with
// random and all-ones operands against a reference sum modulo 2^16.
module tb_adder_tree;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic [15:0] in_w [8];
  logic [15:0] sum;

  always #5 clk = ~clk;

  adder_tree dut (.in_w(in_w), .sum(sum));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 20000; k++) begin
      logic [15:0] ref_sum;
      ref_sum = '0;
      for (int j = 0; j < 8; j++) begin
        case (k)
          0:       in_w[j] = 16'hffff;
          1:       in_w[j] = 16'(j + 1);
          default: in_w[j] = 16'($urandom);
        endcase
        ref_sum += in_w[j];
      end
      #1;
      checks++;
      if (sum !== ref_sum) begin
        failures++;
        if (failures < 10) $display("FAIL sum %h expected %h", sum, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
