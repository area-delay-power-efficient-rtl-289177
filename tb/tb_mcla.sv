// tb_mcla: self-checking test of the MCLA adder at 16 bits (default) and 8 bits.
// The 8-bit adder is checked exhaustively, the 16-bit adder with corner values
// and random operands, both against the + operator.
module tb_mcla;
  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;

  always #5 clk = ~clk;

  logic [15:0] a16, b16, s16;
  logic        c16;
  logic [7:0]  a8, b8, s8;
  logic        c8;

  mcla dut16 (.a(a16), .b(b16), .s(s16), .cout(c16));
  mcla #(.W(8)) dut8 (.a(a8), .b(b8), .s(s8), .cout(c8));

  task automatic chk16(input logic [15:0] x, input logic [15:0] y);
    logic [16:0] ref_sum;
    a16 = x; b16 = y; #1;
    ref_sum = {1'b0, x} + {1'b0, y};
    checks++;
    if ({c16, s16} !== ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL16 %h + %h = %h, expected %h", x, y, {c16, s16}, ref_sum);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y); #1;
        checks++;
        if ({c8, s8} !== 9'(x + y)) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d + %0d = %0d", x, y, {c8, s8});
        end
      end
    end
    chk16(16'hffff, 16'h0001);
    chk16(16'hffff, 16'hffff);
    chk16(16'h00ff, 16'h0001);
    chk16(16'h7fff, 16'h0001);
    chk16(16'h8000, 16'h8000);
    chk16(16'h5555, 16'haaaa);
    chk16(16'h5555, 16'hab55);
    for (int k = 0; k < 16; k++) chk16(16'hffff >> k, 16'(1) << k);
    for (int k = 0; k < 100000; k++) chk16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
