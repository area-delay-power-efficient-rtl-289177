// tb_ipc: self-checking test of the 8-point inner product cell. Random sample
// vectors and coefficient rows (and all-255 operands, which wrap modulo 2^16)
// are checked against a reference inner product; done must come 9 cycles
// after the start edge.
module tb_ipc;
  logic        clk = 1'b0;
  logic        rst_n, start;
  logic [7:0]  x [8];
  logic [7:0]  h [8];
  logic        busy, done;
  logic [15:0] ip;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ipc dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .h(h),
           .busy(busy), .done(done), .ip(ip));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0;
    foreach (x[j]) begin x[j] = '0; h[j] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 1000; k++) begin
      logic [15:0] ref_ip;
      int n;
      ref_ip = '0;
      for (int j = 0; j < 8; j++) begin
        x[j] = (k == 0) ? 8'd255 : 8'($urandom);
        h[j] = (k == 0) ? 8'd255 : 8'($urandom);
        ref_ip += 16'(x[j]) * 16'(h[j]);
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      foreach (x[j]) x[j] = 8'($urandom);
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      checks++;
      if (ip !== ref_ip) begin
        failures++;
        if (failures < 10) $display("FAIL ip %h expected %h", ip, ref_ip);
      end
      checks++;
      if (n != 9) begin failures++; $display("FAIL latency %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
