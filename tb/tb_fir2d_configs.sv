// tb_fir2d_configs: runs the evaluated filter configurations other than the
// default one on a full 512 x 512 frame each: filter size N = 4 with block size
// L = 2 and L = 4, and N = 8 with L = 2 (the default N = 8, L = 4 is covered by
// tb_fir2d_full). Each configuration is checked output by output against a
// reference 2D convolution.
module tb_fir2d_configs;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic fin [3];
  int   c [3];
  int   f [3];
  int   checks, failures;

  always #5 clk = ~clk;

  fir2d_cfg_run #(.M(512), .L(2), .N(4)) u_n4l2 (.clk(clk), .rst_n(rst_n), .finished(fin[0]), .checks(c[0]), .failures(f[0]));
  fir2d_cfg_run #(.M(512), .L(4), .N(4)) u_n4l4 (.clk(clk), .rst_n(rst_n), .finished(fin[1]), .checks(c[1]), .failures(f[1]));
  fir2d_cfg_run #(.M(512), .L(2), .N(8)) u_n8l2 (.clk(clk), .rst_n(rst_n), .finished(fin[2]), .checks(c[2]), .failures(f[2]));

  initial begin : watchdog
    repeat (1300000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    @(negedge clk);
    checks = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
