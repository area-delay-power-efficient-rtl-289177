// tb_srb: self-checking test of a shift register block at its default size
// (4 shift registers of 128 words). Pushes random blocks with random idle
// cycles and checks that each block reappears exactly 128 block steps later and
// that idle cycles do not move the contents.
module tb_srb;
  localparam int P = 128;
  logic       clk = 1'b0;
  logic       en;
  logic [7:0] din [4];
  logic [7:0] dout [4];
  logic [7:0] sent [$][4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  srb dut (.clk(clk), .en(en), .din(din), .dout(dout));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0;
    foreach (din[l]) din[l] = '0;
    for (int t = 0; t < 5 * P; t++) begin
      logic [7:0] blk [4];
      @(negedge clk);
      foreach (blk[l]) blk[l] = 8'($urandom);
      din = blk;
      if (t >= P) begin
        for (int l = 0; l < 4; l++) begin
          checks++;
          if (dout[l] !== sent[t - P][l]) begin
            failures++;
            if (failures < 10) $display("FAIL t%0d l%0d %h expected %h", t, l, dout[l], sent[t-P][l]);
          end
        end
      end
      sent.push_back(blk);
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      din[0] = ~din[0];
      if ($urandom_range(0, 2) == 0) repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
