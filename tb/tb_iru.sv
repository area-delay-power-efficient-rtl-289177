// tb_iru: self-checking test of the input register unit (L = 4, N = 8). Feeds
// rows of 6 blocks, some of them marked as lying above the image, with idle
// cycles in between, and compares all 32 output samples of every block with the
// window x(kL + l - j) taken from a copy of the row (zero left of column 0 and
// in masked rows).
module tb_iru;
  localparam int P = 6;
  logic       clk = 1'b0;
  logic       rst_n, en, row_ok;
  logic [7:0] cur [4];
  logic [2:0] col_blk;
  logic [7:0] s [4][8];
  int checks = 0, failures = 0, masked_rows = 0;

  always #5 clk = ~clk;

  iru #(.CW(3)) dut (.clk(clk), .rst_n(rst_n), .en(en), .cur(cur),
                     .col_blk(col_blk), .row_ok(row_ok), .s(s));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] row [4*P];
    rst_n = 1'b0; en = 1'b0; row_ok = 1'b0; col_blk = '0;
    foreach (cur[l]) cur[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 40; r++) begin
      row_ok = (r % 4 != 1);
      if (!row_ok) masked_rows++;
      foreach (row[n]) row[n] = 8'($urandom);
      for (int k = 0; k < P; k++) begin
        @(negedge clk);
        en = 1'b0;
        col_blk = 3'(k);
        for (int l = 0; l < 4; l++) cur[l] = row[4*k + l];
        #1;
        for (int l = 0; l < 4; l++) begin
          for (int j = 0; j < 8; j++) begin
            int pos;
            logic [7:0] e;
            pos = 4*k + l - j;
            e = (pos < 0 || !row_ok) ? 8'd0 : row[pos];
            checks++;
            if (s[l][j] !== e) begin
              failures++;
              if (failures < 10) $display("FAIL r%0d k%0d l%0d j%0d: %h expected %h", r, k, l, j, s[l][j], e);
            end
          end
        end
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
        if ($urandom_range(0, 3) == 0) repeat (2) @(negedge clk);
      end
    end
    checks++;
    if (masked_rows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
