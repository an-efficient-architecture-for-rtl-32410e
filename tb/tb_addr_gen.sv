// tb_addr_gen: checks the RAM address generator for N = 16, J = 3.
//
// Read side: levels 2 and 3 read bands of 8 x 8 and 4 x 4 words, so the
// read address must count 0..63 then 0..15 and wrap. Write side: levels 1, 2
// and 3 write LL bands of 8 x 8, 4 x 4 and 2 x 2, and the address, row and
// column must follow raster order. Enables are given with random gaps, and
// clear must return everything to zero.
module tb_addr_gen;
  import dwt_pkg::*;

  localparam int N = 16, J = 3;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic rd_en = 1'b0, wr_en = 1'b0;
  logic [cw(J+1)-1:0] rd_level = 2, wr_level = 1;
  logic [cw(N*N/4)-1:0] rd_addr, wr_addr;
  logic [cw(N/2)-1:0] wr_row, wr_col;

  addr_gen #(.N(N), .J(J)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int lv = 2; lv <= J; lv++) begin
      automatic int w = N >> (lv - 1);
      rd_level = (cw(J+1))'(lv);
      for (int i = 0; i < w * w; i++) begin
        @(negedge clk);
        rd_en = 1'b0;
        checks++;
        if (int'(rd_addr) != i) begin
          failures++;
          $display("FAIL: level %0d read %0d gave %0d", lv, i, rd_addr);
        end
        if ($urandom_range(0, 3) == 0) @(negedge clk);
        rd_en = 1'b1;
      end
      @(negedge clk);
      rd_en = 1'b0;
    end
    checks++;
    if (rd_addr != 0) begin failures++; $display("FAIL: read address did not wrap"); end
    for (int lv = 1; lv <= J; lv++) begin
      automatic int s = N >> lv;
      wr_level = (cw(J+1))'(lv);
      for (int r = 0; r < s; r++)
        for (int c = 0; c < s; c++) begin
          @(negedge clk);
          wr_en = 1'b0;
          checks++;
          if (int'(wr_addr) != r * s + c || int'(wr_row) != r || int'(wr_col) != c) begin
            failures++;
            $display("FAIL: level %0d (%0d,%0d) gave addr %0d row %0d col %0d", lv, r, c,
                     wr_addr, wr_row, wr_col);
          end
          if ($urandom_range(0, 3) == 0) @(negedge clk);
          wr_en = 1'b1;
        end
      @(negedge clk);
      wr_en = 1'b0;
    end
    // clear in the middle of a band
    @(negedge clk); rd_en = 1'b1; wr_en = 1'b1;
    @(negedge clk); rd_en = 1'b0; wr_en = 1'b0; clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    checks++;
    if (rd_addr != 0 || wr_addr != 0 || wr_row != 0 || wr_col != 0) begin
      failures++;
      $display("FAIL: clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
