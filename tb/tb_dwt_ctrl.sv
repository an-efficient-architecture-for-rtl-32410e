// tb_dwt_ctrl: checks the level sequencer for N = 8, J = 3.
//
// After start the controller must issue 84 consecutive requests: 64 pixel
// requests (level 1) and then 16 + 4 RAM reads (levels 2 and 3) with the
// multiplexer on the RAM, no gap anywhere. One clock after each request the
// position it presents to the transform module (column/row parity, first
// column, first row, level) must be that of the request, in raster order.
// done must follow 4 clocks after the last request, busy must cover the run,
// and a start while busy must be ignored. Two runs are made.
module tb_dwt_ctrl;
  import dwt_pkg::*;

  localparam int N = 8, J = 3, TOTAL = 84;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, pix_req, rd_en, sel_ram, level_last;
  logic [cw(J+1)-1:0] rd_level, tm_level;
  logic tm_valid, tm_col_odd, tm_col0, tm_row_odd, tm_row0;

  dwt_ctrl #(.N(N), .J(J)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int exp_lv[$], exp_r[$], exp_c[$];
  int nreq, last_req_cyc, done_cyc, cyc;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tm_valid) begin
      automatic int lv = exp_lv.pop_front(), r = exp_r.pop_front(), c = exp_c.pop_front();
      checks++;
      if (int'(tm_level) != lv || tm_row_odd != r[0] || tm_col_odd != c[0] ||
          tm_col0 != (c == 0) || tm_row0 != (r == 0)) begin
        failures++;
        $display("FAIL: position lv%0d (%0d,%0d)", lv, r, c);
      end
    end
    if (pix_req || rd_en) begin
      nreq <= nreq + 1;
      last_req_cyc <= cyc;
    end
    if (done) done_cyc <= cyc;
  end

  task automatic run();
    nreq = 0; done_cyc = -1;
    for (int lv = 1; lv <= J; lv++)
      for (int r = 0; r < (N >> (lv - 1)); r++)
        for (int c = 0; c < (N >> (lv - 1)); c++) begin
          exp_lv.push_back(lv); exp_r.push_back(r); exp_c.push_back(c);
        end
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    for (int i = 0; i < TOTAL; i++) begin
      automatic int k = i, lv = (k < 64) ? 1 : (k < 80) ? 2 : 3;
      checks++;
      if (!busy || pix_req != (lv == 1) || rd_en != (lv != 1) || sel_ram != (lv != 1) ||
          int'(rd_level) != lv) begin
        failures++;
        $display("FAIL: request %0d (level %0d) pix_req=%0d rd_en=%0d", i, lv, pix_req, rd_en);
      end
      if (i == 40) start = 1'b1;   // ignored while busy
      @(negedge clk);
      start = 1'b0;
    end
    checks++;
    if (pix_req || rd_en) begin failures++; $display("FAIL: requests past 84 clocks"); end
    repeat (5) @(negedge clk);
    checks++;
    if (nreq != TOTAL || done_cyc - last_req_cyc != 4 || busy || exp_lv.size() != 0) begin
      failures++;
      $display("FAIL: %0d requests, done %0d clocks after the last, busy=%0d",
               nreq, done_cyc - last_req_cyc, busy);
    end
  endtask

  initial begin
    cyc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run();
    run();
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
