// tb_dwt_ram: checks the N/2 x N/2 RAM module (N = 8, 16 words).
//
// Fills every word with random data, reads all back in shuffled order and
// checks the data arrives the clock after the read request; then runs
// simultaneous writes and reads of different addresses, the pattern the
// engine uses when a level writes its LL band over the band it is reading.
module tb_dwt_ram;
  localparam int N = 8, DW = 16, DEPTH = 16;

  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [3:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;

  dwt_ram #(.N(N), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DW-1:0] model [DEPTH];

  task automatic rd_check(input int a);
    @(negedge clk);
    re = 1'b1; raddr = 4'(a);
    @(negedge clk);
    re = 1'b0;
    checks++;
    if (rdata != model[a]) begin
      failures++;
      $display("FAIL: addr %0d read %0h expected %0h", a, rdata, model[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'(a); wdata = DW'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < DEPTH; i++) rd_check((i * 7 + 3) % DEPTH);
    // write address a while reading address a+8
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'(i); wdata = DW'($urandom);
      re = 1'b1; raddr = 4'(i + 8);
      @(negedge clk);
      we = 1'b0; re = 1'b0;
      model[i] = wdata;
      checks++;
      if (rdata != model[i + 8]) begin
        failures++;
        $display("FAIL: concurrent read of %0d", i + 8);
      end
    end
    for (int a = 0; a < 8; a++) rd_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
