// tb_src_mux: checks the input multiplexer.
//
// Random pixels and RAM words are presented with a random select; one clock
// later the output must be the zero-extended pixel (select 0) or the RAM
// word (select 1). The RAM word is modelled as arriving one clock after the
// request, as the RAM module delivers it.
module tb_src_mux;
  localparam int PW = 8, DW = 16;

  logic clk = 1'b0, rst_n = 1'b0, sel_ram = 1'b0;
  logic [PW-1:0] pix_in = '0;
  logic [DW-1:0] ram_rdata = '0;
  logic signed [DW-1:0] out_data;

  src_mux #(.PIX_W(PW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic prev_sel;
  logic [PW-1:0] prev_pix;
  logic [DW-1:0] next_ram;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      sel_ram  = 1'($urandom);
      pix_in   = PW'($urandom);
      next_ram = DW'($urandom);
      prev_sel = sel_ram;
      prev_pix = pix_in;
      @(posedge clk);
      #1 ram_rdata = next_ram;   // RAM answer one clock after the request
      sel_ram = ~sel_ram;        // the next request must not disturb this one
      pix_in  = PW'($urandom);
      @(negedge clk);
      checks++;
      if (out_data != (prev_sel ? signed'(next_ram) : signed'(DW'(prev_pix)))) begin
        failures++;
        $display("FAIL: sel=%0d out=%0h", prev_sel, out_data);
      end
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
