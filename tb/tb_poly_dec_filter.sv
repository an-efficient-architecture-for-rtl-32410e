// tb_poly_dec_filter: checks the stage-1 polyphase decimation filter pair.
//
// Rows of 8 random signed samples are streamed one per clock, sometimes
// with idle clocks in between. Every L and H output is compared with the
// direct convolution of dwt_ref_pkg (zero history at each row start), and
// each output must appear exactly one clock after the odd sample that
// completes it (half-rate output).
module tb_poly_dec_filter;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int DW = 16, K = 4, W = 8, ROWS = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_odd = 1'b0, in_row_start = 1'b0;
  logic signed [DW-1:0] in_data = '0;
  logic out_valid;
  logic signed [DW-1:0] out_l, out_h;

  poly_dec_filter #(.DATA_W(DW), .K(K)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint row[];
  longint exp_l[$], exp_h[$];
  int pending_odd;   // clocks since the last odd sample, -1 if none

  always @(posedge clk) begin
    if (out_valid) begin
      checks++;
      if (exp_l.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        automatic longint el = exp_l.pop_front();
        automatic longint eh = exp_h.pop_front();
        if (out_l != el || out_h != eh) begin
          failures++;
          $display("FAIL: L=%0d H=%0d expected %0d %0d", out_l, out_h, el, eh);
        end
      end
    end
    // timing: out_valid exactly one clock after an odd input sample
    checks++;
    if (out_valid != (pending_odd == 1)) begin
      failures++;
      $display("FAIL: out_valid timing");
    end
  end

  initial begin
    pending_odd = -1;
    row = new[W];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < W; c++) row[c] = longint'($urandom_range(0, 4000)) - 2000;
      for (int n = 0; n < W / 2; n++) begin
        exp_l.push_back(filt(row, W, n, D4_LO, K, DW));
        exp_h.push_back(filt(row, W, n, D4_HI, K, DW));
      end
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        if ($urandom_range(0, 3) == 0) begin
          in_valid = 1'b0;
          pending_odd = (pending_odd >= 0) ? pending_odd + 1 : -1;
          @(negedge clk);
        end
        in_valid     = 1'b1;
        in_data      = DW'(row[c]);
        in_odd       = c[0];
        in_row_start = (c == 0);
        pending_odd  = c[0] ? 0 : ((pending_odd >= 0) ? pending_odd + 1 : -1);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    pending_odd = (pending_odd >= 0) ? pending_odd + 1 : -1;
    repeat (3) begin
      @(negedge clk);
      pending_odd = (pending_odd >= 0) ? pending_odd + 1 : -1;
    end
    checks++;
    if (exp_l.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", exp_l.size());
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
