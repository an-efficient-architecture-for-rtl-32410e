// tb_line_delay: checks the variable-length line delay.
//
// With N = 16 and J = 3 the delay must be 8, 4 and 2 words long in levels
// 1, 2 and 3. For each level in turn (and back to level 1) random words are
// shifted in, with idle clocks in between, and once the delay is full the
// output must show the word stored exactly N/2^level shifts earlier.
module tb_line_delay;
  import dwt_pkg::*;

  localparam int N = 16, J = 3, W = 12;

  logic clk = 1'b0;
  logic [cw(J+1)-1:0] level = 1;
  logic shift_en = 1'b0;
  logic [W-1:0] din = '0, dout;

  line_delay #(.N(N), .J(J), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int lv_seq[4] = '{1, 2, 3, 1};

  initial begin
    foreach (lv_seq[s]) begin
      automatic int lv = lv_seq[s];
      automatic int d = N >> lv;
      logic [W-1:0] hist[$];
      hist = {};
      @(negedge clk);
      level = (cw(J+1))'(lv);
      for (int i = 0; i < 5 * d + 7; i++) begin
        @(negedge clk);
        if ($urandom_range(0, 4) == 0) begin
          shift_en = 1'b0;
          @(negedge clk);
        end
        if (hist.size() >= d) begin
          checks++;
          if (dout != hist[hist.size() - d]) begin
            failures++;
            $display("FAIL: level %0d shift %0d dout=%0h expected %0h", lv, i, dout,
                     hist[hist.size() - d]);
          end
        end
        din = W'($urandom);
        shift_en = 1'b1;
        hist.push_back(din);
      end
      @(negedge clk);
      shift_en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
