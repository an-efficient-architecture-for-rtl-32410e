// tb_fold_vdec_filter: checks the stage-2 vertical folded decimation filter.
//
// Two instances (low-pass and high-pass taps) with N = 16, J = 3 receive the
// same raster-scanned blocks: 16 x 8 for level 1, 8 x 4 for level 2, 4 x 2
// for level 3, then level 1 again, with random idle clocks. Every output row
// is compared with the column-wise decimation filter of dwt_ref_pkg (rows
// above the block taken as zero), so stale line-delay contents from the
// previous level must not leak in. Outputs must come only from odd rows.
module tb_fold_vdec_filter;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 16, J = 3, K = 4, DW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_row_odd = 1'b0, in_row0 = 1'b0;
  logic signed [DW-1:0] in_data = '0;
  logic [cw(J+1)-1:0] level = 1;
  logic ov_lo, ov_hi;
  logic signed [DW-1:0] od_lo, od_hi;

  fold_vdec_filter #(.N(N), .J(J), .K(K), .DATA_W(DW), .C(D4_LO)) dut_lo (
    .clk, .rst_n, .in_valid, .in_data, .in_row_odd, .in_row0, .level,
    .out_valid(ov_lo), .out_data(od_lo));
  fold_vdec_filter #(.N(N), .J(J), .K(K), .DATA_W(DW), .C(D4_HI)) dut_hi (
    .clk, .rst_n, .in_valid, .in_data, .in_row_odd, .in_row0, .level,
    .out_valid(ov_hi), .out_data(od_hi));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nout = 0;
  longint exp_lo[$], exp_hi[$];
  logic prev_odd_valid = 1'b0;

  always @(posedge clk) begin
    checks++;
    if (ov_lo != prev_odd_valid || ov_hi != prev_odd_valid) begin
      failures++;
      $display("FAIL: output timing");
    end
    prev_odd_valid <= in_valid && in_row_odd;
    if (ov_lo) begin
      nout++;
      checks++;
      if (exp_lo.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        automatic longint el = exp_lo.pop_front();
        automatic longint eh = exp_hi.pop_front();
        if (od_lo != el || od_hi != eh) begin
          failures++;
          $display("FAIL: got %0d %0d expected %0d %0d", od_lo, od_hi, el, eh);
        end
      end
    end
  end

  int lv_seq[4] = '{1, 2, 3, 1};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (lv_seq[s]) begin
      automatic int lv = lv_seq[s];
      automatic int cols = N >> lv;
      automatic int rows = N >> (lv - 1);
      longint blk[], col[];
      blk = new[rows * cols];
      col = new[rows];
      foreach (blk[i]) blk[i] = longint'($urandom_range(0, 6000)) - 3000;
      for (int k = 0; k < rows / 2; k++)
        for (int n = 0; n < cols; n++) begin
          for (int r = 0; r < rows; r++) col[r] = blk[r * cols + n];
          exp_lo.push_back(filt(col, rows, k, D4_LO, K, DW));
          exp_hi.push_back(filt(col, rows, k, D4_HI, K, DW));
        end
      for (int r = 0; r < rows; r++)
        for (int c = 0; c < cols; c++) begin
          @(negedge clk);
          if ($urandom_range(0, 3) == 0) begin
            in_valid = 1'b0;
            @(negedge clk);
          end
          in_valid   = 1'b1;
          in_data    = DW'(blk[r * cols + c]);
          in_row_odd = r[0];
          in_row0    = (r == 0);
          level      = (cw(J+1))'(lv);
        end
      @(negedge clk);
      in_valid = 1'b0;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (exp_lo.size() != 0 || nout != 64 + 16 + 4 + 64) begin
      failures++;
      $display("FAIL: %0d outputs, %0d missing", nout, exp_lo.size());
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
