// tb_transform_module: checks one transform module (stage 1 + stage 2).
//
// With N = 8 and J = 3 it is fed, one sample per clock and without gaps,
// an 8 x 8 random image as level 1, then a 4 x 4 and a 2 x 2 image as levels
// 2 and 3, as in the 84-clock schedule of the engine. The four subband
// outputs are compared with dwt_ref_pkg. Timing: an output (k, n) of a level
// must appear exactly two clocks after the input sample (2k+1, 2n+1) that
// completes it (stage-1 register, stage-2 register), so 16 + 4 + 1 outputs
// in all, only while odd rows are streaming.
module tb_transform_module;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 8, J = 3, K = 4, DW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_col_odd = 1'b0, in_col0 = 1'b0, in_row_odd = 1'b0, in_row0 = 1'b0;
  logic signed [DW-1:0] in_data = '0;
  logic [cw(J+1)-1:0] in_level = 1;
  logic out_valid;
  logic [cw(J+1)-1:0] out_level;
  logic signed [DW-1:0] out_ll, out_lh, out_hl, out_hh;

  transform_module #(.N(N), .J(J), .K(K), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nout = 0, cyc = 0;
  longint e_ll[$], e_lh[$], e_hl[$], e_hh[$];
  int e_cyc[$], e_lvl[$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      nout++;
      checks++;
      if (e_ll.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        automatic longint a = e_ll.pop_front(), b = e_lh.pop_front();
        automatic longint c = e_hl.pop_front(), d = e_hh.pop_front();
        automatic int ec = e_cyc.pop_front(), el = e_lvl.pop_front();
        if (out_ll != a || out_lh != b || out_hl != c || out_hh != d || int'(out_level) != el) begin
          failures++;
          $display("FAIL: level %0d got %0d %0d %0d %0d expected %0d %0d %0d %0d", el,
                   out_ll, out_lh, out_hl, out_hh, a, b, c, d);
        end
        checks++;
        if (cyc != ec) begin
          failures++;
          $display("FAIL: output at clock %0d, expected %0d", cyc, ec);
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int lv = 1; lv <= J; lv++) begin
      automatic int w = N >> (lv - 1);
      longint img[], ll[], lh[], hl[], hh[];
      img = new[w * w];
      foreach (img[i]) img[i] = longint'($urandom_range(0, 255));
      level(img, w, K, D4_LO, D4_HI, DW, ll, lh, hl, hh);
      foreach (ll[i]) begin
        e_ll.push_back(ll[i]); e_lh.push_back(lh[i]);
        e_hl.push_back(hl[i]); e_hh.push_back(hh[i]);
        e_lvl.push_back(lv);
      end
      for (int r = 0; r < w; r++)
        for (int c = 0; c < w; c++) begin
          in_valid   = 1'b1;
          in_data    = DW'(img[r * w + c]);
          in_col_odd = c[0];
          in_col0    = (c == 0);
          in_row_odd = r[0];
          in_row0    = (r == 0);
          in_level   = (cw(J+1))'(lv);
          // sample is taken at the next posedge, i.e. at clock number cyc
          if (r[0] && c[0]) e_cyc.push_back(cyc + 2);
          @(negedge clk);
        end
    end
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (nout != 16 + 4 + 1 || e_ll.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs", nout);
    end
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
