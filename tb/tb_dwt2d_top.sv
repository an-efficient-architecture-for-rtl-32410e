// tb_dwt2d_top: end-to-end test of the 2-D DWT engine at its default size
// (8 x 8 image, 3 levels, 4-tap filters).
//
// Three images are transformed back to back (random pixels, a saturated
// all-255 image and a ramp). Every subband sample of every level is compared
// with dwt_ref_pkg, the row/column labels are checked, and so is the
// schedule: one sample per clock with no gap between levels, i.e.
// 64 + 16 + 4 = 84 clocks of requests, 64 of them pixel requests and 20 RAM
// reads. The test also counts how often each mechanism of the engine was
// used (multiplexer switched to the RAM, each line-delay length, row-start
// clearing of stage 1, first-row zeroing of stage 2, in-place RAM write of
// an LL band) and fails if any never happened.
module tb_dwt2d_top;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 8, J = 3, K = 4, DW = 16;
  localparam int TOTAL = 84;   // sum_{L} N^2/4^(L-1)

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, pix_req, out_valid;
  logic [7:0] pix_in;
  logic [cw(J+1)-1:0] out_level;
  logic [cw(N/2)-1:0] out_row, out_col;
  logic signed [DW-1:0] out_ll, out_lh, out_hl, out_hh;

  dwt2d_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint img[];
  int pix_idx;
  longint got[4][J+1][N*N/4];   // band, level, index
  int ngot[J+1];
  int cyc, req_cycles, pix_cycles, rd_cycles, first_req, last_req;
  // mechanism counters
  int n_mux_switch, n_row_clear, n_row0, n_ram_wr;
  int n_ld_len[J+1];
  logic sel_q;

  assign pix_in = (pix_idx < N * N) ? 8'(img[pix_idx]) : 8'h00;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pix_req) pix_idx <= pix_idx + 1;
    if (rst_n && (pix_req || dut.rd_en)) begin
      req_cycles <= req_cycles + 1;
      if (first_req < 0) first_req <= cyc;
      last_req <= cyc;
    end
    if (pix_req) pix_cycles <= pix_cycles + 1;
    if (dut.rd_en) rd_cycles <= rd_cycles + 1;
    sel_q <= dut.sel_ram;
    if (dut.sel_ram && !sel_q && busy) n_mux_switch++;
    if (dut.tm_valid && dut.tm_col0) n_row_clear++;
    if (dut.tm_valid && dut.tm_row0 && !dut.tm_row_odd) n_row0++;
    if (out_valid) begin
      automatic int l = int'(out_level);
      automatic int s = N >> l;
      n_ram_wr++;
      n_ld_len[l]++;
      checks++;
      if (l < 1 || l > J || int'(out_row) >= s || int'(out_col) >= s) begin
        failures++;
        $display("FAIL: output label level=%0d row=%0d col=%0d", l, out_row, out_col);
      end else begin
        got[0][l][int'(out_row) * s + int'(out_col)] = out_ll;
        got[1][l][int'(out_row) * s + int'(out_col)] = out_lh;
        got[2][l][int'(out_row) * s + int'(out_col)] = out_hl;
        got[3][l][int'(out_row) * s + int'(out_col)] = out_hh;
        ngot[l]++;
      end
    end
  end

  task automatic run_image(input int kind);
    longint x[], ll[], lh[], hl[], hh[];
    int w;
    img = new[N * N];
    for (int i = 0; i < N * N; i++) begin
      case (kind)
        0: img[i] = longint'($urandom_range(0, 255));
        1: img[i] = 255;
        default: img[i] = longint'((i * 13) % 256);
      endcase
    end
    for (int l = 1; l <= J; l++) begin
      ngot[l] = 0;
    end
    pix_idx = 0;
    req_cycles = 0; pix_cycles = 0; rd_cycles = 0; first_req = -1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    @(posedge done);
    @(negedge clk);
    // schedule: contiguous requests, no gaps between levels
    checks++;
    if (req_cycles != TOTAL || last_req - first_req + 1 != TOTAL) begin
      failures++;
      $display("FAIL: %0d request clocks over a span of %0d, expected %0d",
               req_cycles, last_req - first_req + 1, TOTAL);
    end
    checks++;
    if (pix_cycles != N * N || rd_cycles != TOTAL - N * N) begin
      failures++;
      $display("FAIL: %0d pixel and %0d RAM requests", pix_cycles, rd_cycles);
    end
    // data
    x = img;
    w = N;
    for (int l = 1; l <= J; l++) begin
      level(x, w, K, D4_LO, D4_HI, DW, ll, lh, hl, hh);
      checks++;
      if (ngot[l] != (w / 2) * (w / 2)) begin
        failures++;
        $display("FAIL: level %0d gave %0d outputs", l, ngot[l]);
      end
      for (int i = 0; i < (w / 2) * (w / 2); i++) begin
        checks++;
        if (got[0][l][i] != ll[i] || got[1][l][i] != lh[i] ||
            got[2][l][i] != hl[i] || got[3][l][i] != hh[i]) begin
          failures++;
          $display("FAIL: image %0d level %0d idx %0d got %0d %0d %0d %0d exp %0d %0d %0d %0d",
                   kind, l, i, got[0][l][i], got[1][l][i], got[2][l][i], got[3][l][i],
                   ll[i], lh[i], hl[i], hh[i]);
        end
      end
      x = ll;
      w = w / 2;
    end
  endtask

  initial begin
    cyc = 0; sel_q = 1'b0;
    n_mux_switch = 0; n_row_clear = 0; n_row0 = 0; n_ram_wr = 0;
    for (int l = 0; l <= J; l++) n_ld_len[l] = 0;
    img = new[N * N];
    pix_idx = N * N;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int kind = 0; kind < 3; kind++) run_image(kind);
    // mechanisms
    $display("mechanisms: mux->RAM %0d, stage-1 row clears %0d, stage-2 row-0 zeroing %0d, LL writes %0d, line delay N/2:%0d N/4:%0d N/8:%0d",
             n_mux_switch, n_row_clear, n_row0, n_ram_wr, n_ld_len[1], n_ld_len[2], n_ld_len[3]);
    checks++; if (n_mux_switch == 0) begin failures++; $display("FAIL: multiplexer never switched to RAM"); end
    checks++; if (n_row_clear == 0) begin failures++; $display("FAIL: no row-start clear"); end
    checks++; if (n_row0 == 0) begin failures++; $display("FAIL: no first-row zeroing"); end
    checks++; if (n_ram_wr == 0) begin failures++; $display("FAIL: no RAM write"); end
    for (int l = 1; l <= J; l++) begin
      checks++;
      if (n_ld_len[l] == 0) begin failures++; $display("FAIL: line delay length N/2^%0d unused", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
