// dwt_run_checker: testbench helper that runs one complete transform of a
// random N x N image through a dwt2d_top of the given size and filter pair
// and checks it.
//
// When go rises it computes the expected bands of all J levels with
// dwt_ref_pkg, starts the engine, feeds the pixels on pix_req and compares
// every output sample (value and row/column label) as it appears. It also
// counts the request clocks and checks them against the schedule
//   sum_{L=1..J} N^2/4^(L-1) input clocks
//     = 2 * (2/3)(1 - 4^-J) N^2 internal (half-rate) clocks
// and requires the requests to be contiguous. finished rises when done.
module dwt_run_checker
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
#(
  parameter int        N  = 32,
  parameter int        J  = 3,
  parameter int        DW = 20,
  parameter int        K  = 4,
  parameter coef_vec_t LO = D4_LO,
  parameter coef_vec_t HI = D4_HI
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   clocks
);

  logic start = 1'b0;
  logic busy, done, pix_req, out_valid;
  logic [7:0] pix_in;
  logic [cw(J+1)-1:0] out_level;
  logic [cw(N/2)-1:0] out_row, out_col;
  logic signed [DW-1:0] out_ll, out_lh, out_hl, out_hh;

  dwt2d_top #(.N(N), .J(J), .K(K), .DATA_W(DW), .LO(LO), .HI(HI)) dut (.*);

  longint img[];
  longint ex[4][J+1][];
  int pix_idx = 0, nout = 0, first_req = -1, last_req = 0, cyc = 0, nreq = 0;

  assign pix_in = (pix_idx < N * N) ? 8'(img[pix_idx]) : 8'h00;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pix_req) pix_idx <= pix_idx + 1;
    if (rst_n && (pix_req || dut.rd_en)) begin
      nreq <= nreq + 1;
      if (first_req < 0) first_req <= cyc;
      last_req <= cyc;
    end
    if (out_valid) begin
      automatic int l = int'(out_level);
      automatic int s = N >> l;
      automatic int i = int'(out_row) * s + int'(out_col);
      nout++;
      checks++;
      if (l < 1 || l > J || int'(out_row) >= s || int'(out_col) >= s) begin
        failures++;
        $display("FAIL N=%0d J=%0d K=%0d: label level %0d (%0d,%0d)", N, J, K, l, out_row, out_col);
      end else if (out_ll != ex[0][l][i] || out_lh != ex[1][l][i] ||
                   out_hl != ex[2][l][i] || out_hh != ex[3][l][i]) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d J=%0d: level %0d idx %0d got %0d %0d %0d %0d exp %0d %0d %0d %0d",
                   N, J, l, i, out_ll, out_lh, out_hl, out_hh,
                   ex[0][l][i], ex[1][l][i], ex[2][l][i], ex[3][l][i]);
      end
    end
  end

  initial begin
    longint x[], ll[], lh[], hl[], hh[];
    int w, total;
    finished = 1'b0;
    checks = 0;
    failures = 0;
    clocks = 0;
    img = new[N * N];
    foreach (img[i]) img[i] = longint'($urandom_range(0, 255));
    pix_idx = N * N;
    x = img;
    w = N;
    total = 0;
    for (int l = 1; l <= J; l++) begin
      level(x, w, K, LO, HI, DW, ll, lh, hl, hh);
      ex[0][l] = ll; ex[1][l] = lh; ex[2][l] = hl; ex[3][l] = hh;
      total += w * w;
      x = ll;
      w = w / 2;
    end
    while (!go) @(posedge clk);
    @(negedge clk);
    pix_idx = 0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    @(posedge done);
    @(negedge clk);
    clocks = nreq;
    checks++;
    if (nreq != total || last_req - first_req + 1 != total) begin
      failures++;
      $display("FAIL N=%0d J=%0d: %0d request clocks over %0d, expected %0d", N, J, nreq,
               last_req - first_req + 1, total);
    end
    checks++;
    // every level gives a quarter as many outputs as it reads
    if (nout != total / 4) begin
      failures++;
      $display("FAIL N=%0d J=%0d: %0d outputs, expected %0d", N, J, nout, total / 4);
    end
    finished = 1'b1;
  end

endmodule
