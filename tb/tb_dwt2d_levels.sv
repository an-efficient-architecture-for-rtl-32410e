// tb_dwt2d_levels: computing time against the number of levels, and a
// full-size image.
//
// Eight engines with a 256 x 256 image and J = 1 .. 8 levels, and a ninth
// with a 512 x 512 image and J = 3 (the size of a common test photograph),
// each transform a random image; every output is checked against
// dwt_ref_pkg and the request clocks are counted. Two more engines check
// other filter lengths (the structure scales with K): a 2-tap Haar pair and
// a 6-tap Daubechies (D6) pair, on 64 x 64 images with 3 levels.
// Haar in Q.8:  a = {181, 181},                     b = {181, -181}
// D6 in Q.8:    a = {85, 207, 118, -35, -22, 9},     b(i) = (-1)^i a(5-i) The count must equal
//   sum_{L=1..J} N^2/4^(L-1) input clocks,
// i.e. (2/3)(1 - 4^-J) N^2 clocks of the half-rate internal clock: 0.5 N^2
// for one level, tending to 0.667 N^2. The ratio to N^2 is printed per J.
// Samples are 20 bits wide so that eight levels of LL gain do not overflow.
module tb_dwt2d_levels;
  localparam int N = 256, JMAX = 8;

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0;
  import dwt_pkg::*;

  localparam int NBIG = 512, JBIG = 3;
  localparam coef_vec_t HAAR_LO = '{0: 12'sd181, 1: 12'sd181, default: 12'sd0};
  localparam coef_vec_t HAAR_HI = '{0: 12'sd181, 1: -12'sd181, default: 12'sd0};
  localparam coef_vec_t D6_LO = '{0: 12'sd85, 1: 12'sd207, 2: 12'sd118, 3: -12'sd35, 4: -12'sd22, 5: 12'sd9,
                                  default: 12'sd0};
  localparam coef_vec_t D6_HI = '{0: 12'sd9, 1: 12'sd22, 2: -12'sd35, 3: -12'sd118, 4: 12'sd207, 5: -12'sd85,
                                  default: 12'sd0};
  logic fin_haar, fin_d6;
  int ck_haar, fl_haar, cc_haar, ck_d6, fl_d6, cc_d6;

  logic [JMAX:0] fin;   // bit 0: the 512 x 512 run
  int ck [JMAX+1], fl [JMAX+1], clk_cnt [JMAX+1];

  always #5 clk = ~clk;

  for (genvar j = 1; j <= JMAX; j++) begin : g_run
    dwt_run_checker #(.N(N), .J(j), .DW(20)) u_run (
      .clk, .rst_n, .go, .finished(fin[j]),
      .checks(ck[j]), .failures(fl[j]), .clocks(clk_cnt[j]));
  end

  dwt_run_checker #(.N(NBIG), .J(JBIG), .DW(20)) u_big (
    .clk, .rst_n, .go, .finished(fin[0]),
    .checks(ck[0]), .failures(fl[0]), .clocks(clk_cnt[0]));

  dwt_run_checker #(.N(64), .J(3), .DW(16), .K(2), .LO(HAAR_LO), .HI(HAAR_HI)) u_haar (
    .clk, .rst_n, .go, .finished(fin_haar),
    .checks(ck_haar), .failures(fl_haar), .clocks(cc_haar));

  dwt_run_checker #(.N(64), .J(3), .DW(16), .K(6), .LO(D6_LO), .HI(D6_HI)) u_d6 (
    .clk, .rst_n, .go, .finished(fin_d6),
    .checks(ck_d6), .failures(fl_d6), .clocks(cc_d6));

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    go = 1'b1;
    while (fin != {(JMAX+1){1'b1}} || !fin_haar || !fin_d6) @(posedge clk);
    checks += ck_haar + ck_d6;
    failures += fl_haar + fl_d6;
    $display("K=2 (Haar): %0d checks, %0d failures; K=6 (D6): %0d checks, %0d failures",
             ck_haar, fl_haar, ck_d6, fl_d6);
    for (int j = 1; j <= JMAX; j++) begin
      // (2/3)(1 - 4^-J) N^2 internal clocks = twice that in input clocks
      automatic longint expect_in = (longint'(4) * N * N - ((longint'(4) * N * N) >> (2 * j))) / 3;
      checks += ck[j] + 1;
      failures += fl[j];
      if (clk_cnt[j] != expect_in) begin
        failures++;
        $display("FAIL: J=%0d took %0d input clocks, expected %0d", j, clk_cnt[j], expect_in);
      end
      $display("J=%0d: %0d input clocks = %0.4f N^2 internal clocks", j, clk_cnt[j],
               real'(clk_cnt[j]) / 2.0 / real'(N * N));
    end
    checks += ck[0] + 1;
    failures += fl[0];
    if (clk_cnt[0] != NBIG * NBIG + NBIG * NBIG / 4 + NBIG * NBIG / 16) begin
      failures++;
      $display("FAIL: %0d x %0d, J=%0d took %0d input clocks", NBIG, NBIG, JBIG, clk_cnt[0]);
    end
    $display("N=%0d J=%0d: %0d input clocks = %0.4f N^2 internal clocks", NBIG, JBIG,
             clk_cnt[0], real'(clk_cnt[0]) / 2.0 / real'(NBIG * NBIG));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
