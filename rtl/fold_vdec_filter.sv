// fold_vdec_filter: stage 2 of the transform module, one vertical decimation
// filter built by coefficient folding.
//
// Every two coefficients share one processing element (PE): a multiplier, an
// adder and a storage element, so a K-tap filter has K/2 PEs. Because the
// samples arrive in raster order, the storage element of each PE is a line
// delay holding one partial sum per column. Rows alternate between two
// switch positions (SW):
//   even row 2k (SW=0): R_p <= c(2p+1)*x + R_(p+1)   (0 into the last PE)
//   odd row 2k+1 (SW=1): R_p <= c(2p)*x + R_p, and PE0 outputs
//                        y = c(0)*x + R_0
// so every two input rows give one output row,
//   y(k) = sum_i c(i) * x*(2k+1-i)   (x*(r): row r of the input).
// One input sample is taken per internal cycle and the line delays shift on
// every one of them, so the read side of each line delay always shows the
// same column of the previous row.
//
// The PE structure, the switch schedule and the line delays follow the
// architecture description. This design's own choices: the rows above the
// image are taken as zero (in_row0 forces the chained partial sum to zero on
// row 0 of a level, which also discards what the line delays hold from the
// previous level), partial sums are kept at full precision, the output is
// rescaled by an arithmetic right shift of COEF_FRAC bits, truncated to
// DATA_W bits and registered.
//
// Interface: in_valid/in_data with in_row_odd (SW), in_row0 and level
// (1..J, picks the line-delay length N/2^level). out_valid is high for one
// clock, the clock after an odd-row sample, with out_data.
module fold_vdec_filter
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned J      = 3,
  parameter int unsigned K      = 4,
  parameter int unsigned DATA_W = 16,
  parameter coef_vec_t   C      = D4_LO
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     in_row_odd,
  input  logic                     in_row0,
  input  logic [cw(J+1)-1:0]       level,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_data
);

  localparam int unsigned HK    = K / 2;
  localparam int unsigned ACC_W = DATA_W + COEF_W + $clog2(K) + 1;

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t r_out [HK];   // read side of each PE's line delay
  acc_t r_in  [HK];   // value written into each PE's line delay
  acc_t y_full;

  always_comb begin
    for (int p = 0; p < HK; p++) begin
      automatic acc_t chain;
      automatic coef_t c;
      if (in_row_odd) begin
        c     = C[2*p];
        chain = r_out[p];
      end else begin
        c     = C[2*p+1];
        chain = (p == int'(HK) - 1 || in_row0) ? '0 : r_out[(p+1) % HK];
      end
      r_in[p] = acc_t'(c) * acc_t'(in_data) + chain;
    end
    y_full = r_in[0];
  end

  for (genvar p = 0; p < HK; p++) begin : g_pe
    line_delay #(.N(N), .J(J), .W(ACC_W)) u_ld (
      .clk      (clk),
      .level    (level),
      .shift_en (in_valid),
      .din      (r_in[p]),
      .dout     (r_out[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && in_row_odd;
      if (in_valid && in_row_odd) begin
        out_data <= DATA_W'(y_full >>> COEF_FRAC);
      end
    end
  end

endmodule
