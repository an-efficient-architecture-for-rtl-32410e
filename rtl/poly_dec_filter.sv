// poly_dec_filter: stage 1 of the transform module, the horizontal low-pass
// and high-pass decimation filters built by polyphase decomposition.
//
// The K taps of each filter are split into an even-ordered part (a0, a2, ...)
// and an odd-ordered part (a1, a3, ...). Samples arrive one per clock in
// raster order. An even-indexed sample x(2n) is latched into the odd part; on
// the following odd-indexed sample x(2n+1) the even part uses the live input,
// both parts are summed, and one decimated output is produced:
//   L(n) = sum_j a(2j)*x(2n+1-2j) + a(2j+1)*x(2n-2j)
//   H(n) = the same with b.
// The low- and high-pass filters share one delay line (direct form), so the
// block holds K-1 sample registers plus the output register. Outputs appear
// at half the input rate, which is the "internal clock" of the transform
// module; here it is a clock enable (out_valid) rather than a second clock.
//
// The polyphase split, the shared registers and the data flow follow the
// architecture description. This design's own choices: each row starts from
// zero history (in_row_start clears the registers, i.e. zero extension at
// the left edge of every row), the output is registered (one clock after the
// odd sample), and the sum is rescaled by an arithmetic right shift of
// COEF_FRAC bits and truncated to DATA_W bits.
//
// Interface: in_valid/in_data with in_odd (1 for x(2n+1)) and in_row_start
// (1 on the first sample of a row, which must be even). out_valid is high for
// one clock per decimated output, with out_l and out_h.
module poly_dec_filter
  import dwt_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned K      = 4,
  parameter coef_vec_t   LO     = D4_LO,
  parameter coef_vec_t   HI     = D4_HI
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     in_odd,
  input  logic                     in_row_start,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_l,
  output logic signed [DATA_W-1:0] out_h
);

  localparam int unsigned HK    = K / 2;
  localparam int unsigned ACC_W = DATA_W + COEF_W + $clog2(K) + 1;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // e_hist[j] = x(2(n-j)), o_hist[j] = x(2(n-j)+1) for j >= 1.
  data_t e_hist [HK];
  data_t o_hist [HK];
  acc_t  sum_l, sum_h;

  always_comb begin
    sum_l = '0;
    sum_h = '0;
    for (int j = 0; j < HK; j++) begin
      automatic data_t xo = (j == 0) ? in_data : o_hist[j];
      sum_l += acc_t'(LO[2*j]) * acc_t'(xo) + acc_t'(LO[2*j+1]) * acc_t'(e_hist[j]);
      sum_h += acc_t'(HI[2*j]) * acc_t'(xo) + acc_t'(HI[2*j+1]) * acc_t'(e_hist[j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < HK; j++) begin
        e_hist[j] <= '0;
        o_hist[j] <= '0;
      end
      out_valid <= 1'b0;
      out_l     <= '0;
      out_h     <= '0;
    end else begin
      out_valid <= in_valid && in_odd;
      if (in_valid && !in_odd) begin
        // Even sample: feed the odd-ordered part.
        e_hist[0] <= in_data;
        if (in_row_start) begin
          for (int j = 1; j < HK; j++) begin
            e_hist[j] <= '0;
            o_hist[j] <= '0;
          end
        end
      end
      if (in_valid && in_odd) begin
        // Odd sample: even-ordered part uses the live input; emit and shift.
        out_l <= data_t'(sum_l >>> COEF_FRAC);
        out_h <= data_t'(sum_h >>> COEF_FRAC);
        for (int j = 1; j < HK; j++) begin
          e_hist[j] <= e_hist[j-1];
          o_hist[j] <= (j == 1) ? in_data : o_hist[j-1];
        end
      end
    end
  end

  // o_hist[0] is never used (the live input takes its place).
  initial assert (K % 2 == 0 && K >= 2 && K <= KMAX)
    else $error("poly_dec_filter: K must be even and at most %0d", KMAX);

endmodule
