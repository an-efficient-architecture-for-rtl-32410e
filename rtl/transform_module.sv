// transform_module: one level of the separable 2-D DWT, a two-stage filter
// tree built as stage 1 (horizontal) followed by stage 2 (vertical).
//
// Stage 1 is a polyphase low/high-pass decimation filter pair
// (poly_dec_filter) taking one sample per clock and producing one L and one
// H sample every second clock. Stage 2 is four coefficient-folded vertical
// decimation filters (fold_vdec_filter) with line delays: L is filtered by
// the low-pass taps into LL and by the high-pass taps into LH, H likewise
// into HL and HH. Stage 2 has twice as many filters as stage 1, but each
// receives a sample only every second clock, so folding two taps onto one
// multiplier halves its hardware without leaving it idle. It produces four
// subband samples every fourth input clock (on odd rows only). Polyphase
// decomposition in stage 1 with coefficient folding in stage 2 is the pairing
// the published architecture selects, because it keeps every multiplier busy.
//
// Timing: input in raster order, one sample per clock with in_valid. Stage 1
// registers its output one clock after the odd sample of a pair; stage 2
// registers its output one clock after that, so a subband sample appears two
// clocks after the last input sample it depends on. Row/level side
// information travels with the data through the stage-1 register.
//
// This design's own choices are documented in the two filter modules (zero
// extension at the image edges, rescaling by COEF_FRAC bits, DATA_W-bit
// samples between stages).
//
// Interface: in_data with in_col_odd, in_col0, in_row_odd, in_row0 and level
// (1..J) describing its position; out_valid with out_level and the four
// subband samples.
module transform_module
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned J      = 3,
  parameter int unsigned K      = 4,
  parameter int unsigned DATA_W = 16,
  parameter coef_vec_t   LO     = D4_LO,
  parameter coef_vec_t   HI     = D4_HI
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     in_col_odd,
  input  logic                     in_col0,
  input  logic                     in_row_odd,
  input  logic                     in_row0,
  input  logic [cw(J+1)-1:0]       in_level,
  output logic                     out_valid,
  output logic [cw(J+1)-1:0]       out_level,
  output logic signed [DATA_W-1:0] out_ll,
  output logic signed [DATA_W-1:0] out_lh,
  output logic signed [DATA_W-1:0] out_hl,
  output logic signed [DATA_W-1:0] out_hh
);

  // ---------------- stage 1: horizontal, polyphase ----------------
  logic                     s1_valid;
  logic signed [DATA_W-1:0] s1_l, s1_h;
  logic                     s1_row_odd, s1_row0;
  logic [cw(J+1)-1:0]       s1_level;

  poly_dec_filter #(.DATA_W(DATA_W), .K(K), .LO(LO), .HI(HI)) u_stage1 (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (in_valid),
    .in_data      (in_data),
    .in_odd       (in_col_odd),
    .in_row_start (in_col0),
    .out_valid    (s1_valid),
    .out_l        (s1_l),
    .out_h        (s1_h)
  );

  // Side information aligned with the stage-1 output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_row_odd <= 1'b0;
      s1_row0    <= 1'b0;
      s1_level   <= '0;
    end else if (in_valid && in_col_odd) begin
      s1_row_odd <= in_row_odd;
      s1_row0    <= in_row0;
      s1_level   <= in_level;
    end
  end

  // ---------------- stage 2: vertical, coefficient folding ----------------
  logic [3:0] s2_valid;

  fold_vdec_filter #(.N(N), .J(J), .K(K), .DATA_W(DATA_W), .C(LO)) u_ll (
    .clk(clk), .rst_n(rst_n), .in_valid(s1_valid), .in_data(s1_l),
    .in_row_odd(s1_row_odd), .in_row0(s1_row0), .level(s1_level),
    .out_valid(s2_valid[0]), .out_data(out_ll));

  fold_vdec_filter #(.N(N), .J(J), .K(K), .DATA_W(DATA_W), .C(HI)) u_lh (
    .clk(clk), .rst_n(rst_n), .in_valid(s1_valid), .in_data(s1_l),
    .in_row_odd(s1_row_odd), .in_row0(s1_row0), .level(s1_level),
    .out_valid(s2_valid[1]), .out_data(out_lh));

  fold_vdec_filter #(.N(N), .J(J), .K(K), .DATA_W(DATA_W), .C(LO)) u_hl (
    .clk(clk), .rst_n(rst_n), .in_valid(s1_valid), .in_data(s1_h),
    .in_row_odd(s1_row_odd), .in_row0(s1_row0), .level(s1_level),
    .out_valid(s2_valid[2]), .out_data(out_hl));

  fold_vdec_filter #(.N(N), .J(J), .K(K), .DATA_W(DATA_W), .C(HI)) u_hh (
    .clk(clk), .rst_n(rst_n), .in_valid(s1_valid), .in_data(s1_h),
    .in_row_odd(s1_row_odd), .in_row0(s1_row0), .level(s1_level),
    .out_valid(s2_valid[3]), .out_data(out_hh));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_level <= '0;
    else if (s1_valid && s1_row_odd) out_level <= s1_level;
  end

  assign out_valid = s2_valid[0];

  // The four vertical filters run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               s2_valid == '0 || s2_valid == '1);

endmodule
