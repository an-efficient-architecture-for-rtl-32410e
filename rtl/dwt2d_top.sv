// dwt2d_top: J-level separable 2-D discrete wavelet transform engine.
//
// One transform module does all the work, level by level. In level 1 the
// multiplexer feeds it the N x N input image in raster order, one pixel per
// clock; it produces the LL, LH, HL and HH bands of that level and stores LL
// in the RAM module (N/2 x N/2 words). From level 2 on the multiplexer feeds
// the stored LL band back in, and the new, quarter-size LL band is written
// over it in the same RAM. This repeats until level J. Because each level is
// an ordinary raster scan of a smaller image, control is only a few counters
// (dwt_ctrl, addr_gen), and the transform module never idles: it is busy on
// every clock of the (4/3)(1 - 4^-J) N^2 clocks of a transform.
//
// Interface and timing:
//   start    one-clock pulse, ignored while busy.
//   pix_req  high on each of the N^2 clocks of level 1; pix_in must hold the
//            next pixel of the image (raster order) on that clock. There is
//            no back-pressure: the source must keep up.
//   out_*    one subband sample of each of the four bands per out_valid, with
//            its level (1..J) and its row/column in the band, in raster order.
//            out_ll is the LL band of that level; only level J's LL band is
//            a final result, the others are also kept in the RAM for the
//            next level.
//   done     one clock after the last output of level J.
// The first output of a level appears 3 clocks after the request for the
// second sample of the second row of that level.
//
// The block structure (transform module, RAM module of N^2/4 words, input
// multiplexer, address generator) and the level-by-level schedule follow the
// published architecture. Filter taps, word widths, the zero extension at the
// image edges, the pipeline registers and the handshake are this design's own
// choices.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int unsigned N      = 8,   // image is N x N
  parameter int unsigned J      = 3,   // decomposition levels
  parameter int unsigned K      = 4,   // filter taps
  parameter int unsigned PIX_W  = 8,   // input pixel width (unsigned)
  parameter int unsigned DATA_W = 16,  // sample width between stages
  parameter coef_vec_t   LO     = D4_LO,
  parameter coef_vec_t   HI     = D4_HI
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic                     pix_req,
  input  logic [PIX_W-1:0]         pix_in,
  output logic                     out_valid,
  output logic [cw(J+1)-1:0]       out_level,
  output logic [cw(N/2)-1:0]       out_row,
  output logic [cw(N/2)-1:0]       out_col,
  output logic signed [DATA_W-1:0] out_ll,
  output logic signed [DATA_W-1:0] out_lh,
  output logic signed [DATA_W-1:0] out_hl,
  output logic signed [DATA_W-1:0] out_hh
);

  localparam int unsigned AW = cw((N / 2) * (N / 2));

  logic               rd_en, sel_ram, level_last;
  logic [cw(J+1)-1:0] rd_level;
  logic               tm_valid, tm_col_odd, tm_col0, tm_row_odd, tm_row0;
  logic [cw(J+1)-1:0] tm_level;
  logic [AW-1:0]      rd_addr, wr_addr;
  logic [DATA_W-1:0]  ram_rdata;
  logic signed [DATA_W-1:0] tm_data;

  dwt_ctrl #(.N(N), .J(J)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .busy       (busy),
    .done       (done),
    .pix_req    (pix_req),
    .rd_en      (rd_en),
    .sel_ram    (sel_ram),
    .rd_level   (rd_level),
    .level_last (level_last),
    .tm_valid   (tm_valid),
    .tm_col_odd (tm_col_odd),
    .tm_col0    (tm_col0),
    .tm_row_odd (tm_row_odd),
    .tm_row0    (tm_row0),
    .tm_level   (tm_level)
  );

  addr_gen #(.N(N), .J(J)) u_agen (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (start && !busy),
    .rd_en    (rd_en),
    .rd_level (rd_level),
    .wr_en    (out_valid),
    .wr_level (out_level),
    .rd_addr  (rd_addr),
    .wr_addr  (wr_addr),
    .wr_row   (out_row),
    .wr_col   (out_col)
  );

  dwt_ram #(.N(N), .DATA_W(DATA_W)) u_ram (
    .clk   (clk),
    .we    (out_valid),
    .waddr (wr_addr),
    .wdata (out_ll),
    .re    (rd_en),
    .raddr (rd_addr),
    .rdata (ram_rdata)
  );

  src_mux #(.PIX_W(PIX_W), .DATA_W(DATA_W)) u_mux (
    .clk       (clk),
    .rst_n     (rst_n),
    .sel_ram   (sel_ram),
    .pix_in    (pix_in),
    .ram_rdata (ram_rdata),
    .out_data  (tm_data)
  );

  transform_module #(.N(N), .J(J), .K(K), .DATA_W(DATA_W), .LO(LO), .HI(HI)) u_tm (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (tm_valid),
    .in_data    (tm_data),
    .in_col_odd (tm_col_odd),
    .in_col0    (tm_col0),
    .in_row_odd (tm_row_odd),
    .in_row0    (tm_row0),
    .in_level   (tm_level),
    .out_valid  (out_valid),
    .out_level  (out_level),
    .out_ll     (out_ll),
    .out_lh     (out_lh),
    .out_hl     (out_hl),
    .out_hh     (out_hh)
  );

  // The read of the last word of a band and the band's own read counter
  // agree: the address generator wraps exactly when the controller moves on.
  a_rd_wrap: assert property (@(posedge clk) disable iff (!rst_n)
                              (rd_en && level_last) |=> rd_addr == '0);

endmodule
