// addr_gen: address generator of the RAM module.
//
// Because every level is scanned in plain raster order, both addresses are
// simple counters. The read counter steps through the W x W band of the
// level being read (W = N/2^(L-1) for level L >= 2), one word per rd_en,
// and wraps to zero after the last word of the band. The write counter steps
// through the (W/2) x (W/2) LL band a level produces, one word per wr_en,
// and wraps after its last word; it also reports the row and column of the
// word being written, which the engine uses to label its outputs.
//
// The architecture names this block and shows that it addresses the RAM;
// the counters are this design's own, the simplest logic that does it.
//
// Interface: clear (synchronous) returns both counters to zero; rd_level and
// wr_level (1..J) give the level whose band is read or written.
module addr_gen
  import dwt_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned J = 3,
  localparam int unsigned AW = cw((N / 2) * (N / 2)),
  localparam int unsigned CW = cw(N / 2)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               rd_en,
  input  logic [cw(J+1)-1:0] rd_level,
  input  logic               wr_en,
  input  logic [cw(J+1)-1:0] wr_level,
  output logic [AW-1:0]      rd_addr,
  output logic [AW-1:0]      wr_addr,
  output logic [CW-1:0]      wr_row,
  output logic [CW-1:0]      wr_col
);

  logic [AW:0] rd_size;   // words in the band being read
  logic [CW:0] wr_side;   // side of the band being written

  always_comb begin
    automatic int unsigned w = N >> (int'(rd_level) - 1);
    rd_size = (AW+1)'(w * w);
    wr_side = (CW+1)'(N >> int'(wr_level));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr <= '0;
      wr_addr <= '0;
      wr_row  <= '0;
      wr_col  <= '0;
    end else if (clear) begin
      rd_addr <= '0;
      wr_addr <= '0;
      wr_row  <= '0;
      wr_col  <= '0;
    end else begin
      if (rd_en) begin
        if ((AW+1)'(rd_addr) == rd_size - 1) rd_addr <= '0;
        else                                 rd_addr <= rd_addr + 1'b1;
      end
      if (wr_en) begin
        if ((CW+1)'(wr_col) == wr_side - 1) begin
          wr_col <= '0;
          if ((CW+1)'(wr_row) == wr_side - 1) begin
            wr_row  <= '0;
            wr_addr <= '0;
          end else begin
            wr_row  <= wr_row + 1'b1;
            wr_addr <= wr_addr + 1'b1;
          end
        end else begin
          wr_col  <= wr_col + 1'b1;
          wr_addr <= wr_addr + 1'b1;
        end
      end
    end
  end

endmodule
