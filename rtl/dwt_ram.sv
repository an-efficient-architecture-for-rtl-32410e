// dwt_ram: the RAM module of the engine, an N/2 x N/2 word memory that holds
// the LL band of one level while the next level reads it back.
//
// The memory is N^2/4 words deep, the size the architecture gives: the LL
// band of level 1 is the largest band that is ever stored. It is written in
// place: level L+1 overwrites the start of the array with its own LL band
// while it reads level L's band, which is safe because an output word is
// always written to an address that the same level has already read.
//
// This design's own choices: one synchronous write port and one synchronous
// read port (read data valid the clock after rd_en), no reset of the
// contents. Written as an array so synthesis can map it to a RAM macro.
module dwt_ram #(
  parameter int unsigned N      = 8,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned DEPTH = (N / 2) * (N / 2),
  localparam int unsigned AW    = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
