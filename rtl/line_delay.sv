// line_delay: variable-length line delay used in place of each register of
// the stage-2 folded decimation filters.
//
// The delay is a chain of J storage blocks. Data enters the first block and
// moves down the chain one word per shift. The block sizes are
//   N/2^J, N/2^J, N/2^(J-1), ..., N/8, N/4
// so the chain holds N/2^J after the first block and N/2^(J-i) after block i,
// N/2 in total. A one-hot set of select signals, one per level, picks the
// block whose output is the line-delay output: N/2 words in level 1, N/4 in
// level 2, ..., N/2^J in level J. A 1-to-2 demultiplexer behind each block
// sends its output either to the output bus (select = 1) or on to the next
// block (select = 0); blocks behind the selected one receive nothing and are
// not shifted.
//
// The block structure, the sizes, the select signals and the demultiplexers
// follow the architecture description. This design's own choices: the storage
// blocks are shift registers of flip-flops, a shift happens when shift_en is
// high, and the storage is not reset (the filter that owns the delay ignores
// what it reads during the first row pair of each level).
//
// Interface: level (1..J) chooses the length D = N/2^level; on a clock with
// shift_en, din is stored and dout, which always shows the word stored D
// shifts earlier, advances.
module line_delay
  import dwt_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned J = 3,
  parameter int unsigned W = 16
) (
  input  logic              clk,
  input  logic [cw(J+1)-1:0] level,
  input  logic              shift_en,
  input  logic [W-1:0]      din,
  output logic [W-1:0]      dout
);

  // End position (exclusive) of block i in the flattened chain.
  function automatic int unsigned blk_end(input int unsigned i);
    return N >> (J - i);
  endfunction
  function automatic int unsigned blk_start(input int unsigned i);
    return (i == 0) ? 0 : blk_end(i - 1);
  endfunction

  // Select signals: sel[i] picks the output of block i, i.e. level J-i.
  logic [J-1:0] sel;
  // Block i shifts when it lies in front of (or is) the selected block.
  logic [J-1:0] blk_en;
  logic [W-1:0] blk_out [J];
  logic [W-1:0] blk_in  [J];

  always_comb begin
    for (int i = 0; i < J; i++) begin
      sel[i] = (int'(level) == int'(J) - i);
    end
    for (int i = 0; i < J; i++) begin
      blk_en[i] = 1'b0;
      for (int k = i; k < J; k++) begin
        blk_en[i] |= sel[k];
      end
    end
  end

  for (genvar i = 0; i < J; i++) begin : g_blk
    localparam int unsigned SZ = blk_end(i) - blk_start(i);
    logic [W-1:0] mem [SZ];

    // Demultiplexer in front of block i: the previous block's word comes in
    // only while that block is not the selected one.
    if (i == 0) begin : g_first
      assign blk_in[i] = din;
    end else begin : g_next
      assign blk_in[i] = sel[i-1] ? '0 : blk_out[i-1];
    end

    always_ff @(posedge clk) begin
      if (shift_en && blk_en[i]) begin
        mem[0] <= blk_in[i];
        for (int p = 1; p < int'(SZ); p++) mem[p] <= mem[p-1];
      end
    end
    assign blk_out[i] = mem[SZ-1];
  end

  always_comb begin
    dout = '0;
    for (int i = 0; i < J; i++) begin
      if (sel[i]) dout = blk_out[i];
    end
  end

  initial assert (J >= 1 && (N >> J) >= 1 && (N % (1 << J)) == 0)
    else $error("line_delay: N must be a multiple of 2^J");

endmodule
