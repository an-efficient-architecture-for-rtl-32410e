// src_mux: the multiplexer in front of the transform module.
//
// In the first decomposition level it passes the input image; in every later
// level it passes the LL band read back from the RAM module. The RAM answers
// one clock after it is addressed, so the input pixel is registered here as
// well and the select is delayed by one clock: whichever source is chosen,
// its sample reaches the transform module exactly one clock after the
// controller asked for it. Pixels are unsigned PIX_W-bit values and are
// zero-extended to the DATA_W-bit signed sample width.
//
// The multiplexer and its two sources follow the architecture description;
// the alignment register and the pixel width are this design's own choices.
//
// Interface: sel_ram and pix_in belong to the request clock; out_data is
// valid one clock later.
module src_mux #(
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sel_ram,
  input  logic [PIX_W-1:0]         pix_in,
  input  logic [DATA_W-1:0]        ram_rdata,
  output logic signed [DATA_W-1:0] out_data
);

  logic [PIX_W-1:0] pix_q;
  logic             sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_q <= '0;
      sel_q <= 1'b0;
    end else begin
      pix_q <= pix_in;
      sel_q <= sel_ram;
    end
  end

  assign out_data = sel_q ? signed'(ram_rdata) : signed'(DATA_W'(pix_q));

  initial assert (DATA_W > PIX_W) else $error("src_mux: DATA_W must exceed PIX_W");

endmodule
