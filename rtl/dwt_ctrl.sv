// dwt_ctrl: level-by-level sequencer of the 2-D DWT engine.
//
// After start the controller scans level 1 (the N x N input image), then
// level 2 (the N/2 x N/2 LL band in the RAM module), and so on to level J,
// each in raster order, one sample per clock, with no gap between levels.
// The whole transform therefore takes
//   sum_{L=1..J} N^2/4^(L-1) = (4/3)(1 - 4^-J) N^2
// input clocks, i.e. (2/3)(1 - 4^-J) N^2 cycles of the half-rate internal
// clock; for N = 8, J = 3 that is 84 input clocks (0..83).
// For each position it issues a request: in level 1 it asks the source for
// a pixel (pix_req), in later levels it asks the RAM for a word (rd_en) and
// sets the multiplexer to the RAM (sel_ram). One clock later, when the
// sample reaches the transform module, it presents the sample's position:
// column parity (stage-1 polyphase switch), first column (row start), row
// parity (stage-2 switches SW) and first row, and the level, which also
// drives the line-delay select signals. After the last request it waits
// DRAIN clocks for the pipeline to empty and pulses done, DRAIN+1 clocks
// after the last request: the clock after the last subband sample.
//
// The level-by-level schedule, the multiplexer use and the switch pattern
// follow the architecture description; the FSM, the start/done handshake
// and the drain time are this design's own.
//
// Interface: start (one clock, ignored while busy); busy; done (one clock).
module dwt_ctrl
  import dwt_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned J = 3,
  // Clocks from the last request to the last output (mux, stage 1, stage 2).
  parameter int unsigned DRAIN = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  // request clock
  output logic               pix_req,
  output logic               rd_en,
  output logic               sel_ram,
  output logic [cw(J+1)-1:0] rd_level,
  output logic               level_last,
  // one clock later, aligned with the sample at the transform module
  output logic               tm_valid,
  output logic               tm_col_odd,
  output logic               tm_col0,
  output logic               tm_row_odd,
  output logic               tm_row0,
  output logic [cw(J+1)-1:0] tm_level
);

  localparam int unsigned CW = cw(N);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  state_t             state;
  logic [cw(J+1)-1:0] level;
  logic [CW-1:0]      row, col;
  logic [CW:0]        side;
  logic [cw(DRAIN+1)-1:0] drain_cnt;
  logic               last_col, last_row, last_level;

  always_comb begin
    side       = (CW+1)'(N >> (int'(level) - 1));
    last_col   = ((CW+1)'(col) == side - 1);
    last_row   = ((CW+1)'(row) == side - 1);
    last_level = (int'(level) == int'(J));
  end

  assign busy       = (state != S_IDLE);
  assign pix_req    = (state == S_RUN) && (level == 1);
  assign rd_en      = (state == S_RUN) && (level != 1);
  assign sel_ram    = (level != 1);
  assign rd_level   = level;
  assign level_last = (state == S_RUN) && last_col && last_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      level     <= 1;
      row       <= '0;
      col       <= '0;
      drain_cnt <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_RUN;
            level <= 1;
            row   <= '0;
            col   <= '0;
          end
        end
        S_RUN: begin
          if (!last_col) begin
            col <= col + 1'b1;
          end else begin
            col <= '0;
            if (!last_row) begin
              row <= row + 1'b1;
            end else begin
              row <= '0;
              if (!last_level) begin
                level <= level + 1'b1;
              end else begin
                state     <= S_DRAIN;
                drain_cnt <= '0;
              end
            end
          end
        end
        S_DRAIN: begin
          if (int'(drain_cnt) == int'(DRAIN) - 1) begin
            state <= S_IDLE;
            level <= 1;
            done  <= 1'b1;
          end else begin
            drain_cnt <= drain_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Position of the sample now arriving at the transform module.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tm_valid   <= 1'b0;
      tm_col_odd <= 1'b0;
      tm_col0    <= 1'b0;
      tm_row_odd <= 1'b0;
      tm_row0    <= 1'b0;
      tm_level   <= '0;
    end else begin
      tm_valid   <= (state == S_RUN);
      tm_col_odd <= col[0];
      tm_col0    <= (col == '0);
      tm_row_odd <= row[0];
      tm_row0    <= (row == '0);
      tm_level   <= level;
    end
  end

  initial assert (J >= 1 && (N % (1 << J)) == 0 && (N >> (J - 1)) >= 2)
    else $error("dwt_ctrl: N must be a multiple of 2^J");

endmodule
