// fifo: first-in first-out buffer between the SPI link and the recorder RAM.
//
// Function. Holds up to DEPTH words of W bits. A write (wr_en) stores `data` at
// the write pointer; a read (rd_en) copies the word at the read pointer to
// fifo_data, which then holds it until the next read. fifo_cnt tells how many
// words are stored; empty and full are decoded from it.
//
// How it works. Two wrap-around pointers address a DEPTH-word array; the count
// goes up on a write, down on a read and stays put when both happen in the same
// clock. A write while full and a read while empty are ignored, so the count
// saturates at DEPTH and at 0.
//
// Interface and timing. All inputs are sampled on the rising clock edge; a read
// shows its word on fifo_data one clock later, and a write is readable from the
// next clock on. reset is synchronous and active high: it empties the FIFO and
// clears fifo_data. The stored words are not cleared.
//
// Following the described design: 16-bit words, 32 entries addressed by 5-bit
// read and write pointers, a 6-bit count that saturates at 32 and at 0, the
// unchanged count on a simultaneous read and write, and the empty and full
// flags. This design's own choices: registering fifo_data on the clock, and
// refusing a write when full and a read when empty.
module fifo
  import fda_pkg::*;
#(
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic [W-1:0]             data,
  input  logic                     wr_en,
  input  logic                     rd_en,
  output logic [W-1:0]             fifo_data,
  output logic [$clog2(DEPTH+1)-1:0] fifo_cnt,
  output logic                     empty,
  output logic                     full
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  fifo_ram [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_wr, do_rd;

  assign empty = (fifo_cnt == '0);
  assign full  = (fifo_cnt == CW'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  // Storage: written only, never reset.
  always_ff @(posedge clk) begin
    if (do_wr) fifo_ram[wr_ptr] <= data;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      fifo_cnt  <= '0;
      fifo_data <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + AW'(1);
      if (do_rd) begin
        fifo_data <= fifo_ram[rd_ptr];
        rd_ptr    <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + AW'(1);
      end
      unique case ({do_wr, do_rd})
        2'b10:   fifo_cnt <= fifo_cnt + CW'(1);
        2'b01:   fifo_cnt <= fifo_cnt - CW'(1);
        default: fifo_cnt <= fifo_cnt;
      endcase
    end
  end

  // The count never leaves 0..DEPTH.
  a_cnt_range: assert property (@(posedge clk) disable iff (reset) fifo_cnt <= CW'(DEPTH));

endmodule
