// ram: recorder memory that keeps the acquired words until they are read out.
//
// Function. A DEPTH-word memory of W-bit words with its own write and read
// pointers. A write (wr_en) stores fifo_data at the write pointer; a read
// (rd_en) puts the word at the read pointer on data_out, which holds it until
// the next read. Words come out in the order they were written.
//
// How it works. Both pointers step by one after each access and wrap at DEPTH.
// A count of unread words gives full and empty: a write while full and a read
// while empty are refused, so no unread word is ever overwritten and no stale
// word is read twice. reset clears every word, data_out, the pointers and the
// count.
//
// Interface and timing. Inputs are sampled on the rising clock edge; a read
// shows its word on data_out one clock later. reset is synchronous and active
// high.
//
// Following the described design: 16-bit words, 2**7 = 128 words, separate
// write and read pointers (wr_ptr_m, rd_ptr_m), write on wr_en, read to
// data_out on rd_en, and clearing the whole memory and data_out on reset. This
// design's own choices: 7-bit pointers that advance on each access, the unread
// count with full and empty, and a registered data_out.
module ram
  import fda_pkg::*;
#(
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned DEPTH = RAM_DEPTH
) (
  input  logic                       clk,
  input  logic                       reset,
  input  logic [W-1:0]               fifo_data,
  input  logic                       wr_en,
  input  logic                       rd_en,
  output logic [W-1:0]               data_out,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       empty,
  output logic                       full
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr_m, rd_ptr_m;
  logic          do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int unsigned i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (do_wr) begin
      mem[wr_ptr_m] <= fifo_data;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr_m <= '0;
      rd_ptr_m <= '0;
      count    <= '0;
      data_out <= '0;
    end else begin
      if (do_wr) wr_ptr_m <= (wr_ptr_m == AW'(DEPTH - 1)) ? '0 : wr_ptr_m + AW'(1);
      if (do_rd) begin
        data_out <= mem[rd_ptr_m];
        rd_ptr_m <= (rd_ptr_m == AW'(DEPTH - 1)) ? '0 : rd_ptr_m + AW'(1);
      end
      unique case ({do_wr, do_rd})
        2'b10:   count <= count + CW'(1);
        2'b01:   count <= count - CW'(1);
        default: count <= count;
      endcase
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (reset) count <= CW'(DEPTH));

endmodule
