// data_acq: flight data acquisition path, from ADC code to recorder memory.
//
// Function. A 16-bit ADC code arrives on adc_data and is carried into the FPGA
// over an SPI link (spi). A pulse on wr_en stores the most recent word the link
// has delivered into a 32-word FIFO (fifo). Whatever the FIFO holds is moved,
// one word per clock, into a 128-word recorder RAM (ram). A pulse on rd_en reads
// the oldest unread word of the RAM onto data_out. The chain thus records up to
// 128 + 32 = 160 words that have not yet been read out.
//
// How it works. The transfer from FIFO to RAM needs no outside control: while
// the FIFO is not empty and the RAM will still have room, the FIFO is read, and
// the word it shows one clock later is written into the RAM. The room test
// counts the write already in flight, so a write never reaches a full RAM.
// When the RAM fills, the transfer stops and the FIFO takes up the following
// words; once the FIFO is full too, a wr_en is refused and `dropped` pulses.
// Reading from the RAM frees room and the transfer resumes by itself.
//
// Interface and timing. All ports are synchronous to clk; reset is synchronous
// and active high. A new SPI word is ready every 32 clocks (sample_valid pulses
// then) and is the code adc_data had 32 clocks earlier. A word written by
// wr_en reaches the RAM two clocks later at the earliest; a read shows its word
// on data_out one clock after rd_en. rd_en while ram_empty is ignored and
// data_out holds its value. The SPI bus lines and the fill levels are brought
// out for observation.
//
// Following the described design: the chain ADC -> SPI -> FIFO -> RAM, the
// single wr_en and rd_en controls and the 16-bit adc_data and data_out ports.
// This design's own choices: wr_en acting on the FIFO and rd_en on the RAM, the
// automatic FIFO-to-RAM transfer with its back-pressure, and the status ports.
module data_acq
  import fda_pkg::*;
#(
  parameter int unsigned W          = SAMPLE_W,
  parameter int unsigned FIFO_WORDS = FIFO_DEPTH,
  parameter int unsigned RAM_WORDS  = RAM_DEPTH
) (
  input  logic                            clk,
  input  logic                            reset,
  input  logic [W-1:0]                    adc_data,
  input  logic                            wr_en,
  input  logic                            rd_en,
  output logic [W-1:0]                    data_out,
  // Observation of the SPI link.
  output logic                            spi_cs_l,
  output logic                            spi_sclk,
  output logic                            spi_mosi,
  output logic                            sample_valid,
  // Fill levels and events.
  output logic [$clog2(FIFO_WORDS+1)-1:0] fifo_cnt,
  output logic                            fifo_empty,
  output logic                            fifo_full,
  output logic [$clog2(RAM_WORDS+1)-1:0]  ram_count,
  output logic                            ram_empty,
  output logic                            ram_full,
  output logic                            dropped
);

  localparam int unsigned RCW = $clog2(RAM_WORDS + 1);

  logic [W-1:0] data;       // latest word delivered by the SPI link
  logic [W-1:0] fifo_data;  // word just read from the FIFO
  logic         pop;        // FIFO read this clock
  logic         pop_q;      // RAM write this clock (FIFO read one clock ago)

  spi #(.BITS(W)) dut1 (
    .clk       (clk),
    .reset     (reset),
    .adc_data  (adc_data),
    .data      (data),
    .data_valid(sample_valid),
    .cs_l      (spi_cs_l),
    .sclk      (spi_sclk),
    .mosi      (spi_mosi)
  );

  fifo #(.W(W), .DEPTH(FIFO_WORDS)) dut2 (
    .clk      (clk),
    .reset    (reset),
    .data     (data),
    .wr_en    (wr_en),
    .rd_en    (pop),
    .fifo_data(fifo_data),
    .fifo_cnt (fifo_cnt),
    .empty    (fifo_empty),
    .full     (fifo_full)
  );

  // Move a word when the RAM has room for it and for the write in flight.
  assign pop = !fifo_empty && ((ram_count + RCW'(pop_q)) < RCW'(RAM_WORDS));

  always_ff @(posedge clk) begin
    if (reset) pop_q <= 1'b0;
    else       pop_q <= pop;
  end

  ram #(.W(W), .DEPTH(RAM_WORDS)) dut3 (
    .clk      (clk),
    .reset    (reset),
    .fifo_data(fifo_data),
    .wr_en    (pop_q),
    .rd_en    (rd_en),
    .data_out (data_out),
    .count    (ram_count),
    .empty    (ram_empty),
    .full     (ram_full)
  );

  assign dropped = wr_en && fifo_full;

  // The transfer never writes into a full RAM.
  a_no_ram_overrun: assert property (@(posedge clk) disable iff (reset) pop_q |-> !ram_full);

endmodule
