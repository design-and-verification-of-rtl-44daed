// spi: serial link that carries each ADC code into the FPGA.
//
// Function. Every frame, the link captures the parallel ADC code on adc_data,
// sends it bit by bit (most significant bit first) over a three-wire SPI bus
// (cs_l, sclk, mosi) and reassembles the received bits into the parallel word
// `data`, which is held until the next frame completes. data_valid pulses for
// one clock each time `data` takes a new word.
//
// How it works. A sequencer alternates between phase LOW (sclk = 0) and phase
// HIGH (sclk = 1) on every clock, so one SPI bit lasts two clocks. A down-counter
// starts at BITS and drops by one per bit; the frame ends when it has counted
// BITS bits, and the next frame starts on the very next clock, so chip select
// stays low from the first frame on. The transmit shift register drives mosi
// from its top bit and shifts on the falling sclk edge; the receive shift
// register samples mosi on the rising sclk edge.
//
// Interface and timing. adc_data is sampled at the clock edge that starts a
// frame: the first edge after reset, then every 2*BITS clocks. The word sampled
// at one frame start appears on `data`, with data_valid high, 2*BITS clocks
// later (32 clocks at the default BITS = 16). reset is synchronous and active
// high; it raises cs_l, lowers sclk and clears `data`.
//
// Following the described design: the 16-bit word, the 16-step bit counter, the
// two-phase state that toggles every clock with sclk, the active-low chip select
// (high in reset, low while sending) and the register names mosi/cs_l/sclk.
// This design's own choices: the bit order, the sclk edges used for shifting and
// sampling, the receive register and the data_valid strobe.
module spi
  import fda_pkg::*;
#(
  parameter int unsigned BITS = SAMPLE_W
) (
  input  logic            clk,
  input  logic            reset,
  input  logic [BITS-1:0] adc_data,
  output logic [BITS-1:0] data,
  output logic            data_valid,
  output logic            cs_l,
  output logic            sclk,
  output logic            mosi
);

  localparam int unsigned CW = $clog2(BITS + 1);

  spi_state_e      state;
  logic [CW-1:0]   count;
  logic [BITS-1:0] tx_sr;
  logic [BITS-1:0] rx_sr;

  assign sclk = (state == SPI_HIGH);
  assign mosi = tx_sr[BITS-1];

  always_ff @(posedge clk) begin
    if (reset) begin
      state      <= SPI_IDLE;
      count      <= CW'(BITS);
      cs_l       <= 1'b1;
      tx_sr      <= '0;
      rx_sr      <= '0;
      data       <= '0;
      data_valid <= 1'b0;
    end else begin
      data_valid <= 1'b0;
      unique case (state)
        SPI_IDLE: begin
          // First frame: take the ADC code and select the receiver.
          tx_sr <= adc_data;
          count <= CW'(BITS);
          cs_l  <= 1'b0;
          state <= SPI_LOW;
        end
        SPI_LOW: begin
          // sclk rises: the receiver samples the bit on mosi.
          rx_sr <= {rx_sr[BITS-2:0], mosi};
          state <= SPI_HIGH;
        end
        SPI_HIGH: begin
          // sclk falls: one bit done.
          if (count == CW'(1)) begin
            data       <= rx_sr;
            data_valid <= 1'b1;
            tx_sr      <= adc_data;
            count      <= CW'(BITS);
          end else begin
            tx_sr <= {tx_sr[BITS-2:0], 1'b0};
            count <= count - CW'(1);
          end
          state <= SPI_LOW;
        end
        default: state <= SPI_IDLE;
      endcase
    end
  end

endmodule
