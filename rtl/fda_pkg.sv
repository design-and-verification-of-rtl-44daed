// fda_pkg: types and default sizes shared by the flight data acquisition path.
//
// The acquisition path carries 16-bit ADC codes (the width of adc_data, data,
// fifo_data and data_out throughout the design). The FIFO holds 32 words and the
// recorder RAM 128 words. The SPI link moves one word as a frame of 16 serial
// bits, two system clocks per bit (sclk low for one clock, high for the next).
package fda_pkg;

  // Width of one ADC code and of every data word in the path.
  localparam int unsigned SAMPLE_W   = 16;
  // Words the FIFO holds (its count saturates at this value).
  localparam int unsigned FIFO_DEPTH = 32;
  // Words the recorder RAM holds (2**7).
  localparam int unsigned RAM_DEPTH  = 128;

  typedef logic [SAMPLE_W-1:0] sample_t;

  // Phases of the SPI frame sequencer. LOW and HIGH alternate once per clock
  // while a frame is being sent; sclk is high exactly in HIGH. IDLE is only
  // visited once after reset, with chip select still inactive.
  typedef enum logic [1:0] {
    SPI_LOW  = 2'd0,
    SPI_HIGH = 2'd1,
    SPI_IDLE = 2'd2
  } spi_state_e;

endpackage
