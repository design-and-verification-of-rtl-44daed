// tb_spi: self-checking test of the SPI link.
//
// Drives a new random ADC code on every clock and checks, after every clock
// edge, the whole bus against a model that only counts clocks: chip select low
// from the first edge after reset, sclk high on every odd clock of a frame,
// mosi carrying bit 15-b of the code sampled at the frame start during bit b,
// and `data` showing that code, with a one-clock data_valid, exactly 32 clocks
// after it was sampled. It also checks that a frame restarts cleanly after a
// second reset in mid-frame.
module tb_spi;
  import fda_pkg::*;

  localparam int unsigned BITS  = SAMPLE_W;
  localparam int unsigned FRAME = 2 * BITS;

  logic            clk = 1'b0;
  logic            reset = 1'b1;
  logic [BITS-1:0] adc_data = '0;
  logic [BITS-1:0] data;
  logic            data_valid, cs_l, sclk, mosi;

  int checks = 0, failures = 0;
  int valids = 0;

  spi dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One run of `edges` clock edges after a reset.
  task automatic run(input int edges);
    logic [BITS-1:0] hist [int];
    logic [BITS-1:0] last;
    int o, b, fs;
    reset = 1'b1;
    repeat (3) @(negedge clk);
    check(cs_l == 1'b1 && sclk == 1'b0 && data == '0 && !data_valid, "reset state");
    reset = 1'b0;
    last  = '0;
    for (int e = 0; e < edges; e++) begin
      @(posedge clk);
      hist[e] = adc_data;
      @(negedge clk);
      fs = e - (e % FRAME);          // edge that started the current frame
      o  = e % FRAME;
      b  = o / 2;
      check(cs_l == 1'b0, "cs_l low while sending");
      check(sclk == (o % 2 == 1), "sclk phase");
      check(mosi == hist[fs][BITS-1-b], "mosi bit");
      if (e >= FRAME && o == 0) begin
        last = hist[e - FRAME];
        check(data_valid == 1'b1, "data_valid at frame end");
        valids++;
      end else begin
        check(data_valid == 1'b0, "no data_valid inside frame");
      end
      check(data == last, "received word");
      adc_data = BITS'($urandom);
    end
  endtask

  initial begin
    run(5 * FRAME + 7);       // five full frames, then stop in mid-frame
    run(4 * FRAME + 1);       // restart from reset
    check(valids == 5 + 4, "one word per 32 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
