// tb_data_acq: end-to-end test of the acquisition path at its default sizes.
//
// The ADC code changes at random on every clock. A reference model that only
// counts clocks knows which code the SPI link has delivered before each clock
// edge (the code sampled at the start of the previous 32-clock frame), so it
// knows the word every wr_en should store. Accepted words go into a queue; each
// read that the RAM accepts must return the oldest queued word on data_out one
// clock later. A refused write (dropped) is legal only when the model holds
// 128 + 32 unread words, or one less in the clock after a read has freed a RAM
// word (the FIFO, still full, refuses a write in the clock in which it passes
// a word on). `dropped` must equal wr_en while the FIFO is full.
//
// Phases: writes on every clock with no reads (fills the RAM, then the FIFO,
// then drops words), random writes and reads, reads only (drains everything
// and reads an empty RAM), and a final drain with a bounded wait. It counts
// SPI frames, stored words, words read, clocks of RAM-full back-pressure with
// words waiting in the FIFO, dropped words and reads of an empty RAM, and fails
// if any of them never happened or if the frame count is not one per 32 clocks.
module tb_data_acq;
  import fda_pkg::*;

  localparam int unsigned W     = SAMPLE_W;
  localparam int unsigned FRAME = 2 * SAMPLE_W;
  localparam int unsigned CAP   = RAM_DEPTH + FIFO_DEPTH;

  logic                                clk = 1'b0;
  logic                                reset = 1'b1;
  logic [W-1:0]                        adc_data = '0;
  logic                                wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0]                        data_out;
  logic                                spi_cs_l, spi_sclk, spi_mosi, sample_valid;
  logic [$clog2(FIFO_DEPTH+1)-1:0]     fifo_cnt;
  logic                                fifo_empty, fifo_full;
  logic [$clog2(RAM_DEPTH+1)-1:0]      ram_count;
  logic                                ram_empty, ram_full;
  logic                                dropped;

  int checks = 0, failures = 0;
  int n_frames = 0, n_stored = 0, n_read = 0, n_backpressure = 0, n_dropped = 0;
  int n_empty_reads = 0, n_fifo_full = 0;

  data_acq dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [W-1:0] hist [int];   // ADC code seen at each clock edge
  logic [W-1:0] q [$];        // words stored and not yet read
  int e = 0;                  // clock edges since reset was released

  // Word the SPI link holds just before clock edge number `at`.
  function automatic logic [W-1:0] spi_word(input int at);
    int n;
    if (at < 1) return '0;
    n = (at - 1) / FRAME;
    return (n >= 1) ? hist[FRAME * (n - 1)] : '0;
  endfunction

  // One clock: wr/rd are applied at the edge, results checked after it.
  task automatic step(input bit wr, input bit rd);
    bit acc_wr, acc_rd;
    logic [W-1:0] w;
    wr_en    = wr;
    rd_en    = rd;
    adc_data = W'($urandom);
    #1;
    check(dropped == (wr && fifo_full), "dropped flag");
    acc_wr = wr && !fifo_full;
    acc_rd = rd && !ram_empty;
    if (wr && fifo_full) begin
      n_dropped++;
      check(q.size() >= CAP - 1, "word dropped only when the chain is full");
    end
    if (rd && ram_empty) n_empty_reads++;
    if (ram_full && !fifo_empty) n_backpressure++;
    if (fifo_full) n_fifo_full++;
    w = spi_word(e);
    @(posedge clk);
    hist[e] = adc_data;
    e++;
    @(negedge clk);
    if (sample_valid) n_frames++;
    if (acc_rd) begin
      check(q.size() > 0, "read only when a word is held");
      if (q.size() > 0) check(data_out == q.pop_front(), "data_out in order");
      n_read++;
    end
    if (acc_wr) begin
      q.push_back(w);
      n_stored++;
    end
    check(spi_cs_l == 1'b0, "chip select active");
    check(q.size() >= ram_count + fifo_cnt && q.size() <= ram_count + fifo_cnt + 1,
          "fill levels agree with model");
  endtask

  initial begin
    int waited;
    repeat (3) @(negedge clk);
    check(data_out == '0 && ram_empty && fifo_empty, "reset state");
    reset = 1'b0;
    // 1: record on every clock, no reads: RAM fills, FIFO fills, words drop.
    for (int i = 0; i < CAP + 40; i++) step(1'b1, 1'b0);
    // 2: random mix.
    for (int i = 0; i < 1500; i++) step($urandom_range(99) < 50, $urandom_range(99) < 55);
    // 3: reads only, past empty.
    for (int i = 0; i < CAP + 40; i++) step(1'b0, 1'b1);
    // 4: a few more words, then drain with a bounded wait.
    for (int i = 0; i < 100; i++) step($urandom_range(99) < 30, 1'b0);
    waited = 0;
    while (q.size() > 0 && waited < 4 * CAP) begin
      step(1'b0, 1'b1);
      waited++;
    end
    check(q.size() == 0 && ram_empty && fifo_empty, "everything read back");
    check(n_frames == (e - 1) / FRAME, "one SPI word per 32 clocks");
    $display("frames=%0d stored=%0d read=%0d backpressure=%0d dropped=%0d empty_reads=%0d fifo_full=%0d",
             n_frames, n_stored, n_read, n_backpressure, n_dropped, n_empty_reads, n_fifo_full);
    check(n_frames > 0, "SPI frames happened");
    check(n_stored > 0 && n_read > 0, "words stored and read");
    check(n_backpressure > 0, "RAM-full back-pressure happened");
    check(n_fifo_full > 0 && n_dropped > 0, "FIFO overflow happened");
    check(n_empty_reads > 0, "read of an empty RAM happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
