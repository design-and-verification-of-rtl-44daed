// tb_fda_env: transaction-level test of the acquisition path, organised as a
// small verification environment: a sequence of random ADC codes, a driver, a
// monitor and a scoreboard, connected to data_acq through the fda_if bundle.
//
// The driver presents each code on adc_data, holds it for two full SPI frames
// so that the link both samples it and delivers it, and then pulses wr_en once
// to record it. After a batch it pulses rd_en until every recorded word is
// read back. The monitor turns each accepted read into a transaction carrying
// data_out; the scoreboard pairs it with the oldest code the driver recorded
// and reports a pass or a failure, printing both values. Two batches run: ten
// codes, then 160 codes, which fills the RAM (128) and the FIFO (32) exactly
// without losing a word. The test also checks that the recorder is empty at
// the end and that no word was ever dropped.
module tb_fda_env;
  import fda_pkg::*;

  class fda_item;
    sample_t adc_data;
    sample_t data_out;
    function void randomise();
      adc_data = sample_t'($urandom);
    endfunction
  endclass

  class fda_scoreboard;
    sample_t expected[$];
    int checks = 0, failures = 0, passed = 0;
    function void record(sample_t code);
      expected.push_back(code);
    endfunction
    function void write(fda_item t);
      sample_t exp_code;
      checks++;
      if (expected.size() == 0) begin
        failures++;
        $display("SCOREBOARD: data_out:%h read with nothing recorded", t.data_out);
        return;
      end
      exp_code = expected.pop_front();
      if (t.data_out == exp_code) passed++;
      else begin
        failures++;
        $display("SCOREBOARD: adc_data:%h data_out:%h TEST FAILED", exp_code, t.data_out);
      end
    endfunction
  endclass

  class fda_driver;
    virtual fda_if vif;
    fda_scoreboard scb;
    function new(virtual fda_if vif, fda_scoreboard scb);
      this.vif = vif;
      this.scb = scb;
    endfunction
    task wait_frame();
      do @(negedge vif.clk); while (!vif.sample_valid);
    endtask
    task record(fda_item it);
      wait_frame();                 // a frame has just started
      vif.adc_data = it.adc_data;   // sampled at the next frame start
      wait_frame();
      wait_frame();                 // now delivered by the link
      vif.wr_en = 1'b1;
      @(negedge vif.clk);
      vif.wr_en = 1'b0;
      scb.record(it.adc_data);
    endtask
    task read_all(int n);
      int got = 0;
      int guard = 0;
      while (got < n && guard < 8 * n + 100) begin
        vif.rd_en = !vif.ram_empty;
        if (!vif.ram_empty) got++;
        @(negedge vif.clk);
        guard++;
      end
      vif.rd_en = 1'b0;
    endtask
  endclass

  class fda_monitor;
    virtual fda_if vif;
    fda_scoreboard scb;
    int dropped = 0;
    function new(virtual fda_if vif, fda_scoreboard scb);
      this.vif = vif;
      this.scb = scb;
    endfunction
    task run();
      bit rd_accepted;
      forever begin
        @(posedge vif.clk);
        rd_accepted = vif.rd_en && !vif.ram_empty && !vif.reset;
        if (vif.dropped) dropped++;
        @(negedge vif.clk);
        if (rd_accepted) begin
          fda_item t = new();
          t.data_out = vif.data_out;
          scb.write(t);
        end
      end
    endtask
  endclass

  logic clk = 1'b0;
  always #5 clk = ~clk;

  fda_if bus (.clk(clk));

  data_acq dut (
    .clk         (clk),
    .reset       (bus.reset),
    .adc_data    (bus.adc_data),
    .wr_en       (bus.wr_en),
    .rd_en       (bus.rd_en),
    .data_out    (bus.data_out),
    .spi_cs_l    (),
    .spi_sclk    (),
    .spi_mosi    (),
    .sample_valid(bus.sample_valid),
    .fifo_cnt    (),
    .fifo_empty  (),
    .fifo_full   (bus.fifo_full),
    .ram_count   (),
    .ram_empty   (bus.ram_empty),
    .ram_full    (),
    .dropped     (bus.dropped)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    fda_scoreboard scb = new();
    fda_driver     drv = new(bus, scb);
    fda_monitor    mon = new(bus, scb);
    fda_item       it;
    int            batch[2] = '{10, RAM_DEPTH + FIFO_DEPTH};
    bus.reset    = 1'b1;
    bus.adc_data = '0;
    bus.wr_en    = 1'b0;
    bus.rd_en    = 1'b0;
    repeat (3) @(negedge clk);
    bus.reset = 1'b0;
    fork
      mon.run();
    join_none
    foreach (batch[b]) begin
      for (int i = 0; i < batch[b]; i++) begin
        it = new();
        it.randomise();
        drv.record(it);
      end
      repeat (4) @(negedge clk);
      drv.read_all(batch[b]);
      repeat (2) @(negedge clk);
      check(scb.expected.size() == 0, "every recorded code read back");
      check(bus.ram_empty, "recorder empty after read-back");
    end
    check(mon.dropped == 0, "no word dropped");
    check(scb.passed == 10 + RAM_DEPTH + FIFO_DEPTH, "all codes compared and matched");
    $display("scoreboard: %0d compared, %0d passed, %0d failed", scb.checks, scb.passed, scb.failures);
    checks   += scb.checks;
    failures += scb.failures;
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
