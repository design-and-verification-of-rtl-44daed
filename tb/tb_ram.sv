// tb_ram: self-checking test of the recorder RAM.
//
// Applies random writes and reads, with phases biased toward writing (to fill
// the RAM and try writes while full) and toward reading (to drain it and try
// reads while empty). A queue serves as the reference: after each clock it
// checks the count, the empty and full flags and, after each accepted read, the
// word on data_out. It counts how often the RAM was full, was empty, refused a
// write and refused a read, and fails if any of these never happened.
module tb_ram;
  import fda_pkg::*;

  localparam int unsigned W     = SAMPLE_W;
  localparam int unsigned DEPTH = RAM_DEPTH;

  logic                       clk = 1'b0;
  logic                       reset = 1'b1;
  logic [W-1:0]               data = '0;
  logic                       wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0]               data_out;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic                       empty, full;

  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_wr_refused = 0, n_rd_refused = 0, n_both = 0;

  ram dut (.fifo_data(data), .*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [W-1:0] q[$];
    logic [W-1:0] expect_out;
    bit acc_wr, acc_rd;
    int wr_pct;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    check(empty && !full && count == 0 && data_out == '0, "reset state");
    expect_out = '0;
    for (int i = 0; i < 6000; i++) begin
      wr_pct = ((i / 500) % 2 == 0) ? 85 : 15;
      wr_en  = ($urandom_range(99) < wr_pct);
      rd_en  = ($urandom_range(99) < 100 - wr_pct);
      data   = W'($urandom);
      acc_wr = wr_en && (q.size() < DEPTH);
      acc_rd = rd_en && (q.size() > 0);
      if (wr_en && !acc_wr) n_wr_refused++;
      if (rd_en && !acc_rd) n_rd_refused++;
      if (acc_wr && acc_rd) n_both++;
      @(posedge clk);
      @(negedge clk);
      if (acc_rd) expect_out = q.pop_front();
      if (acc_wr) q.push_back(data);
      check(count == q.size(), "count");
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      check(data_out == expect_out, "data_out");
      if (full) n_full++;
      if (empty) n_empty++;
    end
    // Reset empties the RAM.
    wr_en = 1'b0; rd_en = 1'b0; reset = 1'b1;
    @(negedge clk);
    reset = 1'b0;
    check(empty && count == 0 && data_out == '0, "second reset");
    $display("full=%0d empty=%0d wr_refused=%0d rd_refused=%0d both=%0d",
             n_full, n_empty, n_wr_refused, n_rd_refused, n_both);
    check(n_full > 0 && n_empty > 0 && n_wr_refused > 0 && n_rd_refused > 0 && n_both > 0,
          "every case exercised");
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
