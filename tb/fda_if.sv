// fda_if: signal bundle between the class-based test environment and the
// data_acq top. The driver writes adc_data, wr_en and rd_en; the monitor reads
// everything. All signals change on the falling clock edge and are sampled by
// the design on the rising one.
interface fda_if (input logic clk);
  logic        reset;
  logic [15:0] adc_data;
  logic        wr_en;
  logic        rd_en;
  logic [15:0] data_out;
  logic        sample_valid;
  logic        ram_empty;
  logic        fifo_full;
  logic        dropped;
endinterface
