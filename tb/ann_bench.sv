// ann_bench: one network (ann_top) together with its driver/checker
// (ann_driver), for testbenches that run several network configurations
// side by side. Generates its own clock; reports the driver's results.
//
// The pairing is only test infrastructure; nothing in it is part of the
// network itself.
module ann_bench
  import ann_pkg::*;
#(
  parameter net_cfg_t NET  = cnn_setup_a(),
  parameter int       NL   = 3,
  parameter dims_t    DIN0 = CNN_IN,
  parameter int       RUNS = 4
) (
  output int checks,
  output int failures,
  output int latency,
  output int interval,
  output bit done
);
  localparam int OAW = clog2_1(vol(layer_in_dims(NET, DIN0, NL)));

  logic clk = 1'b0;
  logic rst_n, w_valid, w_ready, loaded, in_valid, in_ready;
  logic out_full, out_rd_en, out_release;
  wgt_t w_data;
  data_t in_data, out_rd_data;
  logic [OAW-1:0] out_rd_addr;

  always #5 clk = ~clk;

  ann_top #(.NET(NET), .NL(NL), .DIN0(DIN0)) dut (.*);
  ann_driver #(.NET(NET), .NL(NL), .DIN0(DIN0), .RUNS(RUNS), .HOLD(0)) drv (.*);
endmodule
