// End-to-end test of the whole system on small frames: a 14 x 10 sensor,
// 12 x 8 frame size, seven runs covering four kernels and every output selection (see
// fpga_top_harness). The design itself keeps its default parameters.
module tb_fpga_top;
  fpga_top_harness #(.SW(14), .SH(10), .FW(12), .FH(8), .NRUNS(7),
                     .WATCHDOG_NS(64'd20_000_000)) h ();
endmodule
