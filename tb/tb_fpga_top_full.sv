// Full-size system test: a 324 x 244 sensor, the 320 x 240 frame of the
// design's main configuration. Each of seven complete operations configures
// the system, captures one frame, reads all 318 x 238 object pixels back
// over the parallel port and compares them: averaging, Gaussian and high
// pass kernels, the median, maximum and minimum filters, and original plus high pass.
module tb_fpga_top_full;
  fpga_top_harness #(.SW(324), .SH(244), .FW(320), .FH(240), .NRUNS(7),
                     .WATCHDOG_NS(64'd900_000_000)) h ();
endmodule
