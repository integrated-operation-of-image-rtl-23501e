// Frame-rate test at the original board's clock: system clock 57.8 MHz
// (half period 8650 ps), a 324 x 244 sensor whose pixel clock (600 ns)
// delivers a frame every 48.7 ms, and the 320 x 240 frame. In each run
// two consecutive frames are captured and stored while the PC reads; the
// two stored frames must be at most 50 ms apart, i.e. 20 frames per
// second are sustained, and the last frame is read back and compared.
// Runs: averaging kernel, then the Gaussian kernel. Time unit: 1 ns.
module tb_fpga_top_20fps;
  fpga_top_harness #(.SW(324), .SH(244), .FW(320), .FH(240), .NRUNS(2),
                     .CLK_HALF_PS(8650), .PCLK_HALF_NS(300), .FRAMES_PER_RUN(2),
                     .MAX_FRAME_NS(64'd50_000_000),
                     .WATCHDOG_NS(64'd2_000_000_000)) h ();

  // Backstop behind the harness's own watchdog (2 s of simulated time).
  initial begin
    #(64'd2_100_000_000);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
