// Self-checking testbench of image capturing. The sensor sends 12 x 10
// frames; the frame size is set to 8 x 6, so the comparator must drop
// pixels outside it. Checks: nothing passes while ic_go is low; with
// ic_go high each frame passes exactly the 48 in-frame pixels with their
// positions and values; ic_busy covers the frame and frame_done follows
// its last in-frame line; after ic_go falls capturing stops at the end of
// the frame.
module tb_image_capture;
  import ipu_pkg::*;
  localparam int SW = 12, SH = 10, FW = 8, FH = 6;
  logic clk = 0, rst_n = 0, run = 0, ic_go = 0;
  logic pclk, hsync, vsync, sda_pull;
  logic [7:0] data;
  logic ic_busy, frame_start, frame_done, out_valid;
  logic [XW-1:0] cur_width, out_x;
  logic [YW-1:0] cur_height, out_y;
  pix_t out_pix;
  int checks = 0, failures = 0;
  int sensor_frames = -1, npix = 0, ndone = 0, nstart = 0, ndropped_seen = 0;

  cmos_sensor_model #(.SW(SW), .SH(SH)) sensor (.run, .pclk, .hsync, .vsync, .data,
    .scl(1'b1), .sda(1'b1), .sda_pull);
  image_capture dut (.clk, .rst_n, .cam_pclk(pclk), .cam_hsync(hsync), .cam_vsync(vsync),
    .cam_data(data), .width(XW'(FW)), .height(YW'(FH)), .ic_go, .ic_busy, .frame_start,
    .frame_done, .cur_width, .cur_height, .out_valid, .out_pix, .out_x, .out_y);

  always #5 clk = ~clk;

  // sensor frame number, counted at the vsync pulse
  always @(posedge vsync) sensor_frames++;

  always @(negedge clk) if (rst_n) begin
    if (dut.p_valid && !dut.valid) ndropped_seen++;
    if (frame_start) begin nstart++; npix = 0; end
    if (out_valid) begin
      checks++;
      if (out_x != XW'(npix % FW) || out_y != YW'(npix / FW) ||
          out_pix !== sensor.pix(npix % FW, npix / FW, sensor_frames) || !ic_busy) begin
        failures++;
        $display("FAIL pixel %0d at (%0d,%0d) = %0d", npix, out_x, out_y, out_pix);
      end
      npix++;
    end
    if (frame_done) begin
      ndone++;
      checks++;
      if (npix != FW * FH) begin failures++; $display("FAIL frame had %0d pixels", npix); end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run = 1;
    // one whole sensor frame with ic_go low: nothing may pass
    wait (sensor_frames == 1);
    checks++;
    if (nstart != 0 || ic_busy) begin failures++; $display("FAIL captured without ic_go"); end
    ic_go = 1;
    wait (ndone == 2);
    ic_go = 0;
    wait (sensor_frames == 5);
    checks++;
    if (ndone != 2 || nstart != 2 || ic_busy) begin
      failures++; $display("FAIL frames after stop: start %0d done %0d", nstart, ndone);
    end
    checks++;
    if (ndropped_seen == 0 || cur_width != XW'(FW) || cur_height != YW'(FH)) begin
      failures++; $display("FAIL comparator never dropped a pixel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
