// Self-checking testbench of the position counter: a sensor model sends
// three frames of 9 x 5 pixels; every reported pixel must carry the
// sensor's value for its position, positions must run in raster order,
// and each frame must report one frame start, 5 line ends and 45 pixels.
module tb_position_counter;
  import ipu_pkg::*;
  localparam int SW = 9, SH = 5;
  logic clk = 0, rst_n = 0, run = 0;
  logic pclk, hsync, vsync, sda_pull;
  logic [7:0] data;
  logic pix_valid, frame_start, line_end;
  pix_t pix;
  logic [XW-1:0] xpos;
  logic [YW-1:0] ypos;
  int checks = 0, failures = 0;
  int f = -1, ex = 0, ey = 0, npix = 0, nlines = 0;

  cmos_sensor_model #(.SW(SW), .SH(SH)) sensor (.run, .pclk, .hsync, .vsync, .data,
    .scl(1'b1), .sda(1'b1), .sda_pull);
  position_counter dut (.clk, .rst_n, .cam_pclk(pclk), .cam_hsync(hsync), .cam_vsync(vsync),
    .cam_data(data), .pix_valid, .pix, .xpos, .ypos, .frame_start, .line_end);

  always #5 clk = ~clk;

  task automatic end_of_frame();
    checks++;
    if (npix != SW * SH || nlines != SH) begin
      failures++; $display("FAIL frame %0d: %0d pixels %0d lines", f, npix, nlines);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (frame_start) begin
      if (f >= 0) end_of_frame();
      f++; ex = 0; ey = 0; npix = 0; nlines = 0;
    end
    if (pix_valid) begin
      checks++;
      npix++;
      if (int'(xpos) != ex || int'(ypos) != ey || pix !== sensor.pix(ex, ey, f)) begin
        failures++;
        $display("FAIL pixel (%0d,%0d)=%0d expected (%0d,%0d)=%0d", xpos, ypos, pix, ex, ey,
                 sensor.pix(ex, ey, f));
      end
      ex++;
    end
    if (line_end) begin
      nlines++; ex = 0; ey++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run = 1;
    wait (f == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
