// Self-checking testbench of the image processing unit. A sensor model
// sends 13 x 9 frames; the frame size is 11 x 7, so every captured frame
// yields 9 x 5 processed pixels. Four frames are captured, one for each
// output selection (convolution with the averaging kernel, Max, Mid,
// Min), then one with the high pass kernel. Every processed pixel is
// compared with the value computed here from the sensor's pixel function.
module tb_ipu;
  import ipu_pkg::*;
  localparam int SW = 13, SH = 9, FW = 11, FH = 7;
  logic clk = 0, rst_n = 0, run = 0, ic_go = 0;
  logic pclk, hsync, vsync, sda_pull;
  logic [7:0] data;
  ipu_cfg_t cfg;
  logic ic_busy, frame_start, frame_done, proc_valid;
  pix_t proc_data;
  int checks = 0, failures = 0;
  int sensor_frames = -1, ndone = 0, npix = 0;
  pix_t exp_q [$];

  cmos_sensor_model #(.SW(SW), .SH(SH)) sensor (.run, .pclk, .hsync, .vsync, .data,
    .scl(1'b1), .sda(1'b1), .sda_pull);
  ipu #(.MAX_W(16)) dut (.clk, .rst_n, .cam_pclk(pclk), .cam_hsync(hsync), .cam_vsync(vsync),
    .cam_data(data), .cfg, .ic_go, .ic_busy, .frame_start, .frame_done, .proc_valid, .proc_data);

  always #5 clk = ~clk;
  always @(posedge vsync) sensor_frames++;

  function automatic pix_t expected(int x, int y, int f);
    longint acc = 0, s;
    pix_t w [9], t;
    for (int k = 0; k < 9; k++) begin
      w[k] = sensor.pix(x - k % 3, y - k / 3, f);
      acc += longint'(cfg.coef[k]) * longint'(w[k]);
    end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8 - i; j++)
        if (w[j] < w[j+1]) begin t = w[j]; w[j] = w[j+1]; w[j+1] = t; end
    s = acc >>> cfg.shift;
    case (cfg.out_sel)
      SEL_MAX: return w[0];
      SEL_MID: return w[4];
      SEL_MIN: return w[8];
      default: return (s < 0) ? 8'd0 : (s > 255) ? 8'd255 : pix_t'(s);
    endcase
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (frame_start) begin
      exp_q.delete();
      npix = 0;
      for (int y = 2; y < FH; y++)
        for (int x = 2; x < FW; x++) exp_q.push_back(expected(x, y, sensor_frames));
    end
    if (proc_valid) begin
      checks++;
      npix++;
      if (exp_q.size() == 0 || proc_data !== exp_q[0]) begin
        failures++;
        $display("FAIL sel %0d pixel %0d got %0d exp %0d", cfg.out_sel, npix, proc_data,
                 exp_q.size() ? exp_q[0] : 0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
    if (frame_done) begin
      checks++;
      if (npix != (FW - 2) * (FH - 2) || exp_q.size() != 0) begin
        failures++; $display("FAIL frame gave %0d pixels", npix);
      end
      ndone++;
      // next frame: next output selection
      case (ndone)
        1: cfg.out_sel = SEL_MAX;
        2: cfg.out_sel = SEL_MID;
        3: cfg.out_sel = SEL_MIN;
        4: begin
             cfg.out_sel = SEL_CONV;
             for (int k = 0; k < 9; k++) cfg.coef[k] = -12'sd114;
             cfg.coef[4] = 12'sd910;
           end
        default: ;
      endcase
    end
  end

  initial begin
    cfg.width = XW'(FW); cfg.height = YW'(FH); cfg.shift = 4'd10;
    for (int k = 0; k < 9; k++) cfg.coef[k] = 12'sd114;   // 1/9
    cfg.out_sel = SEL_CONV;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run = 1;
    ic_go = 1;
    wait (ndone == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
