// Image processing unit: capturing, convolution and 2-D sorting as a
// three-stage pipeline.
//
// Sensor pixels inside the configured frame pass from image capturing to
// the convolver. The convolver builds the 3x3 window in its delay line,
// computes the object pixel b with one multiply-accumulate unit and hands
// the right-hand window column (the sort bus) to the 2-D sorter, which
// finds the window's maximum, median and minimum. An output multiplexer
// chooses, by cfg.out_sel, which of b, Max, Mid or Min is the processed
// pixel that goes to the image module. All four results of one window are
// ready when the convolver's result is (ten clock cycles after the pixel),
// so one strobe, proc_valid, marks the processed pixel.
//
// One processed pixel is produced for each window that lies wholly inside
// the frame: (width-2) x (height-2) pixels per frame, in raster order,
// starting after frame_start. frame_done is raised once the last result of
// a frame has left the pipeline. Sensor pixels must be at least nine
// system clock cycles apart.
module ipu
  import ipu_pkg::*;
#(
  parameter int MAX_W = MAX_W_DEF
) (
  input  logic     clk,
  input  logic     rst_n,
  // sensor
  input  logic     cam_pclk,
  input  logic     cam_hsync,
  input  logic     cam_vsync,
  input  pix_t     cam_data,
  // settings and control from the INU
  input  ipu_cfg_t cfg,
  input  logic     ic_go,
  output logic     ic_busy,
  // processed data to the image module
  output logic     frame_start,
  output logic     frame_done,
  output logic     proc_valid,
  output pix_t     proc_data
);
  logic          c_valid;
  pix_t          c_pix;
  logic [XW-1:0] c_x, cur_w;
  logic [YW-1:0] c_y, cur_h;
  logic          ic_done;

  image_capture u_ic (
    .clk, .rst_n, .cam_pclk, .cam_hsync, .cam_vsync, .cam_data,
    .width(cfg.width), .height(cfg.height), .ic_go, .ic_busy,
    .frame_start, .frame_done(ic_done), .cur_width(cur_w), .cur_height(cur_h),
    .out_valid(c_valid), .out_pix(c_pix), .out_x(c_x), .out_y(c_y));

  coef_t coef [NTAPS];
  for (genvar k = 0; k < NTAPS; k++) begin : g_coef
    assign coef[k] = cfg.coef[k];
  end

  logic col_valid, win_valid, b_valid, conv_busy;
  pix_t sort_bus [3];
  pix_t b;

  conv2d #(.MAX_W(MAX_W)) u_conv (
    .clk, .rst_n, .width(cur_w), .coef, .shift(cfg.shift),
    .in_valid(c_valid), .in_pix(c_pix), .in_x(c_x), .in_y(c_y),
    .col_valid, .sort_bus, .win_valid,
    .out_valid(b_valid), .out_b(b), .busy(conv_busy));

  logic s_valid;
  pix_t s_max, s_mid, s_min;

  sorter2d #(.W(PIX_W)) u_sort (
    .clk, .rst_n, .col_valid, .col(sort_bus),
    .out_valid(s_valid), .max_o(s_max), .mid_o(s_mid), .min_o(s_min));

  // output multiplexer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      proc_valid <= 1'b0;
      proc_data  <= '0;
    end else begin
      proc_valid <= b_valid;
      if (b_valid) begin
        unique case (cfg.out_sel)
          SEL_CONV: proc_data <= b;
          SEL_MAX:  proc_data <= s_max;
          SEL_MID:  proc_data <= s_mid;
          SEL_MIN:  proc_data <= s_min;
          default:  proc_data <= b;
        endcase
      end
    end
  end

  // frame_done waits until the pipeline holds no pixel of the frame
  logic done_pend;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_pend  <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (ic_done) done_pend <= 1'b1;
      else if (done_pend && !c_valid && !col_valid && !win_valid &&
               !conv_busy && !b_valid) begin
        done_pend  <= 1'b0;
        frame_done <= 1'b1;
      end
    end
  end
endmodule
