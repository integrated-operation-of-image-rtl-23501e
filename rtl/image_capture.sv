// Image capturing (ic) stage of the image processing unit.
//
// Position counter, comparator, control and AND gate:
//   - the position counter gives each sensor pixel its xpos/ypos;
//   - the comparator raises `valid` while xpos < frame width and
//     ypos < frame height, i.e. while the pixel lies inside the frame
//     size set up at initialisation (pixels outside it are dropped);
//   - the control waits for ic_go; at the next sensor frame start it
//     latches the frame size, raises ic_busy and pulses frame_start; it
//     lowers ic_busy and pulses frame_done when the last line inside the
//     frame has ended (or when the sensor starts its next frame first).
//     While ic_go stays high every sensor frame is captured;
//   - `enable` = valid AND busy, and the AND gate passes the pixel to the
//     convolver only while enable is high.
// Outputs follow the position counter by one clock cycle. out_x/out_y are
// the pixel's position inside the frame. The frame size is held constant
// through a frame (cur_width/cur_height) even if the settings change.
module image_capture
  import ipu_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // sensor
  input  logic          cam_pclk,
  input  logic          cam_hsync,
  input  logic          cam_vsync,
  input  pix_t          cam_data,
  // settings and control
  input  logic [XW-1:0] width,
  input  logic [YW-1:0] height,
  input  logic          ic_go,
  output logic          ic_busy,
  output logic          frame_start,
  output logic          frame_done,
  output logic [XW-1:0] cur_width,
  output logic [YW-1:0] cur_height,
  // to the convolver
  output logic          out_valid,
  output pix_t          out_pix,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y
);
  logic          p_valid, p_fs, p_le;
  pix_t          p_pix;
  logic [XW-1:0] xpos;
  logic [YW-1:0] ypos;

  position_counter u_pos (
    .clk, .rst_n, .cam_pclk, .cam_hsync, .cam_vsync, .cam_data,
    .pix_valid(p_valid), .pix(p_pix), .xpos, .ypos,
    .frame_start(p_fs), .line_end(p_le));

  // comparator
  logic valid;
  assign valid = (xpos < cur_width) && (ypos < cur_height);

  // AND gate
  logic enable;
  assign enable = p_valid && valid && ic_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ic_busy <= 1'b0; frame_start <= 1'b0; frame_done <= 1'b0;
      cur_width <= XW'(MAX_W_DEF); cur_height <= YW'(MAX_H_DEF);
      out_valid <= 1'b0; out_pix <= '0; out_x <= '0; out_y <= '0;
    end else begin
      frame_start <= 1'b0;
      frame_done  <= 1'b0;
      out_valid   <= enable;
      if (enable) begin
        out_pix <= p_pix;
        out_x   <= xpos;
        out_y   <= ypos;
      end
      if (p_fs) begin
        if (ic_busy) frame_done <= 1'b1;   // sensor frame shorter than set
        ic_busy <= ic_go;
        if (ic_go) begin
          frame_start <= 1'b1;
          cur_width   <= width;
          cur_height  <= height;
        end
      end else if (ic_busy && p_le && (ypos + 1'b1 >= cur_height)) begin
        ic_busy    <= 1'b0;
        frame_done <= 1'b1;
      end
    end
  end
endmodule
