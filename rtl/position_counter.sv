// Position counter of the image capturing stage.
//
// Brings the CMOS sensor's pixel clock, line and frame strobes into the
// system clock domain (two flip-flops each) and counts where each pixel
// lies in the sensor frame:
//   - vsync rising edge: a new frame starts, xpos = ypos = 0 (frame_start);
//   - pclk rising edge while hsync is high: one pixel, reported with its
//     xpos/ypos on pix_valid, then xpos advances;
//   - hsync falling edge: the line ends (line_end), xpos = 0, ypos advances.
// The sensor is assumed to change data on the falling pclk edge; the data
// bus goes through the same two flip-flops as pclk, so the word taken at
// the detected rising edge is the one the sensor presented at that edge.
// The system clock must be at least four times faster than pclk. All
// outputs are registered and appear three clock cycles after the sensor
// edge. The counting rules (hsync high = line active, vsync edge = frame
// start) are this design's assumption about the sensor's timing.
module position_counter
  import ipu_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cam_pclk,
  input  logic          cam_hsync,
  input  logic          cam_vsync,
  input  pix_t          cam_data,
  output logic          pix_valid,
  output pix_t          pix,
  output logic [XW-1:0] xpos,
  output logic [YW-1:0] ypos,
  output logic          frame_start,
  output logic          line_end
);
  logic [2:0] pclk_s, hs_s, vs_s;
  pix_t       d_s [2];
  logic [XW-1:0] xcnt;
  logic [YW-1:0] ycnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pclk_s <= '0; hs_s <= '0; vs_s <= '0;
      d_s[0] <= '0; d_s[1] <= '0;
    end else begin
      pclk_s <= {pclk_s[1:0], cam_pclk};
      hs_s   <= {hs_s[1:0], cam_hsync};
      vs_s   <= {vs_s[1:0], cam_vsync};
      d_s[0] <= cam_data;
      d_s[1] <= d_s[0];
    end
  end

  logic pclk_rise, hs_fall, vs_rise;
  assign pclk_rise = pclk_s[1] & ~pclk_s[2];
  assign hs_fall   = ~hs_s[1] & hs_s[2];
  assign vs_rise   = vs_s[1] & ~vs_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xcnt <= '0; ycnt <= '0;
      pix_valid <= 1'b0; pix <= '0; xpos <= '0; ypos <= '0;
      frame_start <= 1'b0; line_end <= 1'b0;
    end else begin
      pix_valid   <= 1'b0;
      frame_start <= 1'b0;
      line_end    <= 1'b0;
      if (vs_rise) begin
        xcnt <= '0; ycnt <= '0;
        frame_start <= 1'b1;
      end else begin
        if (pclk_rise && hs_s[1]) begin
          pix_valid <= 1'b1;
          pix       <= d_s[1];
          xpos      <= xcnt;
          ypos      <= ycnt;
          if (xcnt != '1) xcnt <= xcnt + 1'b1;
        end
        if (hs_fall) begin
          line_end <= 1'b1;
          ypos     <= ycnt;
          xcnt     <= '0;
          if (ycnt != '1) ycnt <= ycnt + 1'b1;
        end
      end
    end
  end
endmodule
