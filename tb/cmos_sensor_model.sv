// Behavioural model of the CMOS image sensor, for simulation only.
//
// While `run` is high it sends frames of SW x SH pixels: a vsync pulse,
// then SH lines, each with hsync high for SW pixel clocks followed by
// HBLANK clocks of blanking. Data changes on the falling pclk edge and is
// sampled by the receiver on the rising edge. The pixel value is the
// function pix(x, y, frame) below, which testbenches use for their
// expected results. The control port is an I2C slave (i2c_slave_model).
module cmos_sensor_model #(
  parameter int SW = 12,
  parameter int SH = 10,
  parameter int HBLANK = 4,
  parameter int VBLANK = 3,
  parameter int PCLK_HALF_NS = 60
) (
  input  logic       run,
  output logic       pclk,
  output logic       hsync,
  output logic       vsync,
  output logic [7:0] data,
  input  logic       scl,
  input  logic       sda,
  output logic       sda_pull
);
  int frame = 0;

  function automatic logic [7:0] pix(int x, int y, int f);
    int v;
    v = (x * 37 + y * 91 + f * 53) ^ (x * y * 5) ^ ((x + 3 * y) << 3);
    return 8'(v);
  endfunction

  i2c_slave_model u_i2c (.scl, .sda, .sda_pull);

  initial begin
    pclk = 1'b0; hsync = 1'b0; vsync = 1'b0; data = '0;
  end

  always #(PCLK_HALF_NS * 1ns) pclk = ~pclk;

  initial begin
    forever begin
      @(negedge pclk);
      if (run) begin
        vsync = 1'b1;
        repeat (2) @(negedge pclk);
        vsync = 1'b0;
        repeat (VBLANK) @(negedge pclk);
        for (int y = 0; y < SH; y++) begin
          for (int x = 0; x < SW; x++) begin
            hsync = 1'b1;
            data  = pix(x, y, frame);
            @(negedge pclk);
          end
          hsync = 1'b0;
          data  = '0;
          repeat (HBLANK) @(negedge pclk);
        end
        repeat (VBLANK) @(negedge pclk);
        frame++;
      end
    end
  end
endmodule
