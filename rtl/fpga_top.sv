// FPGA integrated image capturing and processing system.
//
// Four units on one chip:
//   DTU  data transfer unit, the PC's parallel port (EPP): the PC loads
//        initialisation commands, sends system start and reads the
//        processed image back;
//   INU  initialisation unit: on start it runs the command list in the
//        parameter memory, sets the sensor up over I2C, hands frame size,
//        kernel and filter choice to the IPU and raises ic_go;
//   MMU  memory management unit: parameter module (command memory) and
//        image module (object image in external memory);
//   IPU  image processing unit: capture, 3x3 convolution and 3x3 2-D sort
//        as a three-stage pipeline, with a multiplexer choosing the
//        convolution, maximum, median or minimum result.
// Off chip: the PC, the CMOS image sensor (pixel bus, pclk, hsync, vsync,
// I2C) and the external image memory (synchronous SRAM, one access per
// cycle, read data one cycle after the address). The frame size is set
// at run time, up to MAX_W x MAX_H (320 x 240); a frame of W x H sensor
// pixels leaves (W-2) x (H-2) processed pixels in external memory from
// address 0. Sensor pixels must be at least nine system clock cycles
// apart (the original board ran at up to 57.8 MHz; 20 frames of
// 320 x 240 per second need about one pixel every 37 cycles).
module fpga_top
  import ipu_pkg::*;
#(
  parameter int MAX_W    = MAX_W_DEF,
  parameter int MAX_H    = MAX_H_DEF,
  parameter int PM_DEPTH = 64,
  parameter int I2C_DIV  = 144,
  parameter int XM_AW    = $clog2((MAX_W - 2) * (MAX_H - 2))
) (
  input  logic             clk,
  input  logic             rst_n,
  // parallel port (IEEE 1284 EPP) to the PC
  input  logic             epp_nwrite,
  input  logic             epp_ndstrb,
  input  logic             epp_nastrb,
  input  logic [7:0]       epp_din,
  output logic [7:0]       epp_dout,
  output logic             epp_doe,
  output logic             epp_nwait,
  // CMOS image sensor
  input  logic             cam_pclk,
  input  logic             cam_hsync,
  input  logic             cam_vsync,
  input  pix_t             cam_data,
  output logic             scl_oe,
  output logic             sda_oe,
  input  logic             sda_i,
  // external image memory
  output logic [XM_AW-1:0] xm_addr,
  output pix_t             xm_wdata,
  output logic             xm_we,
  input  pix_t             xm_rdata,
  // status
  output logic             i2c_nack
);
  localparam int PM_AW = $clog2(PM_DEPTH);

  logic              pm_we;
  logic [PM_AW-1:0]  pm_waddr, pm_raddr;
  logic [WORD_W-1:0] pm_wdata, pm_rdata;
  logic              sys_start, sys_stop, img_rewind, img_rd_req, img_rd_ack;
  pix_t              img_rd_data;
  logic [7:0]        frames;
  ipu_cfg_t          cfg;
  logic              ic_go, ic_busy, init_busy;
  logic              frame_start, frame_done, proc_valid;
  pix_t              proc_data;

  dtu #(.PM_AW(PM_AW)) u_dtu (
    .clk, .rst_n, .epp_nwrite, .epp_ndstrb, .epp_nastrb, .epp_din,
    .epp_dout, .epp_doe, .epp_nwait,
    .pm_we, .pm_waddr, .pm_wdata, .sys_start, .sys_stop,
    .img_rewind, .img_rd_req, .img_rd_ack, .img_rd_data,
    .ic_go, .init_busy, .ic_busy, .frames);

  inu #(.PM_DEPTH(PM_DEPTH), .I2C_DIV(I2C_DIV)) u_inu (
    .clk, .rst_n, .start(sys_start), .stop(sys_stop),
    .pm_raddr, .pm_rdata, .cfg, .ic_go, .init_busy,
    .scl_oe, .sda_oe, .sda_i, .i2c_nack);

  mmu #(.PM_DEPTH(PM_DEPTH), .XM_AW(XM_AW)) u_mmu (
    .clk, .rst_n, .pm_we, .pm_waddr, .pm_wdata, .pm_raddr, .pm_rdata,
    .frame_start, .frame_done, .proc_valid, .proc_data,
    .rd_rewind(img_rewind), .rd_req(img_rd_req), .rd_ack(img_rd_ack),
    .rd_data(img_rd_data), .frames,
    .xm_addr, .xm_wdata, .xm_we, .xm_rdata);

  ipu #(.MAX_W(MAX_W)) u_ipu (
    .clk, .rst_n, .cam_pclk, .cam_hsync, .cam_vsync, .cam_data,
    .cfg, .ic_go, .ic_busy, .frame_start, .frame_done, .proc_valid, .proc_data);
endmodule
