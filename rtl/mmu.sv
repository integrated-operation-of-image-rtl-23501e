// Memory management unit: the parameter module (internal memory of
// initialisation commands, written from the PC through the data transfer
// unit and read by the initialisation unit) and the image module (object
// image storage in external memory and its read-out to the PC). The two
// modules share no state; this wrapper only groups their ports.
module mmu
  import ipu_pkg::*;
#(
  parameter int PM_DEPTH = 64,
  parameter int PM_AW    = $clog2(PM_DEPTH),
  parameter int XM_AW    = 17
) (
  input  logic              clk,
  input  logic              rst_n,
  // parameter module
  input  logic              pm_we,
  input  logic [PM_AW-1:0]  pm_waddr,
  input  logic [WORD_W-1:0] pm_wdata,
  input  logic [PM_AW-1:0]  pm_raddr,
  output logic [WORD_W-1:0] pm_rdata,
  // image module
  input  logic              frame_start,
  input  logic              frame_done,
  input  logic              proc_valid,
  input  pix_t              proc_data,
  input  logic              rd_rewind,
  input  logic              rd_req,
  output logic              rd_ack,
  output pix_t              rd_data,
  output logic [7:0]        frames,
  output logic [XM_AW-1:0]  xm_addr,
  output pix_t              xm_wdata,
  output logic              xm_we,
  input  pix_t              xm_rdata
);
  param_module #(.DEPTH(PM_DEPTH), .WORD_W(WORD_W)) u_pm (
    .clk, .rst_n, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .raddr(pm_raddr), .rdata(pm_rdata));

  image_module #(.AW(XM_AW)) u_im (
    .clk, .rst_n, .frame_start, .frame_done, .proc_valid, .proc_data,
    .rd_rewind, .rd_req, .rd_ack, .rd_data, .frames,
    .xm_addr, .xm_wdata, .xm_we, .xm_rdata);
endmodule
