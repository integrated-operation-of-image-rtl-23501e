// Shared types and constants of the image capture and processing system.
//
// Pixels are 8-bit unsigned grey levels (all buses between the image
// processing blocks are 8 bits wide). Convolution coefficients are signed
// fixed-point numbers: the 3x3 kernel holds nine COEF_W-bit signed integers
// and the sum of products is shifted right by a programmable amount, so a
// coefficient of 1/9 is written as round(2^shift / 9).
//
// The nine coefficients are numbered 0..8 in the order the single
// multiplier visits them, which is also the order of the window taps in the
// pixel delay line: tap 0 is the newest pixel o(x,y), tap 1 is o(x-1,y),
// tap 2 is o(x-2,y), tap 3 is o(x,y-1) and so on up to tap 8 = o(x-2,y-2).
// With the window centre at (m,n) = (x-1,y-1), tap k carries coefficient
// f(i,j) with i = 1 - k%3 (horizontal offset) and j = 1 - k/3 (vertical
// offset), i.e. the order f(1,1), f(0,1), f(-1,1), f(1,0) ... f(-1,-1).
//
// The parameter memory holds 24-bit command words {opcode, operand}: the
// command set below is this design's own encoding.
package ipu_pkg;

  localparam int PIX_W   = 8;   // pixel width
  localparam int COEF_W  = 12;  // signed coefficient width
  localparam int SHIFT_W = 4;   // width of the coefficient fraction shift
  localparam int ACC_W   = 24;  // signed accumulator width (8+12+4 guard bits)
  localparam int NTAPS   = 9;   // 3x3 window

  localparam int MAX_W_DEF = 320;  // largest frame width (main configuration: 320x240)
  localparam int MAX_H_DEF = 240;  // largest frame height
  localparam int XW = 10;          // width of column counters / frame width
  localparam int YW = 9;           // width of line counters / frame height

  typedef logic [PIX_W-1:0]          pix_t;
  typedef logic signed [COEF_W-1:0]  coef_t;

  // Output selection of the IPU output multiplexer.
  typedef enum logic [1:0] {
    SEL_CONV = 2'd0,  // object image b of the convolver
    SEL_MAX  = 2'd1,  // maximum filter
    SEL_MID  = 2'd2,  // median filter
    SEL_MIN  = 2'd3   // minimum filter
  } out_sel_e;

  // Settings the INU hands to the IPU.
  typedef struct packed {
    logic [XW-1:0]      width;    // frame width in pixels (4..MAX_W)
    logic [YW-1:0]      height;   // frame height in lines (3..MAX_H)
    coef_t [NTAPS-1:0]  coef;     // kernel, index = tap number
    logic [SHIFT_W-1:0] shift;    // right shift applied to the sum
    out_sel_e           out_sel;  // which result goes to memory
  } ipu_cfg_t;

  // Parameter memory command words.
  localparam int WORD_W = 24;
  typedef enum logic [7:0] {
    OP_END    = 8'h00,  // end of list: initialisation done, start capturing
    OP_I2C    = 8'h01,  // operand = {sensor register, value}: I2C write
    OP_WIDTH  = 8'h02,  // operand = frame width
    OP_HEIGHT = 8'h03,  // operand = frame height
    OP_SHIFT  = 8'h04,  // operand = coefficient fraction shift
    OP_OUTSEL = 8'h05,  // operand = output select (out_sel_e)
    OP_COEF0  = 8'h10   // 0x10+k: operand = coefficient of tap k, k = 0..8
  } opcode_e;

  // Registers of the parallel-port (EPP) interface, selected by an EPP
  // address cycle.
  typedef enum logic [7:0] {
    REG_PM_ADDR  = 8'h00,  // W: parameter memory word pointer
    REG_PM_DATA  = 8'h01,  // W: three bytes, MSB first, make one word
    REG_CTRL     = 8'h02,  // W: bit0 start, bit1 stop, bit2 rewind image read
    REG_STATUS   = 8'h03,  // R: {frames[3:0], 1'b0, ic_busy, init_busy, ic_go}
    REG_IMG_DATA = 8'h04   // R: next byte of the stored object image
  } epp_reg_e;

endpackage
