// Initialisation unit.
//
// When the PC sends `start`, the address generator walks the parameter
// memory from word 0; the command decoder splits each word into an opcode
// (bits 23:16) and an operand (bits 15:0); the state machine and command
// generator carry the command out:
//   OP_I2C              write operand[7:0] to sensor register operand[15:8]
//                       over I2C (device address SENSOR_ADDR), wait for it
//   OP_WIDTH/OP_HEIGHT  frame size for image capturing
//   OP_COEF0+k          convolution coefficient of tap k
//   OP_SHIFT            coefficient fraction shift
//   OP_OUTSEL           which filter result is stored (b, Max, Mid, Min)
//   OP_END              end of list: raise ic_go to start capturing
// Unknown opcodes are skipped; running off the end of the memory acts as
// OP_END. ic_go is low while the list runs and stays high afterwards until
// `stop` or the next `start`. The unit reads one word every two cycles;
// an I2C command holds it until the transfer is done. After reset the
// settings are a 320 x 240 frame, the identity kernel and output b.
// The opcode set and word layout are this design's own; the published
// architecture gives the three parts of the unit and what they set up.
module inu
  import ipu_pkg::*;
#(
  parameter int PM_DEPTH    = 64,
  parameter int PM_AW       = $clog2(PM_DEPTH),
  parameter int I2C_DIV     = 144,
  parameter logic [6:0] SENSOR_ADDR = 7'h21
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              stop,
  // parameter memory
  output logic [PM_AW-1:0]  pm_raddr,
  input  logic [WORD_W-1:0] pm_rdata,
  // to the IPU
  output ipu_cfg_t          cfg,
  output logic              ic_go,
  output logic              init_busy,
  // I2C to the sensor
  output logic              scl_oe,
  output logic              sda_oe,
  input  logic              sda_i,
  output logic              i2c_nack
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_DECODE, S_I2C, S_NEXT} state_e;
  state_e state;

  logic [PM_AW-1:0] addr;
  assign pm_raddr  = addr;
  assign init_busy = (state != S_IDLE);

  // command decoder
  logic [7:0]  op;
  logic [15:0] operand;
  assign op      = pm_rdata[23:16];
  assign operand = pm_rdata[15:0];

  logic       i2c_start, i2c_busy, i2c_done, i2c_nack_x;
  logic [7:0] i2c_reg, i2c_val;

  i2c_master #(.DIV(I2C_DIV)) u_i2c (
    .clk, .rst_n, .start(i2c_start), .dev_addr(SENSOR_ADDR),
    .reg_addr(i2c_reg), .wdata(i2c_val), .busy(i2c_busy), .done(i2c_done),
    .nack(i2c_nack_x), .scl_oe, .sda_oe, .sda_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; addr <= '0; ic_go <= 1'b0;
      i2c_start <= 1'b0; i2c_reg <= '0; i2c_val <= '0; i2c_nack <= 1'b0;
      cfg.width   <= XW'(MAX_W_DEF);
      cfg.height  <= YW'(MAX_H_DEF);
      cfg.coef    <= '0;
      cfg.coef[4] <= COEF_W'(1);
      cfg.shift   <= '0;
      cfg.out_sel <= SEL_CONV;
    end else begin
      i2c_start <= 1'b0;
      if (stop) ic_go <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ic_go <= 1'b0;
          addr  <= '0;
          state <= S_FETCH;
        end
        S_FETCH: state <= S_DECODE;       // memory read latency
        S_DECODE: begin
          state <= S_NEXT;
          if (op == OP_END) begin
            ic_go <= 1'b1;
            state <= S_IDLE;
          end else if (op == OP_I2C) begin
            i2c_reg   <= operand[15:8];
            i2c_val   <= operand[7:0];
            i2c_start <= 1'b1;
            state     <= S_I2C;
          end else if (op == OP_WIDTH)  cfg.width   <= operand[XW-1:0];
          else if (op == OP_HEIGHT)     cfg.height  <= operand[YW-1:0];
          else if (op == OP_SHIFT)      cfg.shift   <= operand[SHIFT_W-1:0];
          else if (op == OP_OUTSEL)     cfg.out_sel <= out_sel_e'(operand[1:0]);
          else if (op >= OP_COEF0 && op < 8'(OP_COEF0 + NTAPS))
            cfg.coef[op[3:0]] <= operand[COEF_W-1:0];
        end
        S_I2C: if (i2c_done) begin
          if (i2c_nack_x) i2c_nack <= 1'b1;
          state <= S_NEXT;
        end
        S_NEXT: begin
          if (addr == PM_AW'(PM_DEPTH - 1)) begin
            ic_go <= 1'b1;
            state <= S_IDLE;
          end else begin
            addr  <= addr + 1'b1;
            state <= S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
