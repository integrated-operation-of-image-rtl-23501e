// Data transfer unit: the PC's parallel port (IEEE 1284, EPP mode).
//
// The PC reaches a small register file through EPP cycles. An address
// cycle (nAddrStrobe low) selects a register (epp_reg_e in ipu_pkg); data
// cycles (nDataStrobe low) then write or read it:
//   REG_PM_ADDR  write: word pointer into the parameter memory
//   REG_PM_DATA  write: three bytes, most significant first, form one
//                24-bit command word; it is written at the pointer and the
//                pointer advances
//   REG_CTRL     write: bit0 system start (to the INU), bit1 stop
//                capturing, bit2 rewind the image read address
//   REG_STATUS   read: {frames[3:0], 1'b0, ic_busy, init_busy, ic_go}
//   REG_IMG_DATA read: the next byte of the stored object image
// An address read returns the selected register number.
// Handshake (EPP): the host drives nWrite and, for writes, the data, then
// pulls a strobe low; the unit carries the cycle out and raises nWait;
// the host releases the strobe and the unit lowers nWait again. The
// strobes are synchronised with two flip-flops; during a read the unit
// drives epp_dout and raises epp_doe until the strobe is released. An
// image read holds nWait low until the image module has the byte. The
// register map is this design's own.
module dtu
  import ipu_pkg::*;
#(
  parameter int PM_AW = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // EPP port
  input  logic              epp_nwrite,
  input  logic              epp_ndstrb,
  input  logic              epp_nastrb,
  input  logic [7:0]        epp_din,
  output logic [7:0]        epp_dout,
  output logic              epp_doe,
  output logic              epp_nwait,
  // parameter module
  output logic              pm_we,
  output logic [PM_AW-1:0]  pm_waddr,
  output logic [WORD_W-1:0] pm_wdata,
  // initialisation unit
  output logic              sys_start,
  output logic              sys_stop,
  // image module
  output logic              img_rewind,
  output logic              img_rd_req,
  input  logic              img_rd_ack,
  input  pix_t              img_rd_data,
  // status
  input  logic              ic_go,
  input  logic              init_busy,
  input  logic              ic_busy,
  input  logic [7:0]        frames
);
  typedef enum logic [1:0] {E_IDLE, E_MEM, E_ACK} estate_e;
  estate_e state;

  logic [1:0] ds_s, as_s;
  logic [1:0] wr_s;
  logic [7:0] din_s [2];
  logic       ds_low, as_low, is_write;
  logic [7:0] reg_sel;
  logic [1:0] bcnt;
  logic [15:0] wbytes;

  assign ds_low   = ~ds_s[1];
  assign as_low   = ~as_s[1];
  assign is_write = ~wr_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds_s <= '1; as_s <= '1; wr_s <= '1;
      din_s[0] <= '0; din_s[1] <= '0;
    end else begin
      ds_s <= {ds_s[0], epp_ndstrb};
      as_s <= {as_s[0], epp_nastrb};
      wr_s <= {wr_s[0], epp_nwrite};
      din_s[0] <= epp_din;
      din_s[1] <= din_s[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= E_IDLE; epp_nwait <= 1'b0; epp_doe <= 1'b0; epp_dout <= '0;
      reg_sel <= '0; bcnt <= '0; wbytes <= '0;
      pm_we <= 1'b0; pm_waddr <= '0; pm_wdata <= '0;
      sys_start <= 1'b0; sys_stop <= 1'b0; img_rewind <= 1'b0; img_rd_req <= 1'b0;
    end else begin
      pm_we <= 1'b0; sys_start <= 1'b0; sys_stop <= 1'b0;
      img_rewind <= 1'b0; img_rd_req <= 1'b0;
      if (pm_we) pm_waddr <= pm_waddr + 1'b1;   // pointer follows each word
      unique case (state)
        E_IDLE: begin
          epp_nwait <= 1'b0;
          epp_doe   <= 1'b0;
          if (as_low) begin                       // address cycle
            if (is_write) reg_sel <= din_s[1];
            else begin epp_dout <= reg_sel; epp_doe <= 1'b1; end
            state <= E_ACK;
          end else if (ds_low) begin              // data cycle
            state <= E_ACK;
            if (is_write) begin
              unique case (reg_sel)
                REG_PM_ADDR: begin
                  pm_waddr <= din_s[1][PM_AW-1:0];
                  bcnt     <= '0;
                end
                REG_PM_DATA: begin
                  if (bcnt == 2'd2) begin
                    pm_we    <= 1'b1;
                    pm_wdata <= {wbytes, din_s[1]};
                    bcnt     <= '0;
                  end else begin
                    wbytes <= {wbytes[7:0], din_s[1]};
                    bcnt   <= bcnt + 2'd1;
                  end
                end
                REG_CTRL: begin
                  sys_start  <= din_s[1][0];
                  sys_stop   <= din_s[1][1];
                  img_rewind <= din_s[1][2];
                end
                default: ;
              endcase
            end else begin
              epp_doe <= 1'b1;
              unique case (reg_sel)
                REG_STATUS:   epp_dout <= {frames[3:0], 1'b0, ic_busy, init_busy, ic_go};
                REG_IMG_DATA: begin
                  epp_doe    <= 1'b0;
                  img_rd_req <= 1'b1;
                  state      <= E_MEM;
                end
                default:      epp_dout <= '0;
              endcase
            end
          end
        end
        E_MEM: if (img_rd_ack) begin
          epp_dout <= img_rd_data;
          epp_doe  <= 1'b1;
          state    <= E_ACK;
        end
        E_ACK: begin
          epp_nwait <= 1'b1;
          if (!ds_low && !as_low) begin
            epp_nwait <= 1'b0;
            epp_doe   <= 1'b0;
            state     <= E_IDLE;
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end
endmodule
