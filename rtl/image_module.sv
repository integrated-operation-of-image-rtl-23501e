// Image module: address counter and data arbitrator between the image
// processing unit, the data transfer unit and the external image memory.
//
// Write side: frame_start rewinds the write address counter; every
// processed pixel (proc_valid) is stored at the next address, so a frame
// of (width-2) x (height-2) object pixels lies in raster order from
// address 0. frame_done counts stored frames (frames, wraps).
// Read side: rd_rewind sets the read address counter to 0; each rd_req
// fetches the byte at the read address, returns it with a one-cycle
// rd_ack pulse and advances the address.
// Arbitration: the external memory has one port. A pending pixel write
// always goes first; a read is issued only in a cycle without a write.
// Pixels arrive at most once every nine cycles and a read takes the port
// for one cycle, so no write waits more than one cycle and none is lost.
// External memory: synchronous, one access per cycle, write when xm_we,
// read data on xm_rdata one cycle after the address. The memory outputs
// are registered.
module image_module #(
  parameter int AW = 17
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the IPU
  input  logic          frame_start,
  input  logic          frame_done,
  input  logic          proc_valid,
  input  logic [7:0]    proc_data,
  // to / from the DTU
  input  logic          rd_rewind,
  input  logic          rd_req,
  output logic          rd_ack,
  output logic [7:0]    rd_data,
  output logic [7:0]    frames,
  // external memory
  output logic [AW-1:0] xm_addr,
  output logic [7:0]    xm_wdata,
  output logic          xm_we,
  input  logic [7:0]    xm_rdata
);
  logic [AW-1:0] waddr, raddr;
  logic          wpend, rpend;
  logic [7:0]    wbuf;
  logic [1:0]    rphase;   // read in flight: 1 = address out, 2 = data in

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr <= '0; raddr <= '0; wpend <= 1'b0; rpend <= 1'b0; wbuf <= '0;
      rphase <= '0; rd_ack <= 1'b0; rd_data <= '0; frames <= '0;
      xm_addr <= '0; xm_wdata <= '0; xm_we <= 1'b0;
    end else begin
      rd_ack <= 1'b0;
      xm_we  <= 1'b0;
      if (frame_done) frames <= frames + 8'd1;
      if (rd_rewind)  raddr  <= '0;
      if (rd_req)     rpend  <= 1'b1;
      if (frame_start) waddr <= '0;
      if (proc_valid) begin
        wpend <= 1'b1;
        wbuf  <= proc_data;
      end

      // read data returns
      if (rphase == 2'd1) rphase <= 2'd2;
      if (rphase == 2'd2) begin
        rphase  <= 2'd0;
        rd_ack  <= 1'b1;
        rd_data <= xm_rdata;
      end

      // arbitration: the pending write first, otherwise a read
      if (wpend && !frame_start) begin
        xm_we    <= 1'b1;
        xm_addr  <= waddr;
        xm_wdata <= wbuf;
        waddr    <= waddr + 1'b1;
        wpend    <= proc_valid;   // a new pixel in the same cycle stays pending
      end else if (rpend && rphase == 2'd0 && !rd_rewind) begin
        xm_addr <= raddr;
        raddr   <= raddr + 1'b1;
        rpend   <= 1'b0;
        rphase  <= 2'd1;
      end
    end
  end
endmodule
