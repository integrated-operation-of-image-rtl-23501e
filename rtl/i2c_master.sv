// I2C bus master for sensor register writes.
//
// On `start` it sends one write transfer: START, device address with the
// write bit, register address, value, STOP; each byte is followed by an
// acknowledge slot in which the slave must pull SDA low (a missing
// acknowledge sets nack for this transfer; the transfer still runs to its
// STOP). Both lines are open-drain: scl_oe / sda_oe high pulls the line
// low, low releases it to the pull-up. Every bit slot takes four phases of
// DIV system clock cycles (SCL low with data set up, SCL high, SCL high
// with the acknowledge sampled at its end, SCL low), so SCL runs at
// clk / (4*DIV); DIV = 144 gives 100 kHz from a 57.8 MHz clock. done
// pulses for one cycle when the STOP has been sent. Clock stretching and
// reads are not supported: only register writes are needed here.
module i2c_master #(
  parameter int DIV = 144
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [6:0] dev_addr,
  input  logic [7:0] reg_addr,
  input  logic [7:0] wdata,
  output logic       busy,
  output logic       done,
  output logic       nack,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       sda_i
);
  localparam int CW = $clog2(DIV + 1);
  localparam int NBITS = 27;              // 3 x (8 data + 1 acknowledge)
  localparam int SLOT_STOP = NBITS + 1;   // slot 0 = START, 1..27 bits

  logic [CW-1:0]    cnt;
  logic [1:0]       phase;
  logic [4:0]       slot;
  logic [NBITS-1:0] sr;     // bits to send, MSB first; 1 in acknowledge slots
  logic [NBITS-1:0] ackm;   // marks the acknowledge slots
  logic             scl, sda;

  assign ackm = 27'b000000001_000000001_000000001;
  assign scl_oe = ~scl;
  assign sda_oe = ~sda;

  always_comb begin
    scl = 1'b1;
    sda = 1'b1;
    if (busy) begin
      if (slot == 5'd0) begin                       // START
        sda = (phase == 2'd0);
        scl = (phase != 2'd3);
      end else if (slot == 5'(SLOT_STOP)) begin     // STOP
        scl = (phase != 2'd0);
        sda = (phase >= 2'd2);
      end else begin                                // data or acknowledge
        scl = (phase == 2'd1) || (phase == 2'd2);
        sda = sr[NBITS-1];
      end
    end
  end

  logic is_ack;
  assign is_ack = ackm[5'(NBITS) - slot];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; nack <= 1'b0;
      cnt <= '0; phase <= '0; slot <= '0; sr <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          nack  <= 1'b0;
          cnt   <= '0; phase <= '0; slot <= '0;
          sr    <= {dev_addr, 1'b0, 1'b1, reg_addr, 1'b1, wdata, 1'b1};
        end
      end else if (cnt != CW'(DIV - 1)) begin
        cnt <= cnt + 1'b1;
      end else begin
        cnt <= '0;
        if (phase == 2'd2 && slot != 5'd0 && slot != 5'(SLOT_STOP) && is_ack && sda_i)
          nack <= 1'b1;
        phase <= phase + 2'd1;
        if (phase == 2'd3) begin
          if (slot == 5'(SLOT_STOP)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            if (slot != 5'd0) sr <= {sr[NBITS-2:0], 1'b1};
            slot <= slot + 5'd1;
          end
        end
      end
    end
  end
endmodule
