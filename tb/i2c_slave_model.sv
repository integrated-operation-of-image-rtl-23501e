// Behavioural model of an I2C register-write slave (the sensor's control
// port), for simulation only. It watches open-drain lines scl/sda, answers
// its own device address and each following byte with an acknowledge
// (pulls sda through sda_pull), and after a STOP records the last write
// as {register, value}: nwrites counts them, regs[] holds the values.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h21
) (
  input  logic scl,
  input  logic sda,
  output logic sda_pull
);
  logic [7:0] regs [256];
  int         nwrites = 0;
  logic [7:0] last_reg, last_val;

  logic [7:0] sh;
  int         nbits, nbytes;
  logic       active, selected;
  logic [7:0] bytes [3];

  initial begin
    sda_pull = 1'b0; active = 1'b0; selected = 1'b0;
    nbits = 0; nbytes = 0; sh = '0;
    for (int i = 0; i < 256; i++) regs[i] = '0;
  end

  // START and STOP: sda changes while scl is high
  always @(negedge sda) if (scl) begin
    active = 1'b1; selected = 1'b0; nbits = 0; nbytes = 0;
  end
  always @(posedge sda) if (scl && active) begin
    active = 1'b0;
    if (selected && nbytes == 3) begin
      last_reg = bytes[1]; last_val = bytes[2];
      regs[bytes[1]] = bytes[2];
      nwrites++;
    end
  end

  always @(posedge scl) if (active) begin
    if (nbits < 8) begin
      sh = {sh[6:0], sda};
      nbits++;
    end
  end

  always @(negedge scl) if (active) begin
    if (nbits == 8) begin
      // byte complete: decide on acknowledge for the 9th clock
      if (nbytes == 0) selected = (sh[7:1] == ADDR) && !sh[0];
      if (nbytes < 3) bytes[nbytes] = sh;
      nbytes++;
      sda_pull = selected;
      nbits = 9;
    end else if (nbits == 9) begin
      sda_pull = 1'b0;
      nbits = 0;
    end
  end
endmodule
