// Self-checking testbench of the I2C master with a slave model on
// open-drain lines. Random register writes must arrive at the slave with
// no acknowledge error; a write to an absent device address must report
// nack. The transfer time must be 29 bit slots of 4*DIV cycles, and SCL
// must run at clk/(4*DIV) while data bits are sent.
module tb_i2c_master;
  localparam int DIV = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [6:0] dev_addr;
  logic [7:0] reg_addr, wdata;
  logic busy, done, nack, scl_oe, sda_oe, sda_pull;
  wire scl = ~scl_oe;
  wire sda = ~(sda_oe | sda_pull);
  int checks = 0, failures = 0;

  i2c_master #(.DIV(DIV)) dut (.clk, .rst_n, .start, .dev_addr, .reg_addr, .wdata,
    .busy, .done, .nack, .scl_oe, .sda_oe, .sda_i(sda));
  i2c_slave_model #(.ADDR(7'h21)) slave (.scl, .sda, .sda_pull);

  always #5 clk = ~clk;

  task automatic xfer(logic [6:0] dev, logic [7:0] r, logic [7:0] v, bit expect_ack);
    int n0, cyc;
    n0 = slave.nwrites;
    @(negedge clk);
    dev_addr = dev; reg_addr = r; wdata = v; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 29 * 4 * DIV + 1) begin failures++; $display("FAIL transfer took %0d cycles", cyc); end
    repeat (3) @(negedge clk);
    checks++;
    if (expect_ack) begin
      if (nack || slave.nwrites != n0 + 1 || slave.regs[r] !== v) begin
        failures++; $display("FAIL write %h=%h not received", r, v);
      end
    end else if (!nack || slave.nwrites != n0) begin
      failures++; $display("FAIL missing nack");
    end
  endtask

  initial begin
    dev_addr = 0; reg_addr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (!scl || !sda || busy) begin failures++; $display("FAIL bus not idle"); end
    xfer(7'h21, 8'h10, 8'h5a, 1);   // e.g. an exposure register
    for (int i = 0; i < 20; i++) xfer(7'h21, 8'($urandom), 8'($urandom), 1);
    xfer(7'h30, 8'h01, 8'h02, 0);
    xfer(7'h21, 8'h11, 8'ha5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SCL period while busy: rising edges 4*DIV cycles apart inside a transfer
  int last_rise = -1, cyc_cnt = 0;
  logic scl_q = 1;
  always @(posedge clk) begin
    cyc_cnt++;
    if (scl && !scl_q && busy) begin
      if (last_rise >= 0 && cyc_cnt - last_rise != 4 * DIV && cyc_cnt - last_rise < 8 * DIV) begin
        failures++; $display("FAIL SCL period %0d", cyc_cnt - last_rise);
      end
      last_rise = cyc_cnt;
    end
    if (!busy) last_rise = -1;
    scl_q <= scl;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
