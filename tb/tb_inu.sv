// Self-checking testbench of the initialisation unit with a parameter
// memory and an I2C slave (the sensor's control port). A command list of
// two sensor writes, frame size, nine coefficients, shift, output select,
// an unknown opcode and the end marker is run; afterwards the settings,
// the sensor registers and ic_go must match the list. Then: stop lowers
// ic_go; a second list with a different kernel restarts it; a list with no
// end marker ends at the last memory word.
module tb_inu;
  import ipu_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic we = 0;
  logic [4:0] waddr, pm_raddr;
  logic [WORD_W-1:0] wdata, pm_rdata;
  ipu_cfg_t cfg;
  logic ic_go, init_busy, scl_oe, sda_oe, sda_pull, i2c_nack;
  wire scl = ~scl_oe;
  wire sda = ~(sda_oe | sda_pull);
  int checks = 0, failures = 0;
  int nlist = 0;

  param_module #(.DEPTH(DEPTH), .WORD_W(WORD_W)) pm (.clk, .rst_n, .we, .waddr, .wdata,
    .raddr(pm_raddr), .rdata(pm_rdata));
  inu #(.PM_DEPTH(DEPTH), .I2C_DIV(4)) dut (.clk, .rst_n, .start, .stop, .pm_raddr, .pm_rdata,
    .cfg, .ic_go, .init_busy, .scl_oe, .sda_oe, .sda_i(sda), .i2c_nack);
  i2c_slave_model #(.ADDR(7'h21)) sensor (.scl, .sda, .sda_pull);

  always #5 clk = ~clk;

  task automatic put(logic [7:0] op, logic [15:0] arg);
    @(negedge clk);
    we = 1; waddr = 5'(nlist); wdata = {op, arg};
    @(negedge clk);
    we = 0;
    nlist++;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_list();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(init_busy && !ic_go, "busy during list");
    while (init_busy) @(negedge clk);
  endtask

  coef_t k [9];

  initial begin
    waddr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(cfg.width == XW'(320) && cfg.height == YW'(240) && cfg.coef[4] == 1 && !ic_go,
          "reset settings");
    put(OP_I2C, 16'h10_40);          // exposure
    put(OP_I2C, 16'h11_07);
    put(OP_WIDTH, 16'd100);
    put(OP_HEIGHT, 16'd60);
    for (int i = 0; i < 9; i++) begin
      k[i] = coef_t'($urandom % 2048) - 12'sd1024;
      put(8'(OP_COEF0 + i), 16'(k[i]));
    end
    put(OP_SHIFT, 16'd7);
    put(8'h7e, 16'hffff);            // unknown: skipped
    put(OP_OUTSEL, 16'd2);
    put(OP_END, 16'd0);
    put(OP_WIDTH, 16'd5);            // behind the end marker: never runs
    run_list();
    check(ic_go, "ic_go after list");
    check(cfg.width == XW'(100) && cfg.height == YW'(60), "frame size");
    for (int i = 0; i < 9; i++) check(cfg.coef[i] == k[i], $sformatf("coef %0d", i));
    check(cfg.shift == 4'd7 && cfg.out_sel == SEL_MID, "shift / out_sel");
    check(sensor.regs[8'h10] == 8'h40 && sensor.regs[8'h11] == 8'h07 && sensor.nwrites == 2,
          "sensor registers");
    check(!i2c_nack, "acknowledge");
    @(negedge clk); stop = 1; @(negedge clk); stop = 0;
    check(!ic_go, "stop");
    // a changed list: new kernel centre and output select, run again
    nlist = 4 + 4; put(OP_COEF0 + 4, 16'd3);
    nlist = 15; put(OP_OUTSEL, 16'd3);
    run_list();
    check(ic_go && cfg.coef[4] == 3 && cfg.out_sel == SEL_MIN, "second list");
    // no end marker anywhere: the list ends at the last word
    for (int i = 0; i < DEPTH; i++) begin nlist = i; put(OP_SHIFT, 16'(i % 16)); end
    run_list();
    check(ic_go && cfg.shift == 4'((DEPTH - 1) % 16), "list without end marker");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
