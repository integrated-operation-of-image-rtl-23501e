// Self-checking testbench of the data transfer unit, driven by an EPP
// host written here as tasks. Checks: command words written byte by byte
// reach the parameter memory port at consecutive addresses; the control
// register produces the start, stop and rewind pulses; the status
// register and an address read return the right bytes; image reads
// return the bytes the image module supplies, in order, with the host
// held off (nWait low) until each byte is there.
module tb_dtu;
  import ipu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic nwrite = 1, ndstrb = 1, nastrb = 1;
  logic [7:0] din = 0, dout;
  logic doe, nwait;
  logic pm_we;
  logic [5:0] pm_waddr;
  logic [WORD_W-1:0] pm_wdata;
  logic sys_start, sys_stop, img_rewind, img_rd_req, img_rd_ack = 0;
  pix_t img_rd_data = 0;
  logic ic_go = 0, init_busy = 0, ic_busy = 0;
  logic [7:0] frames = 0;
  int checks = 0, failures = 0;
  int nstart = 0, nstop = 0, nrewind = 0, rd_ptr = 0;
  logic [WORD_W-1:0] pm_model [64];
  pix_t img [64];

  dtu #(.PM_AW(6)) dut (.clk, .rst_n, .epp_nwrite(nwrite), .epp_ndstrb(ndstrb),
    .epp_nastrb(nastrb), .epp_din(din), .epp_dout(dout), .epp_doe(doe), .epp_nwait(nwait),
    .pm_we, .pm_waddr, .pm_wdata, .sys_start, .sys_stop, .img_rewind, .img_rd_req,
    .img_rd_ack, .img_rd_data, .ic_go, .init_busy, .ic_busy, .frames);

  always #5 clk = ~clk;

  // parameter memory and image module stand-ins
  always @(posedge clk) if (rst_n) begin
    if (pm_we) pm_model[pm_waddr] <= pm_wdata;
    if (sys_start) nstart++;
    if (sys_stop) nstop++;
    if (img_rewind) begin nrewind++; rd_ptr = 0; end
  end
  initial forever begin
    @(posedge clk);
    if (img_rd_req) begin
      repeat (5) @(posedge clk);     // a slow memory
      img_rd_ack <= 1; img_rd_data <= img[rd_ptr]; rd_ptr++;
      @(posedge clk);
      img_rd_ack <= 0;
    end
  end

  // EPP host
  task automatic epp_addr_write(logic [7:0] a);
    wait (!nwait); #13;
    nwrite = 0; din = a; #7; nastrb = 0;
    wait (nwait); #11;
    nastrb = 1; #5; nwrite = 1;
    wait (!nwait);
  endtask
  task automatic epp_data_write(logic [7:0] d);
    wait (!nwait); #13;
    nwrite = 0; din = d; #7; ndstrb = 0;
    wait (nwait); #11;
    ndstrb = 1; #5; nwrite = 1;
    wait (!nwait);
  endtask
  task automatic epp_read(bit addr_cycle, output logic [7:0] d);
    wait (!nwait); #13;
    nwrite = 1; #7;
    if (addr_cycle) nastrb = 0; else ndstrb = 0;
    wait (nwait); #11;
    checks++;
    if (!doe) begin failures++; $display("FAIL bus not driven during read"); end
    d = dout;
    nastrb = 1; ndstrb = 1;
    wait (!nwait);
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] d;
    logic [WORD_W-1:0] w [10];
    for (int i = 0; i < 64; i++) begin pm_model[i] = '0; img[i] = pix_t'($urandom); end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ten command words from word 20
    epp_addr_write(REG_PM_ADDR); epp_data_write(8'd20);
    epp_addr_write(REG_PM_DATA);
    for (int i = 0; i < 10; i++) begin
      w[i] = WORD_W'($urandom);
      epp_data_write(w[i][23:16]); epp_data_write(w[i][15:8]); epp_data_write(w[i][7:0]);
    end
    repeat (3) @(negedge clk);
    for (int i = 0; i < 10; i++) check(pm_model[20 + i] == w[i], $sformatf("pm word %0d", 20 + i));
    check(pm_model[19] == 0 && pm_model[30] == 0, "no stray words");
    // address read gives the selected register
    epp_read(1, d); check(d == REG_PM_DATA, "address read");
    // control pulses
    epp_addr_write(REG_CTRL);
    epp_data_write(8'h01); epp_data_write(8'h02); epp_data_write(8'h05);
    repeat (3) @(negedge clk);
    check(nstart == 2 && nstop == 1 && nrewind == 1,
          $sformatf("control pulses %0d %0d %0d", nstart, nstop, nrewind));
    // status
    ic_go = 1; ic_busy = 1; init_busy = 0; frames = 8'h23;
    epp_addr_write(REG_STATUS); epp_read(0, d);
    check(d == 8'h35, $sformatf("status %h", d));
    // image bytes through the slow memory
    epp_addr_write(REG_IMG_DATA);
    for (int i = 0; i < 40; i++) begin
      epp_read(0, d);
      check(d == img[i], $sformatf("image byte %0d", i));
    end
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
