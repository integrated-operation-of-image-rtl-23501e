// System test bench harness for fpga_top (simulation only).
//
// Holds the design with all parameters at their defaults, a CMOS sensor
// model (SW x SH pixels per frame, pixel clock 1/12 of the system clock),
// an external SRAM model and a PC that talks to the parallel port through
// EPP tasks. For each of NRUNS runs the PC writes a command list (sensor
// exposure over I2C, frame size FW x FH, a kernel, shift and output
// selection), sends start, reads image bytes and status while a frame is
// being captured, stops after a frame has been stored, reads the whole
// (FW-2) x (FH-2) object image back and compares it with values computed
// here from the sensor's pixel function. Runs cycle through the
// averaging, Gaussian (1-2-1) and high pass kernels to b, the median,
// maximum and minimum outputs, and the original-plus-high-pass kernel.
// With FRAMES_PER_RUN > 1 and MAX_FRAME_NS set, consecutive stored frames
// must follow each other within MAX_FRAME_NS (frame-rate check); clock
// periods are parameters.
// Mechanisms counted (each must occur): I2C register writes, pixels the
// frame-size comparator dropped, stop requests honoured at a frame end,
// reads that waited for a pixel write, and each output selection.
module fpga_top_harness #(
  parameter int SW = 14,
  parameter int SH = 10,
  parameter int FW = 12,
  parameter int FH = 8,
  parameter int NRUNS = 7,
  parameter int CLK_HALF_PS = 5000,        // system clock half period
  parameter int PCLK_HALF_NS = 60,         // sensor pixel clock half period
  parameter int FRAMES_PER_RUN = 1,        // frames stored before stop
  parameter longint MAX_FRAME_NS = 0,      // if > 0: longest allowed frame interval
  parameter longint WATCHDOG_NS = 64'd50_000_000
) ();
  import ipu_pkg::*;
  localparam int XM_AW = $clog2((MAX_W_DEF - 2) * (MAX_H_DEF - 2));

  logic clk = 0, rst_n = 0, run = 0;
  logic nwrite = 1, ndstrb = 1, nastrb = 1;
  logic [7:0] din = 0, dout;
  logic doe, nwait;
  logic pclk, hsync, vsync, sda_pull, scl_oe, sda_oe, i2c_nack;
  pix_t cam_data, xm_wdata, xm_rdata;
  logic [XM_AW-1:0] xm_addr;
  logic xm_we;
  wire scl = ~scl_oe;
  wire sda = ~(sda_oe | sda_pull);

  fpga_top dut (
    .clk, .rst_n, .epp_nwrite(nwrite), .epp_ndstrb(ndstrb), .epp_nastrb(nastrb),
    .epp_din(din), .epp_dout(dout), .epp_doe(doe), .epp_nwait(nwait),
    .cam_pclk(pclk), .cam_hsync(hsync), .cam_vsync(vsync), .cam_data,
    .scl_oe, .sda_oe, .sda_i(sda),
    .xm_addr, .xm_wdata, .xm_we, .xm_rdata, .i2c_nack);

  cmos_sensor_model #(.SW(SW), .SH(SH), .PCLK_HALF_NS(PCLK_HALF_NS)) sensor (
    .run, .pclk, .hsync, .vsync, .data(cam_data), .scl, .sda, .sda_pull);
  ext_sram_model #(.AW(XM_AW)) xm (.clk, .addr(xm_addr), .wdata(xm_wdata), .we(xm_we),
    .rdata(xm_rdata));

  always #(CLK_HALF_PS * 1ps) clk = ~clk;   // 100 MHz by default

  int checks = 0, failures = 0;
  int sensor_frames = -1, cap_frame = -1;
  int n_dropped = 0, n_wait_write = 0, n_stop = 0;
  int n_mode [4] = '{0, 0, 0, 0};

  realtime last_done = 0, frame_ns = 0;
  int n_rate_ok = 0;

  always @(posedge vsync) sensor_frames++;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ipu.frame_start) cap_frame = sensor_frames;
    if (dut.u_ipu.frame_done) begin
      if (last_done > 0) frame_ns = ($realtime - last_done) / 1ns;
      last_done = $realtime;
    end
    if (dut.u_ipu.u_ic.p_valid && !dut.u_ipu.u_ic.valid) n_dropped++;
    if (dut.u_mmu.u_im.wpend && dut.u_mmu.u_im.rpend) n_wait_write++;
  end

  // ---------------- PC side: EPP host ----------------
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
  task automatic epp_data_read(output logic [7:0] d);
    wait (!nwait); #13;
    nwrite = 1; #7; ndstrb = 0;
    wait (nwait); #11;
    d = dout;
    ndstrb = 1;
    wait (!nwait);
  endtask
  task automatic reg_write(epp_reg_e r, logic [7:0] d);
    epp_addr_write(r); epp_data_write(d);
  endtask
  task automatic reg_read(epp_reg_e r, output logic [7:0] d);
    epp_addr_write(r); epp_data_read(d);
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- the run's settings ----------------
  coef_t       k [9];
  int          shift;
  out_sel_e    sel;
  logic [23:0] list [$];

  task automatic choose(int r);
    case (r % 7)
      0: begin for (int i = 0; i < 9; i++) k[i] = 12'sd114; shift = 10; sel = SEL_CONV; end
      1: begin   // Gaussian 1 2 1 / 2 4 2 / 1 2 1 over 16
        k[0] = 1; k[1] = 2; k[2] = 1; k[3] = 2; k[4] = 4; k[5] = 2; k[6] = 1; k[7] = 2; k[8] = 1;
        shift = 4; sel = SEL_CONV;
      end
      2: begin   // high pass: -1/9 around, 8/9 in the centre
        for (int i = 0; i < 9; i++) k[i] = -12'sd114;
        k[4] = 12'sd910; shift = 10; sel = SEL_CONV;
      end
      3: sel = SEL_MID;
      4: sel = SEL_MAX;
      5: sel = SEL_MIN;
      default: begin   // original plus high pass: -1/9 around, 17/9 in the centre
        for (int i = 0; i < 9; i++) k[i] = -12'sd114;
        k[4] = 12'sd1934; shift = 10; sel = SEL_CONV;
      end
    endcase
    list.delete();
    list.push_back({OP_I2C, 8'h10, 8'(8'h20 + r)});   // exposure register
    list.push_back({OP_WIDTH, 16'(FW)});
    list.push_back({OP_HEIGHT, 16'(FH)});
    for (int i = 0; i < 9; i++) list.push_back({8'(OP_COEF0 + i), 16'(k[i])});
    list.push_back({OP_SHIFT, 16'(shift)});
    list.push_back({OP_OUTSEL, 14'd0, sel});
    list.push_back({OP_END, 16'd0});
  endtask

  function automatic pix_t expected(int x, int y, int f);
    longint acc = 0, s;
    pix_t w [9], t;
    for (int i = 0; i < 9; i++) begin
      w[i] = sensor.pix(x - i % 3, y - i / 3, f);
      acc += longint'(k[i]) * longint'(w[i]);
    end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8 - i; j++)
        if (w[j] < w[j+1]) begin t = w[j]; w[j] = w[j+1]; w[j+1] = t; end
    s = acc >>> shift;
    case (sel)
      SEL_MAX: return w[0];
      SEL_MID: return w[4];
      SEL_MIN: return w[8];
      default: return (s < 0) ? 8'd0 : (s > 255) ? 8'd255 : pix_t'(s);
    endcase
  endfunction

  task automatic one_run(int r);
    logic [7:0] st, b, f0;
    int nerr;
    choose(r);
    reg_write(REG_PM_ADDR, 8'd0);
    epp_addr_write(REG_PM_DATA);
    foreach (list[i]) begin
      epp_data_write(list[i][23:16]); epp_data_write(list[i][15:8]); epp_data_write(list[i][7:0]);
    end
    reg_read(REG_STATUS, f0);
    reg_write(REG_CTRL, 8'h01);                         // system start
    do reg_read(REG_STATUS, st); while (st[1] || !st[0]);
    check(sensor.u_i2c.regs[8'h10] == 8'(8'h20 + r), "sensor exposure register");
    // wait for one stored frame, reading image bytes meanwhile
    do begin
      reg_read(REG_IMG_DATA, b);
      reg_read(REG_STATUS, st);
    end while (st[7:4] != 4'(f0[7:4] + FRAMES_PER_RUN));
    reg_write(REG_CTRL, 8'h02);                         // stop
    if (MAX_FRAME_NS > 0) begin
      check(frame_ns > 0 && frame_ns <= real'(MAX_FRAME_NS),
            $sformatf("frame interval %0.0f ns", frame_ns));
      if (frame_ns > 0 && frame_ns <= real'(MAX_FRAME_NS)) n_rate_ok++;
      $display("run %0d: frames stored %0.3f ms apart", r, frame_ns / 1.0e6);
      last_done = 0;
    end
    do reg_read(REG_STATUS, st); while (st[2]);
    check(!st[0], "ic_go low after stop");
    n_stop++;
    // read the stored object image back
    reg_write(REG_CTRL, 8'h04);
    epp_addr_write(REG_IMG_DATA);
    nerr = 0;
    for (int y = 2; y < FH; y++)
      for (int x = 2; x < FW; x++) begin
        pix_t e;
        epp_data_read(b);
        e = expected(x, y, cap_frame);
        checks++;
        if (b !== e) begin
          failures++;
          if (nerr++ < 5) $display("FAIL run %0d (%0d,%0d) got %0d exp %0d", r, x, y, b, e);
        end
      end
    if (nerr == 0) n_mode[sel]++;
    $display("run %0d: output %s, sensor frame %0d, %0d pixels checked, %0d wrong",
             r, sel.name(), cap_frame, (FW - 2) * (FH - 2), nerr);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    run = 1;
    for (int r = 0; r < NRUNS; r++) one_run(r);
    check(!i2c_nack, "I2C acknowledged");
    $display("mechanisms: i2c writes %0d, comparator drops %0d, stops %0d, reads waiting for a write %0d, modes conv/max/mid/min %0d/%0d/%0d/%0d",
             sensor.u_i2c.nwrites, n_dropped, n_stop, n_wait_write,
             n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    check(sensor.u_i2c.nwrites >= 1, "I2C write happened");
    check(n_dropped > 0, "comparator dropped pixels");
    check(n_stop > 0, "stop happened");
    check(n_wait_write > 0, "arbitration happened");
    if (MAX_FRAME_NS > 0) check(n_rate_ok == NRUNS, "frame rate held in every run");
    if (NRUNS >= 6) for (int m = 0; m < 4; m++) check(n_mode[m] > 0, $sformatf("mode %0d", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(WATCHDOG_NS * 1ns);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
