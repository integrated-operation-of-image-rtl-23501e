// Self-checking testbench of the image module with an external SRAM
// model. Pixels arrive every 9 to 12 cycles while the testbench issues
// reads as fast as the module acknowledges them, so the arbitrator must
// interleave both without losing a write. Checks: every pixel is stored
// at its raster address from 0; frame_start rewinds the write address;
// reads return the stored bytes in order after a rewind; frames counts
// frame_done; a read is acknowledged within a few cycles even while
// pixels are being written.
module tb_image_module;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  logic frame_start = 0, frame_done = 0, proc_valid = 0;
  logic [7:0] proc_data;
  logic rd_rewind = 0, rd_req = 0, rd_ack;
  logic [7:0] rd_data, frames, xm_wdata, xm_rdata;
  logic [AW-1:0] xm_addr;
  logic xm_we;
  int checks = 0, failures = 0;
  logic [7:0] img [2][600];
  int nreads = 0, conflicts = 0;

  image_module #(.AW(AW)) dut (.clk, .rst_n, .frame_start, .frame_done, .proc_valid,
    .proc_data, .rd_rewind, .rd_req, .rd_ack, .rd_data, .frames,
    .xm_addr, .xm_wdata, .xm_we, .xm_rdata);
  ext_sram_model #(.AW(AW)) xm (.clk, .addr(xm_addr), .wdata(xm_wdata), .we(xm_we), .rdata(xm_rdata));

  always #5 clk = ~clk;

  // count cycles where a read waited for a write (arbitration happened)
  always @(negedge clk) if (dut.wpend && dut.rpend) conflicts++;

  task automatic write_frame(int f, int n);
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int i = 0; i < n; i++) begin
      img[f][i] = 8'($urandom);
      proc_valid = 1; proc_data = img[f][i];
      @(negedge clk);
      proc_valid = 0;
      repeat (8 + $urandom % 4) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    frame_done = 1; @(negedge clk); frame_done = 0;
  endtask

  task automatic read_all(int f, int n);
    @(negedge clk); rd_rewind = 1; @(negedge clk); rd_rewind = 0;
    for (int i = 0; i < n; i++) begin
      int w;
      rd_req = 1; @(negedge clk); rd_req = 0;
      w = 0;
      while (!rd_ack && w < 20) begin @(negedge clk); w++; end
      checks++;
      if (!rd_ack || rd_data !== img[f][i] || w > 4) begin
        failures++; $display("FAIL read %0d got %0d exp %0d wait %0d", i, rd_data, img[f][i], w);
      end
      nreads++;
    end
  endtask

  initial begin
    proc_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    write_frame(0, 500);
    read_all(0, 500);
    // second frame written while the first is being read back; the reader
    // starts first and, being faster, stays ahead of the writer
    fork
      begin repeat (30) @(negedge clk); write_frame(1, 300); end
      read_all(0, 200);
    join
    checks++;
    if (frames != 8'd2) begin failures++; $display("FAIL frames %0d", frames); end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no arbitration happened"); end
    read_all(1, 300);
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
