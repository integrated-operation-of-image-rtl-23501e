// Self-checking testbench of the memory management unit: the parameter
// module and the image module work at the same time through the wrapper.
// Command words are written and read back; a frame of pixels is stored
// in the external SRAM model and read back in order.
module tb_mmu;
  import ipu_pkg::*;
  localparam int AW = 9;
  logic clk = 0, rst_n = 0;
  logic pm_we = 0;
  logic [5:0] pm_waddr, pm_raddr;
  logic [WORD_W-1:0] pm_wdata, pm_rdata;
  logic frame_start = 0, frame_done = 0, proc_valid = 0, rd_rewind = 0, rd_req = 0, rd_ack, xm_we;
  pix_t proc_data, rd_data, xm_wdata, xm_rdata;
  logic [7:0] frames;
  logic [AW-1:0] xm_addr;
  int checks = 0, failures = 0;
  logic [WORD_W-1:0] words [64];
  pix_t img [300];

  mmu #(.PM_DEPTH(64), .XM_AW(AW)) dut (.clk, .rst_n, .pm_we, .pm_waddr, .pm_wdata, .pm_raddr,
    .pm_rdata, .frame_start, .frame_done, .proc_valid, .proc_data, .rd_rewind, .rd_req,
    .rd_ack, .rd_data, .frames, .xm_addr, .xm_wdata, .xm_we, .xm_rdata);
  ext_sram_model #(.AW(AW)) xm (.clk, .addr(xm_addr), .wdata(xm_wdata), .we(xm_we), .rdata(xm_rdata));

  always #5 clk = ~clk;

  initial begin
    pm_waddr = 0; pm_raddr = 0; pm_wdata = 0; proc_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      begin   // parameter side
        for (int i = 0; i < 64; i++) begin
          words[i] = WORD_W'($urandom);
          pm_we = 1; pm_waddr = 6'(i); pm_wdata = words[i];
          @(negedge clk);
        end
        pm_we = 0;
        for (int i = 0; i < 64; i++) begin
          pm_raddr = 6'(63 - i);
          @(negedge clk);
          checks++;
          if (pm_rdata !== words[63 - i]) begin failures++; $display("FAIL pm word %0d", 63 - i); end
        end
      end
      begin   // image side
        frame_start = 1; @(negedge clk); frame_start = 0;
        for (int i = 0; i < 300; i++) begin
          img[i] = pix_t'($urandom);
          proc_valid = 1; proc_data = img[i]; @(negedge clk); proc_valid = 0;
          repeat (9) @(negedge clk);
        end
        frame_done = 1; @(negedge clk); frame_done = 0;
        rd_rewind = 1; @(negedge clk); rd_rewind = 0;
        for (int i = 0; i < 300; i++) begin
          rd_req = 1; @(negedge clk); rd_req = 0;
          while (!rd_ack) @(negedge clk);
          checks++;
          if (rd_data !== img[i]) begin failures++; $display("FAIL image byte %0d", i); end
        end
        checks++;
        if (frames != 1) begin failures++; $display("FAIL frames"); end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
