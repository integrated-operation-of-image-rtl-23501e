// Self-checking testbench of the parameter module: after reset every word
// reads 0 (end of list); random writes are read back with one cycle of
// latency, including a read of the word written in the same cycle (old
// value) and in the cycle before (new value).
module tb_param_module;
  localparam int DEPTH = 64, WW = 24;
  logic clk = 0, rst_n = 0, we = 0;
  logic [5:0] waddr, raddr;
  logic [WW-1:0] wdata, rdata;
  logic [WW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  param_module #(.DEPTH(DEPTH), .WORD_W(WW)) dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic rd(int a);
    raddr = 6'(a);
    @(negedge clk);
    checks++;
    if (rdata !== model[a]) begin
      failures++; $display("FAIL word %0d got %h exp %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) rd(i);
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom % DEPTH;
      we = 1; waddr = 6'(a); wdata = WW'($urandom);
      raddr = 6'(a);
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL read during write"); end
      model[a] = wdata;
      rd(a);
      rd($urandom % DEPTH);
    end
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
