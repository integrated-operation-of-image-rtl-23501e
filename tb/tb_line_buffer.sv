// Self-checking testbench of the line buffer: for several lengths, each
// output must equal the input written exactly `len` shifts earlier; idle
// cycles between shifts must not move the data.
module tb_line_buffer;
  localparam int DEPTH = 29;
  logic clk = 0, rst_n = 0, en = 0;
  logic [4:0] len;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;
  logic [7:0] hist [$];

  line_buffer #(.W(8), .DEPTH(DEPTH)) dut (.clk, .rst_n, .en, .len, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    int lens [4];
    lens[0] = 1; lens[1] = 7; lens[2] = DEPTH; lens[3] = 17;
    din = 0; len = 5'(lens[0]);
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (lens[li]) begin
      len = 5'(lens[li]);
      hist.delete();
      // restart the pointer so a new length starts cleanly
      rst_n = 0; @(negedge clk); rst_n = 1;
      for (int n = 0; n < 4 * lens[li] + 20; n++) begin
        din = 8'($urandom);
        en = 1;
        #1;
        if (hist.size() >= lens[li]) begin
          checks++;
          if (dout !== hist[hist.size() - lens[li]]) begin
            failures++;
            $display("FAIL len %0d n %0d got %0d exp %0d", lens[li], n, dout,
                     hist[hist.size() - lens[li]]);
          end
        end
        hist.push_back(din);
        @(negedge clk);
        en = 0;
        if (n % 5 == 0) repeat (2) @(negedge clk);
      end
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
