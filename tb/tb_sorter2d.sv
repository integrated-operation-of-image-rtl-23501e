// Self-checking testbench of the 3x3 2-D sorter. Columns enter one per
// event; after three columns the outputs must be the maximum, median and
// minimum of the nine pixels, three cycles after the column strobe. Uses
// the worked example of the published algorithm (window 4 2 1 / 6 3 7 / 8 5 9 gives
// Max 9, Mid 5, Min 1), windows with repeated values and random windows.
module tb_sorter2d;
  logic clk = 0, rst_n = 0;
  logic col_valid = 0;
  logic [7:0] col [3];
  logic out_valid;
  logic [7:0] max_o, mid_o, min_o;
  int checks = 0, failures = 0;
  logic [7:0] win [3][3];   // [column][row], column 2 newest

  sorter2d #(.W(8)) dut (.clk, .rst_n, .col_valid, .col, .out_valid, .max_o, .mid_o, .min_o);

  always #5 clk = ~clk;

  task automatic push(logic [7:0] r0, logic [7:0] r1, logic [7:0] r2);
    int lat;
    @(negedge clk);
    col[0] = r0; col[1] = r1; col[2] = r2;
    col_valid = 1;
    win[0] = win[1]; win[1] = win[2];
    win[2][0] = r0; win[2][1] = r1; win[2][2] = r2;
    @(negedge clk);
    col_valid = 0;
    lat = 1;
    while (!out_valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  task automatic expect_window();
    logic [7:0] s [9];
    logic [7:0] t;
    for (int i = 0; i < 9; i++) s[i] = win[i/3][i%3];
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8 - i; j++)
        if (s[j] < s[j+1]) begin t = s[j]; s[j] = s[j+1]; s[j+1] = t; end
    checks++;
    if (max_o !== s[0] || mid_o !== s[4] || min_o !== s[8]) begin
      failures++;
      $display("FAIL got %0d %0d %0d exp %0d %0d %0d", max_o, mid_o, min_o, s[0], s[4], s[8]);
    end
  endtask

  initial begin
    col[0] = 0; col[1] = 0; col[2] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // worked example, window rows 4 2 1 / 6 3 7 / 8 5 9
    push(4, 6, 8); push(2, 3, 5); push(1, 7, 9);
    expect_window();
    checks++;
    if (max_o !== 9 || mid_o !== 5 || min_o !== 1) failures++;
    // sliding windows of random pixels, some with few distinct values
    for (int n = 0; n < 2000; n++) begin
      if (n % 3 == 0) push(8'($urandom % 4), 8'($urandom % 4), 8'($urandom % 4));
      else            push(8'($urandom), 8'($urandom), 8'($urandom));
      if (n >= 2) expect_window();
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
