// Self-checking testbench of the single-multiplier 3x3 convolver.
// Frames are fed in raster order with 9 to 14 cycles between pixels.
// Each result is compared with b(m,n) = sum f(i,j) o(m+i, n+j) computed
// here from the frame array, shifted and clamped to 0..255; the result
// must come exactly 10 cycles after the pixel that completes its window,
// and a frame of W x H pixels must give (W-2) x (H-2) results. The sort
// bus must carry the window's right-hand column. Kernels: averaging
// (1/9), high pass (-1/9, 8/9), a 1-2-1 Gaussian, the identity and a
// random asymmetric kernel; two frame widths exercise the programmable
// line buffer length.
module tb_conv2d;
  import ipu_pkg::*;
  localparam int MAXW = 16;
  logic clk = 0, rst_n = 0;
  logic [XW-1:0] width;
  coef_t coef [NTAPS];
  logic [SHIFT_W-1:0] shift;
  logic in_valid = 0;
  pix_t in_pix;
  logic [XW-1:0] in_x;
  logic [YW-1:0] in_y;
  logic col_valid, win_valid, out_valid, busy;
  pix_t sort_bus [3];
  pix_t out_b;
  int checks = 0, failures = 0;
  longint cyc = 0;

  conv2d #(.MAX_W(MAXW)) dut (.clk, .rst_n, .width, .coef, .shift, .in_valid, .in_pix,
    .in_x, .in_y, .col_valid, .sort_bus, .win_valid, .out_valid, .out_b, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  pix_t img [16][16];     // [y][x]
  pix_t exp_q [$];
  longint due_q [$];
  int nout;

  function automatic pix_t ref_b(int x, int y);
    longint acc = 0;
    longint s;
    for (int k = 0; k < 9; k++)
      acc += longint'(coef[k]) * longint'(img[y - k/3][x - k%3]);
    s = acc >>> shift;
    if (s < 0) return 8'd0;
    if (s > 255) return 8'd255;
    return pix_t'(s);
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    nout++;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected output");
    end else begin
      if (out_b !== exp_q[0] || cyc != due_q[0]) begin
        failures++;
        $display("FAIL got %0d exp %0d at cycle %0d exp %0d", out_b, exp_q[0], cyc, due_q[0]);
      end
      void'(exp_q.pop_front());
      void'(due_q.pop_front());
    end
  end

  task automatic run_frame(int w, int h);
    width = XW'(w);
    nout = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) img[y][x] = pix_t'($urandom);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        @(negedge clk);
        in_valid = 1; in_pix = img[y][x]; in_x = XW'(x); in_y = YW'(y);
        if (x >= 2 && y >= 2) begin
          exp_q.push_back(ref_b(x, y));
          due_q.push_back(cyc + 10);
        end
        @(negedge clk);
        in_valid = 0;
        // sort bus = newest column of the window
        checks++;
        if (!col_valid || (y >= 2 && (sort_bus[0] !== img[y][x] ||
            sort_bus[1] !== img[y-1][x] || sort_bus[2] !== img[y-2][x]))) begin
          failures++; $display("FAIL sort bus at %0d,%0d", x, y);
        end
        checks++;
        if (win_valid !== (x >= 2 && y >= 2)) begin failures++; $display("FAIL win_valid"); end
        repeat (7 + $urandom % 6) @(negedge clk);
      end
    repeat (12) @(negedge clk);
    checks++;
    if (nout != (w - 2) * (h - 2) || exp_q.size() != 0) begin
      failures++; $display("FAIL frame %0dx%0d gave %0d results", w, h, nout);
    end
  endtask

  task automatic set_all(int v);
    for (int k = 0; k < 9; k++) coef[k] = coef_t'(v);
  endtask

  initial begin
    width = 10; shift = 0; in_pix = 0; in_x = 0; in_y = 0;
    set_all(0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // averaging filter, 1/9 with 10 fraction bits
    set_all(114); shift = 10;           run_frame(10, 6);
    // high pass filter: -1/9 around, 8/9 in the centre (clamps at 0 often)
    set_all(-114); coef[4] = 910;       run_frame(10, 6);
    // Gaussian 1 2 1 / 2 4 2 / 1 2 1, /16
    coef[0] = 1; coef[1] = 2; coef[2] = 1; coef[3] = 2; coef[4] = 4; coef[5] = 2;
    coef[6] = 1; coef[7] = 2; coef[8] = 1; shift = 4; run_frame(7, 5);
    // identity: the centre pixel
    set_all(0); coef[4] = 1; shift = 0; run_frame(16, 4);
    // random asymmetric kernel: checks the tap-to-coefficient order
    for (int k = 0; k < 9; k++) coef[k] = coef_t'($signed(12'($urandom % 401)) - 200);
    shift = 6; run_frame(9, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
