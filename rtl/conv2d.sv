// 3x3 convolver with a single multiplier and a single adder.
//
// Window: the incoming pixels shift through a delay line of nine word
// buffers c[0..8] and two line buffers, arranged as
//   c0 c1 c2 [line buffer, width-3] c3 c4 c5 [line buffer, width-3] c6 c7 c8
// so that after pixel o(x,y) has shifted in, c0..c2 = o(x..x-2, y),
// c3..c5 = o(x..x-2, y-1) and c6..c8 = o(x..x-2, y-2). The right-hand column
// of this window, {c0, c3, c6}, is the sort bus handed to the 2-D sorter.
//
// Arithmetic: instead of nine multipliers and nine adders, one multiplier
// and one adder visit the nine taps in turn, choosing the tap and its
// coefficient with a multiplexer, and accumulate
//   b(x-1, y-1) = sum_k coef[k] * c[k]
// which is b(m,n) = sum f(i,j) o(m+i, n+j) with tap k carrying f(i,j),
// i = 1-k%3, j = 1-k/3. The sum is shifted right arithmetically by `shift`
// (the fixed-point fraction of the coefficients) and clamped to 0..255.
//
// Timing: in_valid marks a new pixel (cycle t). The delay line shifts at t;
// col_valid and the sort bus are valid at t+1. If the window is complete
// (x >= 2 and y >= 2 for the new pixel) win_valid is also raised at t+1 and
// the accumulation runs in cycles t+1..t+9; out_valid pulses at t+10 with
// the result in out_b, which holds until the next result. Pixels therefore
// must be at least MIN_GAP = 9 clock cycles apart (an assertion checks it);
// the object image is (width-2) x (height-2) pixels, without the border.
//
// The structure (delay line with word buffers and width-3 line buffers,
// multiplexed coefficients, one multiply and one add) follows the modified
// Crookes convolver; the coefficient format, the rounding (truncation),
// the clamping and the border handling are this design's choices.
module conv2d
  import ipu_pkg::*;
#(
  parameter int MAX_W = MAX_W_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  // settings
  input  logic [XW-1:0]      width,            // frame width, 4..MAX_W
  input  coef_t              coef [NTAPS],
  input  logic [SHIFT_W-1:0] shift,
  // pixel stream from image capturing
  input  logic               in_valid,
  input  pix_t               in_pix,
  input  logic [XW-1:0]      in_x,
  input  logic [YW-1:0]      in_y,
  // sort bus to the 2-D sorter
  output logic               col_valid,
  output pix_t               sort_bus [3],
  output logic               win_valid,
  // object image
  output logic               out_valid,
  output pix_t               out_b,
  output logic               busy
);
  localparam int LB_DEPTH = MAX_W - 3;
  localparam int LW = $clog2(LB_DEPTH + 1);
  localparam int MIN_GAP = 9;

  pix_t c [NTAPS];
  pix_t lb0_out, lb1_out;
  logic [LW-1:0] lb_len;

  assign lb_len = LW'(width - XW'(3));

  line_buffer #(.W(PIX_W), .DEPTH(LB_DEPTH)) u_lb0 (
    .clk, .rst_n, .en(in_valid), .len(lb_len), .din(c[2]), .dout(lb0_out));
  line_buffer #(.W(PIX_W), .DEPTH(LB_DEPTH)) u_lb1 (
    .clk, .rst_n, .en(in_valid), .len(lb_len), .din(c[5]), .dout(lb1_out));

  // word buffers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) c[k] <= '0;
    end else if (in_valid) begin
      c[0] <= in_pix;  c[1] <= c[0]; c[2] <= c[1];
      c[3] <= lb0_out; c[4] <= c[3]; c[5] <= c[4];
      c[6] <= lb1_out; c[7] <= c[6]; c[8] <= c[7];
    end
  end

  assign sort_bus[0] = c[0];
  assign sort_bus[1] = c[3];
  assign sort_bus[2] = c[6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_valid <= 1'b0;
      win_valid <= 1'b0;
    end else begin
      col_valid <= in_valid;
      win_valid <= in_valid && (in_x >= XW'(2)) && (in_y >= YW'(2));
    end
  end

  // single multiply-accumulate, one tap per cycle
  logic [3:0]                tap;
  logic                      run;
  logic signed [ACC_W-1:0]   acc, sum, scaled;
  logic signed [PIX_W+COEF_W:0] prod;
  pix_t                      tap_pix;
  coef_t                     tap_coef;

  always_comb begin
    tap_pix  = c[tap];
    tap_coef = coef[tap];
    prod     = $signed({1'b0, tap_pix}) * tap_coef;
    sum      = (tap == 4'd0 ? '0 : acc) + ACC_W'(prod);
    scaled   = sum >>> shift;
  end

  assign busy = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; tap <= '0; acc <= '0;
      out_valid <= 1'b0; out_b <= '0;
    end else begin
      out_valid <= 1'b0;
      if (win_valid) begin
        run <= 1'b1; tap <= 4'd1; acc <= sum;   // tap 0 in the start cycle
      end else if (run) begin
        acc <= sum;
        if (tap == 4'(NTAPS - 1)) begin
          run <= 1'b0;
          tap <= '0;
          out_valid <= 1'b1;
          if (scaled < 0)                 out_b <= '0;
          else if (scaled > ACC_W'(255))  out_b <= 8'd255;
          else                            out_b <= pix_t'(scaled);
        end else begin
          tap <= tap + 4'd1;
        end
      end
    end
  end

  // pixels must not arrive while the accumulation is still reading taps
  a_min_gap: assert property (@(posedge clk) disable iff (!rst_n)
                              in_valid |-> !(win_valid || (run && tap < 4'(NTAPS - 1))))
    else $error("conv2d: pixels closer than %0d cycles", MIN_GAP);
endmodule
