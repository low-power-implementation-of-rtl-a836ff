// tb_lpfir_wordlen: the filter processor rebuilt for the 16- and 24-bit
// word lengths, each with up to 128 taps.
//
// For each word length it runs random symmetric 32-, 64- and 128-tap
// filters with the NORM, SORT1 and SORT2 orderings, unfolded and folded,
// 100 samples each, and compares every output with the direct convolution
// and every latency with S + 1 clocks.
module tb_lpfir_wordlen;
  import lpfir_tb_pkg::*;

  localparam int NSAMP = 100;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  // ---- 16-bit instance ----
  localparam int unsigned W16 = 16, N16 = 128;
  localparam int unsigned AW16 = $clog2(2 * N16), PCV16 = 2 * W16 + $clog2(N16), CW16 = W16 + 2 * AW16 + 4;
  logic                    a_rst_n, a_cw_we, a_pcv_clr, a_in_valid, a_in_ready, a_out_valid, a_busy;
  logic [$clog2(N16)-1:0]   a_cw_waddr;
  logic [CW16-1:0]          a_cw_wdata;
  logic [$clog2(N16+1)-1:0] a_n_words;
  logic signed [W16-1:0]    a_x_in;
  logic signed [PCV16-1:0]  a_y_out;

  lpfir_dsp #(.DATA_W(W16), .COEF_W(W16), .N_TAPS(N16)) u_dut16 (
    .clk, .rst_n(a_rst_n), .cw_we(a_cw_we), .cw_waddr(a_cw_waddr), .cw_wdata(a_cw_wdata),
    .n_words(a_n_words), .pcv_clr(a_pcv_clr), .in_valid(a_in_valid), .in_ready(a_in_ready),
    .x_in(a_x_in), .out_valid(a_out_valid), .y_out(a_y_out), .busy(a_busy));
  lpfir_harness #(.DATA_W(W16), .COEF_W(W16), .N_TAPS(N16)) u_h16 (
    .clk, .rst_n(a_rst_n), .cw_we(a_cw_we), .cw_waddr(a_cw_waddr), .cw_wdata(a_cw_wdata),
    .n_words(a_n_words), .pcv_clr(a_pcv_clr), .in_valid(a_in_valid), .in_ready(a_in_ready),
    .x_in(a_x_in), .out_valid(a_out_valid), .y_out(a_y_out), .busy(a_busy));

  // ---- 24-bit instance ----
  localparam int unsigned W24 = 24, N24 = 128;
  localparam int unsigned AW24 = $clog2(2 * N24), PCV24 = 2 * W24 + $clog2(N24), CW24 = W24 + 2 * AW24 + 4;
  logic                    b_rst_n, b_cw_we, b_pcv_clr, b_in_valid, b_in_ready, b_out_valid, b_busy;
  logic [$clog2(N24)-1:0]   b_cw_waddr;
  logic [CW24-1:0]          b_cw_wdata;
  logic [$clog2(N24+1)-1:0] b_n_words;
  logic signed [W24-1:0]    b_x_in;
  logic signed [PCV24-1:0]  b_y_out;

  lpfir_dsp #(.DATA_W(W24), .COEF_W(W24), .N_TAPS(N24)) u_dut24 (
    .clk, .rst_n(b_rst_n), .cw_we(b_cw_we), .cw_waddr(b_cw_waddr), .cw_wdata(b_cw_wdata),
    .n_words(b_n_words), .pcv_clr(b_pcv_clr), .in_valid(b_in_valid), .in_ready(b_in_ready),
    .x_in(b_x_in), .out_valid(b_out_valid), .y_out(b_y_out), .busy(b_busy));
  lpfir_harness #(.DATA_W(W24), .COEF_W(W24), .N_TAPS(N24)) u_h24 (
    .clk, .rst_n(b_rst_n), .cw_we(b_cw_we), .cw_waddr(b_cw_waddr), .cw_wdata(b_cw_wdata),
    .n_words(b_n_words), .pcv_clr(b_pcv_clr), .in_valid(b_in_valid), .in_ready(b_in_ready),
    .x_in(b_x_in), .out_valid(b_out_valid), .y_out(b_y_out), .busy(b_busy));

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", u_h16.checks + u_h24.checks,
             u_h16.failures + u_h24.failures + 1);
    $finish;
  end

  initial begin : main
    int h[], x[];
    cw_ref_t words[];
    int sizes[3];
    sizes = '{32, 64, 128};
    u_h16.do_reset();
    u_h24.do_reset();
    foreach (sizes[si]) begin
      for (int fold = 0; fold < 2; fold++) begin
        for (int k = 0; k < 3; k++) begin
          rand_lp_coefs(sizes[si], W16, 1'b0, h);
          rand_vec(NSAMP, W16, x);
          build_words(h, fold[0], 1'b0, order_e'(k), W16, words);
          u_h16.run_filter(h, words, x, k == 1);
          rand_lp_coefs(sizes[si], W24, 1'b0, h);
          rand_vec(NSAMP, W24, x);
          build_words(h, fold[0], 1'b0, order_e'(k), W24, words);
          u_h24.run_filter(h, words, x, k == 2);
        end
      end
    end
    $display("16-bit: samples=%0d shift=%0d pair=%0d; 24-bit: samples=%0d shift=%0d pair=%0d",
             u_h16.n_samples, u_h16.n_shift, u_h16.n_pair,
             u_h24.n_samples, u_h24.n_shift, u_h24.n_pair);
    u_h16.check(u_h16.n_shift > 0 && u_h16.n_pair > 0, "16-bit: shifts and pairs occurred");
    u_h24.check(u_h24.n_shift > 0 && u_h24.n_pair > 0, "24-bit: shifts and pairs occurred");
    $display("TB_RESULT checks=%0d failures=%0d", u_h16.checks + u_h24.checks,
             u_h16.failures + u_h24.failures);
    $finish;
  end

endmodule
