// tb_lpfir_dsp: end-to-end test of the filter processor at a small size
// (8 taps, 8-bit data and coefficients).
//
// 1. The 4-tap worked example: h = {-9, 23, 40, -15}, x = {3, -7, -4, 8},
//    coefficients processed in the order h1, h0, h3, h2. The coefficient
//    words must carry PCVMA/SF = 1/0, 3/1, 4/0, 6/1 for taps 0..3, the
//    outputs must be -27, 132, -5, -489 and the PCVM must end as
//    {-489, -417, 129, 380, 60, -120, 0}. The SORT2 ordering of these
//    coefficients must give that same order.
// 2. Random filters of 1 to 8 taps: general, symmetric and anti-symmetric
//    coefficient sets; NORM, SORT1 and SORT2 orderings; unfolded and folded
//    coefficient words; samples with idle gaps and streamed back to back.
//    Every output is compared with a direct convolution and every latency
//    with S + 1 clocks.
// Each mechanism (shift write, plain write, folded pair, anti-symmetric
// subtraction, back-pressure, back-to-back sample, idle gap, clear) must
// have occurred at least once.
module tb_lpfir_dsp;
  import lpfir_tb_pkg::*;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned N_TAPS = 8;
  localparam int unsigned AW     = $clog2(2 * N_TAPS);
  localparam int unsigned PCV_W  = DATA_W + COEF_W + $clog2(N_TAPS);
  localparam int unsigned CW_W   = COEF_W + 2 * AW + 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                        rst_n, cw_we, pcv_clr, in_valid, in_ready, out_valid, busy;
  logic [$clog2(N_TAPS)-1:0]   cw_waddr;
  logic [CW_W-1:0]             cw_wdata;
  logic [$clog2(N_TAPS+1)-1:0] n_words;
  logic signed [DATA_W-1:0]    x_in;
  logic signed [PCV_W-1:0]     y_out;

  lpfir_dsp #(.DATA_W(DATA_W), .COEF_W(COEF_W), .N_TAPS(N_TAPS)) u_dut (.*);

  lpfir_harness #(.DATA_W(DATA_W), .COEF_W(COEF_W), .N_TAPS(N_TAPS)) u_h (.*);

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    u_h.failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", u_h.checks, u_h.failures);
    $finish;
  end

  initial begin : main
    int h[], x[], ord[], wh[];
    cw_ref_t words[];
    static int exp_pcvma[4] = '{1, 3, 4, 6};
    static bit exp_sf[4]    = '{0, 1, 0, 1};
    static int exp_mem[7]   = '{-489, -417, 129, 380, 60, -120, 0};

    u_h.do_reset();

    // ---- worked example -------------------------------------------------
    h = '{-9, 23, 40, -15};
    x = '{3, -7, -4, 8};
    ord = '{1, 0, 3, 2};
    build_words_ord(h, 1'b0, 1'b0, ord, words);
    foreach (words[j]) begin
      automatic int k = ord[j];
      u_h.check(words[j].pcvma == exp_pcvma[k] && words[j].sf == exp_sf[k],
                $sformatf("example: tap %0d word PCVMA=%0d SF=%0d", k, words[j].pcvma, words[j].sf));
    end
    wh = h;
    make_order(wh, SORT2, COEF_W, ord);
    u_h.check(ord[0] == 1 && ord[1] == 0 && ord[2] == 3 && ord[3] == 2, "example: SORT2 order is h1, h0, h3, h2");
    u_h.run_filter(h, words, x, 1'b0);
    for (int i = 0; i < 7; i++)
      u_h.check(u_dut.u_pcvm.mem[i] == PCV_W'(exp_mem[i]),
                $sformatf("example: PCVM%0d = %0d expected %0d", i, u_dut.u_pcvm.mem[i], exp_mem[i]));
    for (int i = 7; i < 2 * N_TAPS; i++)
      u_h.check(u_dut.u_pcvm.mem[i] == '0, $sformatf("example: PCVM%0d unused", i));

    // ---- random filters ---------------------------------------------------
    for (int n = 1; n <= N_TAPS; n++) begin
      for (int sym = 0; sym < 3; sym++) begin          // general, symmetric, anti-symmetric
        for (int k = 0; k < 3; k++) begin                // NORM, SORT1, SORT2
          for (int fold = 0; fold < 2; fold++) begin
            if (fold != 0 && sym == 0) continue;              // folding needs symmetry
            if (sym == 0) rand_vec(n, COEF_W, h);
            else          rand_lp_coefs(n, COEF_W, sym == 2, h);
            build_words(h, fold[0], sym == 2, order_e'(k), COEF_W, words);
            rand_vec(12, DATA_W, x);
            u_h.run_filter(h, words, x, (n + k) % 2 == 1);
          end
        end
      end
    end

    // ---- mechanisms ---------------------------------------------------------
    $display("mechanisms: samples=%0d shift=%0d plain=%0d pair=%0d neg=%0d backpressure=%0d back_to_back=%0d gaps=%0d clears=%0d",
             u_h.n_samples, u_h.n_shift, u_h.n_plain, u_h.n_pair, u_h.n_neg,
             u_h.n_backpressure, u_h.n_stream, u_h.n_gap, u_h.n_clr);
    u_h.check(u_h.n_shift > 0, "shift writes occurred");
    u_h.check(u_h.n_plain > 0, "plain writes occurred");
    u_h.check(u_h.n_pair > 0, "folded pairs occurred");
    u_h.check(u_h.n_neg > 0, "anti-symmetric subtractions occurred");
    u_h.check(u_h.n_backpressure > 0, "back-pressure occurred");
    u_h.check(u_h.n_stream > 0, "back-to-back samples occurred");
    u_h.check(u_h.n_gap > 0, "idle gaps occurred");
    u_h.check(u_h.n_clr > 0, "clears occurred");

    $display("TB_RESULT checks=%0d failures=%0d", u_h.checks, u_h.failures);
    $finish;
  end

endmodule
