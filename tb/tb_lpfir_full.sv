// tb_lpfir_full: the filter processor at its default size (8-bit data and
// coefficients, up to 128 taps) running the evaluated 8-bit filter set.
//
// For each filter length 32, 64 and 128 it generates a random linear phase
// (symmetric) coefficient set and runs it with the NORM, SORT1 and SORT2
// coefficient orderings, once as unfolded coefficient words (N words) and
// once as folded words (N/2 words, each used for two taps). Every run
// filters 1000 random samples; each output is compared with the direct
// convolution and each latency with S + 1 clocks. It prints, per run, the
// bit toggles on the multiplier's coefficient input per sample, the
// quantity the coefficient orderings are meant to reduce, together with the
// bit toggles measured on both multiplier inputs inside the processor. It
// checks that the second clock of a folded pair word leaves both
// multiplier inputs unchanged, and that every mechanism occurred.
module tb_lpfir_full;
  import lpfir_tb_pkg::*;
  import lpfir_pkg::*;

  localparam int unsigned DATA_W = DEF_DATA_W;
  localparam int unsigned COEF_W = DEF_COEF_W;
  localparam int unsigned N_TAPS = DEF_N_TAPS;
  localparam int unsigned AW     = $clog2(2 * N_TAPS);
  localparam int unsigned PCV_W  = DATA_W + COEF_W + $clog2(N_TAPS);
  localparam int unsigned CW_W   = COEF_W + 2 * AW + 4;
  localparam int          NSAMP  = 1000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                        rst_n, cw_we, pcv_clr, in_valid, in_ready, out_valid, busy;
  logic [$clog2(N_TAPS)-1:0]   cw_waddr;
  logic [CW_W-1:0]             cw_wdata;
  logic [$clog2(N_TAPS+1)-1:0] n_words;
  logic signed [DATA_W-1:0]    x_in;
  logic signed [PCV_W-1:0]     y_out;

  lpfir_dsp u_dut (.*);

  lpfir_harness #(.DATA_W(DATA_W), .COEF_W(COEF_W), .N_TAPS(N_TAPS)) u_h (.*);

  // Switching observed at the multiplier inputs of the processor while it
  // runs, and a check that the second update of a folded pair leaves the
  // multiplier inputs unchanged.
  logic [COEF_W-1:0] h_prev;
  logic [DATA_W-1:0] x_prev;
  longint            mult_toggles = 0;
  int                pair_input_changes = 0, pair_clocks = 0;
  always @(posedge clk) begin
    if (busy) begin
      mult_toggles += longint'($countones(u_dut.u_mac.h ^ h_prev))
                    + longint'($countones(u_dut.u_mac.x ^ x_prev));
      if (u_dut.phase) begin
        pair_clocks++;
        if (u_dut.u_mac.h != h_prev || u_dut.u_mac.x != x_prev) pair_input_changes++;
      end
    end
    h_prev <= u_dut.u_mac.h;
    x_prev <= u_dut.u_mac.x;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    u_h.failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", u_h.checks, u_h.failures);
    $finish;
  end

  initial begin : main
    int h[], x[];
    cw_ref_t words[];
    int sizes[3];
    string onames[3];
    sizes  = '{32, 64, 128};
    onames = '{"norm", "sort1", "sort2"};
    u_h.do_reset();
    foreach (sizes[si]) begin
      rand_lp_coefs(sizes[si], COEF_W, 1'b0, h);
      rand_vec(NSAMP, DATA_W, x);
      for (int fold = 0; fold < 2; fold++) begin
        for (int k = 0; k < 3; k++) begin
          longint t0, m0;
          build_words(h, fold[0], 1'b0, order_e'(k), COEF_W, words);
          t0 = u_h.coef_toggles;
          m0 = mult_toggles;
          u_h.run_filter(h, words, x, k == 1);
          $display("N=%0d %s TDF/%s: %0d words, coefficient input toggles per sample %0d, multiplier input toggles per sample %0d",
                   sizes[si], fold != 0 ? "folded" : "unfolded", onames[k], words.size(),
                   (u_h.coef_toggles - t0) / longint'(NSAMP), (mult_toggles - m0) / longint'(NSAMP));
        end
      end
    end
    $display("mechanisms: samples=%0d shift=%0d plain=%0d pair=%0d backpressure=%0d back_to_back=%0d gaps=%0d clears=%0d",
             u_h.n_samples, u_h.n_shift, u_h.n_plain, u_h.n_pair,
             u_h.n_backpressure, u_h.n_stream, u_h.n_gap, u_h.n_clr);
    u_h.check(pair_clocks > 0 && pair_input_changes == 0,
              $sformatf("multiplier inputs held in %0d pair clocks (%0d changed)", pair_clocks, pair_input_changes));
    u_h.check(u_h.n_shift > 0, "shift writes occurred");
    u_h.check(u_h.n_plain > 0, "plain writes occurred");
    u_h.check(u_h.n_pair > 0, "folded pairs occurred");
    u_h.check(u_h.n_backpressure > 0, "back-pressure occurred");
    u_h.check(u_h.n_stream > 0, "back-to-back samples occurred");
    u_h.check(u_h.n_gap > 0, "idle gaps occurred");
    $display("TB_RESULT checks=%0d failures=%0d", u_h.checks, u_h.failures);
    $finish;
  end

endmodule
