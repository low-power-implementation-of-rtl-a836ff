// lpfir_harness: driver and checker for lpfir_dsp, shared by the top-level
// testbenches.
//
// It owns the reset, the coefficient load port, the PCVM clear and the
// sample handshake of the processor, and offers tasks that a testbench
// calls hierarchically:
//   do_reset()                   reset the processor
//   run_filter(h, words, x, st)  load the words, clear the PCVM, filter the
//                                samples x and compare every y(n) with
//                                the direct convolution of h; st = 1 keeps
//                                in_valid high so samples stream back to back
// It checks each output value and its latency: a sample accepted in clock t
// must give out_valid in clock t + S + 1, S being the updates per sample.
// It counts how often each mechanism of the processor was used: shift
// writes, folded pair second updates, anti-symmetric subtractions,
// back-pressure clocks, samples taken in the output clock, idle gaps and
// PCVM clears, and the bit toggles on the multiplier coefficient input.
module lpfir_harness
  import lpfir_tb_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned N_TAPS = 8,
  parameter int unsigned AW     = $clog2(2 * N_TAPS),
  parameter int unsigned PCV_W  = DATA_W + COEF_W + $clog2(N_TAPS),
  parameter int unsigned CW_W   = COEF_W + 2 * AW + 4
) (
  input  logic                        clk,
  output logic                        rst_n,
  output logic                        cw_we,
  output logic [$clog2(N_TAPS)-1:0]   cw_waddr,
  output logic [CW_W-1:0]             cw_wdata,
  output logic [$clog2(N_TAPS+1)-1:0] n_words,
  output logic                        pcv_clr,
  output logic                        in_valid,
  input  logic                        in_ready,
  output logic signed [DATA_W-1:0]    x_in,
  input  logic                        out_valid,
  input  logic signed [PCV_W-1:0]     y_out,
  input  logic                        busy
);

  int checks = 0, failures = 0;
  longint cyc = 0;
  // mechanism counters
  int n_samples = 0, n_shift = 0, n_plain = 0, n_pair = 0, n_neg = 0;
  int n_backpressure = 0, n_stream = 0, n_gap = 0, n_clr = 0;
  longint coef_toggles = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    rst_n = 1'b0; cw_we = 1'b0; cw_waddr = '0; cw_wdata = '0; n_words = '0;
    pcv_clr = 1'b0; in_valid = 1'b0; x_in = '0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [CW_W-1:0] pack(input cw_ref_t w);
    return {COEF_W'(w.h), AW'(w.pcvma), w.sf, w.pair, w.neg2, AW'(w.pcvma2), w.sf2};
  endfunction

  task automatic do_reset();
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(in_ready && !out_valid && !busy, "idle after reset");
  endtask

  task automatic run_filter(input int h[], input cw_ref_t words[], input int x[],
                            input bit stream);
    int nsamp = x.size();
    int s = steps_of(words);
    longint t_acc;
    // load the coefficient words
    @(negedge clk);
    foreach (words[i]) begin
      cw_we = 1'b1; cw_waddr = ($clog2(N_TAPS))'(i); cw_wdata = pack(words[i]);
      @(negedge clk);
    end
    cw_we = 1'b0;
    n_words = ($clog2(N_TAPS+1))'(words.size());
    // clear the PCVM, as before any filtering
    pcv_clr = 1'b1; @(negedge clk); pcv_clr = 1'b0;
    n_clr++;
    // data samples
    in_valid = 1'b1; x_in = DATA_W'(x[0]);
    while (!in_ready) @(negedge clk);
    for (int n = 0; n < nsamp; n++) begin
      longint yr = ref_y(h, x, n);
      t_acc = cyc;
      @(negedge clk);
      if (stream && n + 1 < nsamp) begin
        in_valid = 1'b1; x_in = DATA_W'(x[n+1]);
      end else begin
        in_valid = 1'b0;
      end
      while (!out_valid) begin
        if (in_valid && !in_ready) n_backpressure++;
        @(negedge clk);
      end
      check(y_out == PCV_W'(yr),
            $sformatf("sample %0d: y=%0d expected %0d", n, y_out, yr));
      check(cyc - t_acc == longint'(s) + 1,
            $sformatf("sample %0d: latency %0d expected %0d", n, cyc - t_acc, s + 1));
      n_samples++;
      foreach (words[i]) begin
        if (words[i].sf) n_shift++; else n_plain++;
        if (words[i].pair) begin
          n_pair++;
          if (words[i].sf2) n_shift++; else n_plain++;
          if (words[i].neg2) n_neg++;
        end
        if (i > 0) coef_toggles += longint'(hamming(words[i].h, words[i-1].h, COEF_W));
      end
      if (n + 1 < nsamp) begin
        if (stream) begin
          n_stream++;  // accepted in the output clock
        end else begin
          int gap = int'($urandom_range(3));
          if (gap == 0) n_stream++;
          else begin
            n_gap++;
            repeat (gap) @(negedge clk);
            check(in_ready && !busy && !out_valid, "idle between samples");
          end
          in_valid = 1'b1; x_in = DATA_W'(x[n+1]);
          while (!in_ready) @(negedge clk);
        end
      end
    end
    in_valid = 1'b0;
    @(negedge clk);
  endtask

endmodule
