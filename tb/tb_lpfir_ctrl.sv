// tb_lpfir_ctrl: checks the sequencer's step sequence and timing.
//
// A table of pair bits stands in for the coefficient memory. For random
// word counts and pair patterns it accepts a sample and then checks, clock
// by clock, that the sequencer visits words 0..n_words-1 in order, spends
// two clocks (phase 0 then 1) on pair words and one on the others, writes
// the PCVM in every run clock, raises out_valid exactly once S + 1 clocks
// after the accepting clock, refuses samples while running and accepts one
// in the output clock.
module tb_lpfir_ctrl;
  import lpfir_pkg::*;

  localparam int DEPTH = 16;
  int checks = 0, failures = 0;
  int n_refused = 0, n_b2b = 0, n_pairs = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                       rst_n, in_valid, in_ready, cur_pair, phase, x_load, pcv_we, out_valid;
  logic [$clog2(DEPTH+1)-1:0] n_words;
  logic [$clog2(DEPTH)-1:0]   word_addr;
  ctrl_state_e                state;
  bit                         pair_tab [DEPTH];

  lpfir_ctrl #(.DEPTH(DEPTH)) u_dut (.*);

  assign cur_pair = pair_tab[word_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    rst_n = 1'b0; in_valid = 1'b0; n_words = 5'd1;
    foreach (pair_tab[i]) pair_tab[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(in_ready && !out_valid && !pcv_we && state == ST_IDLE, "idle after reset");
    for (int r = 0; r < 300; r++) begin
      automatic int nw = 1 + int'($urandom_range(DEPTH - 1));
      automatic int s = 0;
      automatic bit b2b = (r % 3 == 0);
      n_words = 5'(nw);
      foreach (pair_tab[i]) pair_tab[i] = $urandom_range(1) == 1;
      // accept a sample
      in_valid = 1'b1;
      #1;
      check(in_ready && x_load, "sample accepted when idle/output");
      @(negedge clk);
      in_valid = 1'b1;  // held high: must be refused while running
      for (int w = 0; w < nw; w++) begin
        for (int ph = 0; ph < (pair_tab[w] ? 2 : 1); ph++) begin
          check(state == ST_RUN && pcv_we && !out_valid, "running");
          check(word_addr == 4'(w) && phase == ph[0],
                $sformatf("step word %0d phase %0d, saw %0d/%0d", w, ph, word_addr, phase));
          check(!in_ready && !x_load, "no sample accepted while running");
          n_refused++;
          if (ph == 1) n_pairs++;
          s++;
          @(negedge clk);
        end
      end
      check(out_valid && !pcv_we && in_ready && state == ST_OUT, "output clock after S run clocks");
      in_valid = b2b;
      if (b2b) begin
        n_b2b++;
        continue;  // accepted in the output clock
      end
      @(negedge clk);
      check(!out_valid && state == ST_IDLE && in_ready, "back to idle");
    end
    check(n_refused > 0 && n_b2b > 0 && n_pairs > 0, "all sequencing cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
