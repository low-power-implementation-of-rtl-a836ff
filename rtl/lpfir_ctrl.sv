// lpfir_ctrl: sequencer of the single multiplier filter processor.
//
// For every data sample it steps through the coefficient words in memory
// order, one multiply-add per clock, and then presents the filter output:
//
//   ST_IDLE  in_ready = 1. A sample accepted (in_valid) is loaded into the
//            data register (x_load) and the sequencer enters ST_RUN at word 0.
//   ST_RUN   pcv_we = 1 every clock. word_addr selects the coefficient word;
//            phase = 0 performs the word's first update. If the word is a
//            folded pair (cur_pair = 1) the next clock keeps the same word
//            with phase = 1 and performs its second update with the same
//            product. After the last of n_words words it enters ST_OUT.
//   ST_OUT   out_valid = 1 for one clock: y(n) is in PCVM cell 0. in_ready
//            is also 1, so a waiting sample starts its run in the next clock.
//
// Timing: a sample accepted in clock t has its output valid in clock
// t + S + 1, where S is the number of updates (n_words, plus one per folded
// pair). Back-to-back samples are accepted every S + 1 clocks.
//
// The loop structure follows the scheme's algorithm (for each sample, for
// each coefficient word, then read the output from PCVM0). The valid/ready
// handshake, the programmable word count and the two-phase folded step are
// this design's own choices.
module lpfir_ctrl
  import lpfir_pkg::*;
#(
  parameter int unsigned DEPTH = 128   // coefficient memory words
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(DEPTH+1)-1:0] n_words,   // words in use, 1..DEPTH
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic                       cur_pair,  // pair bit of the word at word_addr
  output logic [$clog2(DEPTH)-1:0]   word_addr,
  output logic                       phase,
  output logic                       x_load,
  output logic                       pcv_we,
  output logic                       out_valid,
  output ctrl_state_e                state
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned NW = $clog2(DEPTH + 1);

  ctrl_state_e state_q, state_d;
  logic [AW-1:0] addr_q, addr_d;
  logic          phase_q, phase_d;
  logic          last_word;

  assign last_word = ((NW + 1)'(addr_q) == (NW + 1)'(n_words) - (NW + 1)'(1));

  assign in_ready  = (state_q == ST_IDLE) || (state_q == ST_OUT);
  assign x_load    = in_ready && in_valid;
  assign pcv_we    = (state_q == ST_RUN);
  assign out_valid = (state_q == ST_OUT);
  assign word_addr = addr_q;
  assign phase     = phase_q;
  assign state     = state_q;

  always_comb begin
    state_d = state_q;
    addr_d  = addr_q;
    phase_d = phase_q;
    unique case (state_q)
      ST_IDLE, ST_OUT: begin
        if (in_valid) begin
          state_d = ST_RUN;
          addr_d  = '0;
          phase_d = 1'b0;
        end else begin
          state_d = ST_IDLE;
        end
      end
      ST_RUN: begin
        if (cur_pair && !phase_q) begin
          phase_d = 1'b1;
        end else begin
          phase_d = 1'b0;
          if (last_word) state_d = ST_OUT;
          else           addr_d  = addr_q + AW'(1);
        end
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      addr_q  <= '0;
      phase_q <= 1'b0;
    end else begin
      state_q <= state_d;
      addr_q  <= addr_d;
      phase_q <= phase_d;
    end
  end

  // The word count must stay within the memory and must not change during a run.
  a_n_words_range: assert property (@(posedge clk) disable iff (!rst_n)
    (x_load || state_q == ST_RUN) |-> (n_words >= NW'(1)) && (n_words <= NW'(DEPTH)));
  a_n_words_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_RUN) && (state_d == ST_RUN) |=> $stable(n_words));

endmodule
