`include "lpfir_cw.svh"

// lpfir_dsp: single multiplier FIR filter processor with ordered
// coefficients and a Pre-Calculated Value Memory (PCVM).
//
// The filter is computed in transpose direct form: for each data sample
// x(n) every coefficient h(k) is multiplied by x(n) and the product is added
// to the state value left by tap k+1. All products go through one array
// multiplier. The coefficients may be processed in any order (for example
// sorted so that consecutive coefficients differ in few bits, which cuts
// the switching of the multiplier): each coefficient word in the
// coefficient memory carries the PCVM address to read and update and a
// shift flag that keeps the older state value for a tap processed later.
// After all words the output y(n) is in PCVM cell 0.
//
// Per clock in ST_RUN, with w the current coefficient word:
//   PCV = x * w.h + [A]                 (A = w.pcvma)
//   w.sf = 1: [A-2] <= [A-1], [A-1] <= PCV
//   w.sf = 0: [A-1] <= PCV
// A word with pair = 1 (folded linear phase structure) holds one
// coefficient shared by two symmetric taps; it takes two clocks, the second
// using A = w.pcvma2, w.sf2 and subtracting the product when w.neg2 = 1.
// The multiplier inputs do not change between the two clocks.
//
// Interface
//   cw_we/cw_waddr/cw_wdata  load coefficient words (layout in lpfir_cw.svh)
//   n_words                  number of words used per sample (1..N_TAPS)
//   pcv_clr                  zero the PCVM (use while idle, before filtering)
//   in_valid/in_ready/x_in   data sample handshake
//   out_valid/y_out          y(n), valid for one clock
//   busy                     a sample is being processed
// Timing: with S updates per sample (n_words plus one per pair), a sample
// accepted in clock t gives out_valid in clock t + S + 1; streaming samples
// are accepted every S + 1 clocks.
//
// The datapath (multiply-add unit, coefficient memory with coefficient
// words of value, PCVMA and SF, the PCVM with its shift) follows the
// scheme. The widths of the PCVMA field and the PCV, the handshake, the
// clear input and the folded pair word are this design's choices.
module lpfir_dsp
  import lpfir_pkg::*;
#(
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned COEF_W = DEF_COEF_W,
  parameter int unsigned N_TAPS = DEF_N_TAPS,
  // derived sizes
  parameter int unsigned PCVM_DEPTH = pcvm_depth(N_TAPS),
  parameter int unsigned AW         = $clog2(PCVM_DEPTH),
  parameter int unsigned PCV_W      = DATA_W + COEF_W + $clog2(N_TAPS),
  parameter int unsigned CW_W       = `LPFIR_CW_W(COEF_W, AW)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // coefficient memory load port
  input  logic                        cw_we,
  input  logic [$clog2(N_TAPS)-1:0]   cw_waddr,
  input  logic [CW_W-1:0]             cw_wdata,
  input  logic [$clog2(N_TAPS+1)-1:0] n_words,
  input  logic                        pcv_clr,
  // data samples in
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic signed [DATA_W-1:0]    x_in,
  // filter output
  output logic                        out_valid,
  output logic signed [PCV_W-1:0]     y_out,
  output logic                        busy
);

  `LPFIR_CW_T(COEF_W, AW)

  cw_t                     cw;
  logic [CW_W-1:0]         cw_raw;
  logic [$clog2(N_TAPS)-1:0] word_addr;
  logic                    phase, x_load, pcv_we;
  ctrl_state_e             state;
  logic signed [DATA_W-1:0] x_q;
  logic [AW-1:0]           pcv_addr;
  logic                    pcv_sf, mac_neg;
  logic signed [PCV_W-1:0] pcv_rd, pcv_new;

  coef_mem #(.DEPTH(N_TAPS), .CW_W(CW_W)) u_coef_mem (
    .clk  (clk),
    .we   (cw_we),
    .waddr(cw_waddr),
    .wdata(cw_wdata),
    .raddr(word_addr),
    .rdata(cw_raw)
  );

  assign cw = cw_t'(cw_raw);

  lpfir_ctrl #(.DEPTH(N_TAPS)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .n_words  (n_words),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .cur_pair (cw.pair),
    .word_addr(word_addr),
    .phase    (phase),
    .x_load   (x_load),
    .pcv_we   (pcv_we),
    .out_valid(out_valid),
    .state    (state)
  );

  // Data register: x(n) is held at the multiplier input for the whole sample.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      x_q <= '0;
    else if (x_load) x_q <= x_in;
  end

  // First or second update of the current word.
  always_comb begin
    if (phase) begin
      pcv_addr = cw.pcvma2;
      pcv_sf   = cw.sf2;
      mac_neg  = cw.neg2;
    end else begin
      pcv_addr = cw.pcvma;
      pcv_sf   = cw.sf;
      mac_neg  = 1'b0;
    end
  end

  mac_unit #(.DATA_W(DATA_W), .COEF_W(COEF_W), .PCV_W(PCV_W)) u_mac (
    .x     (x_q),
    .h     (cw.h),
    .neg   (mac_neg),
    .acc_in(pcv_rd),
    .pcv   (pcv_new)
  );

  pcv_mem #(.DEPTH(PCVM_DEPTH), .PCV_W(PCV_W)) u_pcvm (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (pcv_clr),
    .addr (pcv_addr),
    .we   (pcv_we),
    .sf   (pcv_sf),
    .wdata(pcv_new),
    .rdata(pcv_rd),
    .y0   (y_out)
  );

  assign busy = (state == ST_RUN);

endmodule
