// coef_mem: coefficient memory of the filter processor.
//
// Holds the coefficient words in the order in which they are multiplied.
// The words are prepared before filtering starts: the coefficients are put
// in the order chosen by an ordering algorithm and each is packed with the
// PCVM address and shift flag of its update (see lpfir_cw.svh).
//
// Interface: one synchronous write port (we, waddr, wdata) used to load the
// words, and one asynchronous read port (raddr -> rdata) from which the
// sequencer fetches the current word in the same clock it is used.
// Contents are not reset: they must be loaded before use.
module coef_mem #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned CW_W  = 28
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [CW_W-1:0]          wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [CW_W-1:0]          rdata
);

  logic [CW_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
