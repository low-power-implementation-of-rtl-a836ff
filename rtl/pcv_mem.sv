// pcv_mem: Pre-Calculated Value Memory (PCVM) with the scheme's shift write.
//
// Every access is relative to the address PCVMA taken from the current
// coefficient word:
//   rdata = [PCVMA]                         (asynchronous read, feeds the adder)
//   on a write with sf = 0:  [PCVMA-1] <= wdata
//   on a write with sf = 1:  [PCVMA-2] <= [PCVMA-1], [PCVMA-1] <= wdata
// The shift keeps the previous sample's value of a filter state available
// to a tap that is processed later in the same sample, which is what allows
// the coefficients to be multiplied in any order. Cell 0 holds the filter
// output y(n) once all words of a sample have been processed. Cells that
// are never written stay at zero and supply the zero term of the last tap.
//
// Interface: clk, rst_n (asynchronous, active low) and clr (synchronous)
// both set every cell to zero, as the scheme requires before filtering.
// addr, we, sf, wdata, rdata as above; y0 shows cell 0. A write takes
// effect at the clock edge; the next clock's read sees it.
//
// The read and write rules are the scheme's; the asynchronous read, the
// clear input and the register-array realisation are this design's choice.
module pcv_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned PCV_W = 23
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic [$clog2(DEPTH)-1:0]   addr,
  input  logic                       we,
  input  logic                       sf,
  input  logic signed [PCV_W-1:0]    wdata,
  output logic signed [PCV_W-1:0]    rdata,
  output logic signed [PCV_W-1:0]    y0
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic signed [PCV_W-1:0] mem [DEPTH];
  logic [AW-1:0] addr_m1, addr_m2;

  assign addr_m1 = addr - AW'(1);
  assign addr_m2 = addr - AW'(2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[addr_m1] <= wdata;
      if (sf) mem[addr_m2] <= mem[addr_m1];
    end
  end

  assign rdata = mem[addr];
  assign y0    = mem[0];

  // A write lands below PCVMA, a shift two below it.
  a_write_addr: assert property (@(posedge clk) disable iff (!rst_n)
    we |-> (addr >= AW'(1)) && (!sf || addr >= AW'(2)));

endmodule
