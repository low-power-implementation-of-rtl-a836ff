// tb_coef_mem: fills a 128 x 28-bit coefficient memory with random words,
// reads every address back through the asynchronous read port, then
// overwrites random addresses one at a time and checks that only the
// written word changed.
module tb_coef_mem;

  localparam int DEPTH = 128, CW_W = 28;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                     we;
  logic [$clog2(DEPTH)-1:0] waddr, raddr;
  logic [CW_W-1:0]          wdata, rdata;
  logic [CW_W-1:0]          model [DEPTH];

  coef_mem #(.DEPTH(DEPTH), .CW_W(CW_W)) u_dut (.*);

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
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1'b1; waddr = 7'(i); wdata = CW_W'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 7'(i); #1;
      check(rdata == model[i], $sformatf("read %0d", i));
    end
    for (int n = 0; n < 200; n++) begin
      automatic int a = int'($urandom_range(DEPTH - 1));
      @(negedge clk);
      we = 1'b1; waddr = 7'(a); wdata = CW_W'($urandom); model[a] = wdata;
      raddr = 7'(a);
      @(negedge clk);
      we = 1'b0;
      for (int i = 0; i < DEPTH; i++) begin
        raddr = 7'(i); #1;
        check(rdata == model[i], $sformatf("after write to %0d: read %0d", a, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
