// tb_pcv_mem: checks the PCVM against a model of the scheme's write rules
// (sf = 0: [A-1] <= d; sf = 1: [A-2] <= [A-1], [A-1] <= d) on a 16-cell,
// 23-bit instance. 5000 random clocks mix reads, plain writes, shift
// writes, idle clocks and occasional clears; every clock the read port
// [A] and cell 0 are compared with the model, and every cell is compared
// after each clear and at the end. Reset must leave all cells zero.
module tb_pcv_mem;

  localparam int DEPTH = 16, PCV_W = 23, AW = 4;
  int checks = 0, failures = 0;
  int n_shift = 0, n_plain = 0, n_clr = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    rst_n, clr, we, sf;
  logic [AW-1:0]           addr;
  logic signed [PCV_W-1:0] wdata, rdata, y0;
  logic signed [PCV_W-1:0] model [DEPTH];

  pcv_mem #(.DEPTH(DEPTH), .PCV_W(PCV_W)) u_dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic check_all(input string what);
    for (int i = 0; i < DEPTH; i++) begin
      addr = AW'(i); #1;
      check(rdata == model[i], $sformatf("%s: cell %0d = %0d expected %0d", what, i, rdata, model[i]));
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
    rst_n = 1'b0; clr = 1'b0; we = 1'b0; sf = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    we = 1'b0; check_all("after reset");
    for (int n = 0; n < 5000; n++) begin
      automatic int r = int'($urandom_range(99));
      clr = 1'b0; we = 1'b0; sf = 1'b0;
      addr = AW'($urandom_range(DEPTH - 1));
      wdata = PCV_W'($urandom);
      if (r < 2) clr = 1'b1;
      else if (r < 80 && addr >= 1) begin
        we = 1'b1;
        sf = (addr >= 2) && $urandom_range(1) == 1;
      end
      #1;
      check(rdata == model[addr], $sformatf("read [%0d] = %0d expected %0d", addr, rdata, model[addr]));
      check(y0 == model[0], "cell 0 output");
      @(posedge clk);
      if (clr) begin
        for (int i = 0; i < DEPTH; i++) model[i] = '0;
        n_clr++;
      end else if (we) begin
        if (sf) begin model[addr - 2] = model[addr - 1]; n_shift++; end
        else n_plain++;
        model[addr - 1] = wdata;
      end
      @(negedge clk);
      if (clr) begin clr = 1'b0; we = 1'b0; check_all("after clear"); end
    end
    we = 1'b0; clr = 1'b0;
    check_all("end");
    check(n_shift > 0 && n_plain > 0 && n_clr > 0, "all write kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
