// tb_mac_unit: checks pcv = acc_in +/- x * h of the multiply-add unit at
// 8-bit data and coefficients and a 23-bit PCV, for 20000 random operand
// sets with both signs of neg, against 64-bit integer arithmetic reduced to
// 23 bits.
module tb_mac_unit;

  localparam int PCV_W = 23;
  int checks = 0, failures = 0;

  logic signed [7:0]       x, h;
  logic                    neg;
  logic signed [PCV_W-1:0] acc_in, pcv;

  mac_unit #(.DATA_W(8), .COEF_W(8), .PCV_W(PCV_W)) u_dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int n = 0; n < 20000; n++) begin
      longint e;
      x = 8'($urandom); h = 8'($urandom); neg = 1'($urandom);
      acc_in = PCV_W'($urandom);
      #1;
      e = longint'(acc_in) + (neg ? -1 : 1) * longint'(x) * longint'(h);
      checks++;
      if (pcv != PCV_W'(e)) begin
        failures++;
        if (failures <= 20) $display("FAIL: %0d %s %0d*%0d gave %0d", acc_in, neg ? "-" : "+", x, h, pcv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
