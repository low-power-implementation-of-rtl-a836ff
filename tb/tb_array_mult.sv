// tb_array_mult: checks the array multiplier against the product computed
// with 64-bit integer arithmetic: all 65536 operand pairs of an 8 x 8
// instance, and 20000 random pairs (with the extreme values) of a 24 x 24
// and a 16 x 8 instance.
module tb_array_mult;

  int checks = 0, failures = 0;

  logic signed [7:0]  a8, b8;
  logic signed [15:0] p8;
  logic signed [23:0] a24, b24;
  logic signed [47:0] p24;
  logic signed [15:0] a16;
  logic signed [7:0]  b16;
  logic signed [23:0] p16;

  array_mult #(.A_W(8),  .B_W(8))  u_m8  (.a(a8),  .b(b8),  .p(p8));
  array_mult #(.A_W(24), .B_W(24)) u_m24 (.a(a24), .b(b24), .p(p24));
  array_mult #(.A_W(16), .B_W(8))  u_m16 (.a(a16), .b(b16), .p(p16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        check(longint'(p8) == longint'(i) * longint'(j), $sformatf("8x8 %0d*%0d=%0d", i, j, p8));
      end
    end
    for (int n = 0; n < 20000; n++) begin
      longint ea, eb;
      if (n < 4) begin
        a24 = (n[0]) ? 24'h800000 : 24'h7fffff;
        b24 = (n[1]) ? 24'h800000 : 24'h7fffff;
      end else begin
        a24 = 24'($urandom); b24 = 24'($urandom);
      end
      a16 = 16'($urandom); b16 = 8'($urandom);
      #1;
      ea = longint'(a24); eb = longint'(b24);
      check(longint'(p24) == ea * eb, $sformatf("24x24 %0d*%0d=%0d", a24, b24, p24));
      check(longint'(p16) == longint'(a16) * longint'(b16), $sformatf("16x8 %0d*%0d=%0d", a16, b16, p16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
