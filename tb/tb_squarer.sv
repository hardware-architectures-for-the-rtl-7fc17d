// tb_squarer: checks the folded squarer against integer multiplication:
// all 2048 inputs of an 11-bit instance (the xw^2 of the 32-interval
// datapath) and 5000 random plus extreme inputs of a 17-bit instance (the
// z^2 of the inverse output).
module tb_squarer;
  int checks = 0, failures = 0;

  logic [10:0] a11;
  logic [21:0] p22;
  logic [16:0] a17;
  logic [33:0] p34;

  squarer #(.W(11)) u11 (.a(a11), .p(p22));
  squarer #(.W(17)) u17 (.a(a17), .p(p34));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 2048; i++) begin
      a11 = 11'(i);
      #1 chk(longint'(p22), longint'(i) * longint'(i), $sformatf("11b %0d", i));
    end
    for (int n = 0; n < 5000; n++) begin
      a17 = (n == 0) ? 17'h1FFFF : (n == 1) ? 17'h10000 : 17'($urandom);
      #1 chk(longint'(p34), longint'(a17) * longint'(a17), $sformatf("17b %0d", a17));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
