// tb_mult_su: checks the semi-generic multiplier against integer arithmetic.
//
// Three instances: the 3x3 signed example of the array structure, tried on all
// 64 operand pairs (including 2 x -2 = -4, where a plain unsigned array gives
// 12); an 11x14 signed-operand instance as used for j2*xw, and a 15x14
// unsigned instance as used for the 1/3 constant, both with random operands
// plus the extreme values. The reference is the product of the operands
// widened to 64-bit integers, with y sign-extended when it is signed.
module tb_mult_su;
  int checks = 0, failures = 0;

  logic [2:0]  a3, b3;
  logic [5:0]  p3;
  logic [10:0] a11;
  logic [13:0] b14s;
  logic [24:0] p25;
  logic [14:0] a15;
  logic [13:0] b14u;
  logic [28:0] p29;

  mult_su #(.WX(3),  .WY(3),  .Y_SIGNED(1'b1)) u3  (.x(a3),  .y(b3),   .p(p3));
  mult_su #(.WX(11), .WY(14), .Y_SIGNED(1'b1)) u11 (.x(a11), .y(b14s), .p(p25));
  mult_su #(.WX(15), .WY(14), .Y_SIGNED(1'b0)) u15 (.x(a15), .y(b14u), .p(p29));

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
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j);
        #1 chk(longint'($signed(p3)), longint'(i) * longint'($signed(b3)),
               $sformatf("3x3 %0d*%0d", i, j));
      end
    end
    a3 = 3'b010; b3 = 3'b110;
    #1 chk(longint'($signed(p3)), -4, "2 x -2");

    for (int n = 0; n < 4000; n++) begin
      a11  = (n == 0) ? 11'h7FF : 11'($urandom);
      b14s = (n == 0) ? 14'h2000 : (n == 1) ? 14'h1FFF : 14'($urandom);
      a15  = (n == 0) ? 15'h7FFF : 15'($urandom);
      b14u = (n == 0) ? 14'h3FFF : 14'($urandom);
      #1;
      chk(longint'($signed(p25)), longint'(a11) * longint'($signed(b14s)),
          $sformatf("11x14s %0d*%0d", a11, $signed(b14s)));
      chk(longint'(p29), longint'(a15) * longint'(b14u),
          $sformatf("15x14u %0d*%0d", a15, b14u));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
