// tb_hps_preproc: applies every input v in [1,4) (Q2.13) to the
// pre-processing block. Each x (Q0.16) is compared bit-exactly with
// floor(n * 10922 / 2^12), where n = (v - 1) * 2^13 is an integer and
// 10922 = floor(2^15/3), computed with integer arithmetic. Its value must also
// lie within 2^-14 + 2^-16 of the exact (v - 1)/3: the truncated constant alone
// costs up to 2^-14 near v = 4, the truncation of x another 2^-16.
module tb_hps_preproc;
  import hps_pkg::*;
  int checks = 0, failures = 0;
  logic [V_W-1:0] v;
  logic [X_W-1:0] x;

  hps_preproc dut (.v(v), .x(x));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 1 << 13; n < (1 << 15); n++) begin
      longint exp;
      real xr, d;
      v = V_W'(n);
      #1;
      exp = ((longint'(n) - 8192) * 10922) >>> 12;
      xr  = (real'(n) / 8192.0 - 1.0) / 3.0;
      d   = real'(x) / 65536.0 - xr;
      checks += 2;
      if (longint'(x) != exp) begin
        failures++;
        if (failures < 20) $display("FAIL v=%0d x=%0d expected %0d", n, x, exp);
      end
      if ((d < 0 ? -d : d) >= 2.0 ** (-14.0) + 2.0 ** (-16.0)) begin
        failures++;
        if (failures < 20) $display("FAIL v=%0d x error %g", n, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
