// tb_hps_core: checks the 32-interval HPS processing block against the exact
// f_org(x) = 2/sqrt(3x+1) - 1 in double precision, with an error limit of
// 2^-14 on y (Q1.15), which is the 2^-15 output limit before the halving in
// the post-processing.
//  * The computed-coefficient instance (TUNED = 0) gets every 16-bit x in [0,1)
//    and is compared with f_org(x).
//  * The default, tuned instance gets the x that the pre-processing produces
//    for each input v in [1,4), x = floor((v-1)*2^13 * 10922 / 2^12) / 2^16,
//    and is compared with f_org((v-1)/3) = 2/sqrt(v) - 1: its constants were
//    chosen for the whole chain, so they also absorb the truncation of x.
// y must be exactly 1 for x = 0 in both. Max and mean errors are printed.
module tb_hps_core;
  import hps_pkg::*;
  int checks = 0, failures = 0;
  logic [X_W-1:0] x, xt;
  logic [Y_W-1:0] y, yt;
  real emax, esum;

  hps_core #(.TUNED(1'b0)) dut_calc (.x(x), .y(y));
  hps_core                 dut      (.x(xt), .y(yt));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [Y_W-1:0] got, input real exp, input int n,
                     input string what);
    real e;
    e = real'(got) / 32768.0 - exp;
    esum += e;
    if (e < 0) e = -e;
    if (e > emax) emax = e;
    checks++;
    if (e >= 2.0 ** (-14.0)) begin
      failures++;
      if (failures < 20) $display("FAIL %s n=%0d y=%0d err=%g", what, n, got, e);
    end
  endtask

  initial begin
    emax = 0.0; esum = 0.0;
    for (int n = 0; n < (1 << 16); n++) begin
      real xr;
      x = X_W'(n);
      #1;
      xr = real'(n) / 65536.0;
      chk(y, 2.0 / $sqrt(3.0 * xr + 1.0) - 1.0, n, "computed table, all x");
      if (n == 0) begin
        checks++;
        if (y != Y_W'(1 << Y_F)) failures++;
      end
    end
    $display("computed table: y max |err| = %e, mean err = %e", emax, esum / 65536.0);
    emax = 0.0; esum = 0.0;
    for (int n = 0; n < 3 * (1 << 13); n++) begin
      xt = X_W'((longint'(n) * 10922) >>> 12);
      #1;
      chk(yt, 2.0 / $sqrt(1.0 + real'(n) / 8192.0) - 1.0, n, "tuned table, x from v");
      if (n == 0) begin
        checks++;
        if (yt != Y_W'(1 << Y_F)) failures++;
      end
    end
    $display("tuned table: y max |err| = %e, mean err = %e", emax, esum / 24576.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
