// tb_hps_lut: reads every entry of the 32- and the 512-interval coefficient
// tables, computed (TUNED = 0) and tuned (TUNED = 1), and compares it with the
// interpolation rule evaluated in double precision:
// f_help(x) = (2/sqrt(3x+1) - 1)/(1 - x) (limit 3/8 at x = 1),
// l2 = f_help(start), k2 = f_help(end) - l2, c2 = 4 f_help(mid) - 4 l2 - 2 k2,
// j2 = k2 + c2, each rounded to its format. Computed entries may differ from
// the reference by at most one LSB (values close to a half LSB); tuned entries
// must lie within the nudging range of the reference (l2, j2, -c2 within
// 73/17/10 LSBs for 32 intervals and 128/9/128 for 512). In every table l2 of
// interval 0 must be exactly 1 and j2 must be negative.
module tb_hps_lut;
  import hps_pkg::*;
  int checks = 0, failures = 0;

  localparam hps_fmt_t F32  = hps_fmt(32);
  localparam hps_fmt_t F512 = hps_fmt(512);

  logic [F32.idx_w-1:0]                i32;
  logic [F512.idx_w-1:0]               i512;
  logic [F32.l2_w-1:0]                 l32 [2];
  logic signed [F32.j2_w-1:0]          j32 [2];
  logic [F32.c2_w-1:0]                 c32 [2];
  logic [F512.l2_w-1:0]                l512 [2];
  logic signed [F512.j2_w-1:0]         j512 [2];
  logic [F512.c2_w-1:0]                c512 [2];

  for (genvar t = 0; t < 2; t++) begin : g_dut
    hps_lut #(.INTERVALS(32),  .TUNED(t)) u32  (.idx(i32),  .l2(l32[t]),  .j2(j32[t]),  .c2n(c32[t]));
    hps_lut #(.INTERVALS(512), .TUNED(t)) u512 (.idx(i512), .l2(l512[t]), .j2(j512[t]), .c2n(c512[t]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fhelp(input real x);
    if (x >= 1.0) return 0.375;
    return (2.0 / $sqrt(3.0 * x + 1.0) - 1.0) / (1.0 - x);
  endfunction

  task automatic near(input longint got, input real exp, input int f, input int tol,
                      input string what);
    longint e;
    e = longint'($floor(exp * (2.0 ** f) + 0.5));
    checks++;
    if (got - e > tol || e - got > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, e);
    end
  endtask

  task automatic ref_coef(input int i, input int n, output real l, output real j, output real c);
    real e, m, k;
    l = fhelp(real'(i) / n);
    e = fhelp(real'(i + 1) / n);
    m = fhelp((real'(i) + 0.5) / n);
    k = e - l;
    c = 4.0 * m - 4.0 * l - 2.0 * k;
    j = k + c;
  endtask

  initial begin
    real l, j, c;
    for (int t = 0; t < 2; t++) begin
      for (int i = 0; i < 32; i++) begin
        i32 = 5'(i);
        #1;
        ref_coef(i, 32, l, j, c);
        near(longint'(l32[t]), l, F32.l2_f, t ? 73 : 1, $sformatf("I32/%0d l2[%0d]", t, i));
        near(longint'(j32[t]), j, F32.j2_f, t ? 17 : 1, $sformatf("I32/%0d j2[%0d]", t, i));
        near(longint'(c32[t]), -c, F32.c2_f, t ? 10 : 1, $sformatf("I32/%0d -c2[%0d]", t, i));
        checks++;
        if (j32[t] >= 0) failures++;
      end
      for (int i = 0; i < 512; i++) begin
        i512 = 9'(i);
        #1;
        ref_coef(i, 512, l, j, c);
        near(longint'(l512[t]), l, F512.l2_f, t ? 128 : 1, $sformatf("I512/%0d l2[%0d]", t, i));
        near(longint'(j512[t]), j, F512.j2_f, t ? 9 : 1, $sformatf("I512/%0d j2[%0d]", t, i));
        near(longint'(c512[t]), -c, F512.c2_f, t ? 128 : 1, $sformatf("I512/%0d -c2[%0d]", t, i));
        checks++;
        if (j512[t] >= 0) failures++;
      end
      i32 = '0; i512 = '0;
      #1;
      checks += 2;
      if (l32[t] != F32.l2_w'(1 << F32.l2_f)) failures++;
      if (l512[t] != F512.l2_w'(1 << F512.l2_f)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
