// tb_hps_invsqrt_untuned: exhaustive end-to-end test of hps_invsqrt with the computed (untuned) coefficient table.
//
// Every one of the 3*2^13 = 24576 representable inputs v in [1,4) is applied
// from a testbench register on a falling clock edge. The test checks that the
// outputs do not change before the next rising edge and hold the new result
// just after it (one-cycle latency), that |z - 1/sqrt(v)| < 2^-15 computed in
// double precision, that z is exactly 1 for v = 1, that |zz - 1/v| < 2^-14, and
// a set of bit-exact vectors from an independent fixed-point model of the same
// formats. It also checks that reset clears the outputs, and counts how often
// each mechanism of the datapath occurs: every look-up-table interval, each
// code of the integral bits of v handled by the pre-processing subtraction,
// and both values of the integral bit of y in the post-processing. A mechanism
// that never occurs counts as a failure. The error statistics of z (max,
// mean, median, standard deviation, RMS and skewness) are printed; with the
// tuned coefficient table the mean error must also stay below 5e-8.
module tb_hps_invsqrt_untuned;
  import hps_pkg::*;
  localparam int unsigned I = 32;
  localparam int unsigned NV = 3 * (1 << V_F);

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic [V_W-1:0]  v = V_W'(1 << V_F);
  logic [Z_W-1:0]  z;
  logic [ZZ_W-1:0] zz;

  int checks = 0, failures = 0;

  hps_invsqrt #(.TUNED(1'b0)) dut (.clk(clk), .rst_n(rst_n), .v(v), .z(z), .zz(zz));

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (NV * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Bit-exact vectors {v, z, zz}.
  typedef struct { int v; int z; int zz; } vec_t;
  vec_t golden [12] = '{'{8192, 65536, 131072}, '{8193, 65533, 131060}, '{8194, 65528, 131040}, '{9189, 61879, 116852}, '{12288, 53510, 87381}, '{16383, 46342, 65538}, '{16384, 46341, 65536}, '{20537, 41392, 52285}, '{24575, 37838, 43692}, '{24576, 37837, 43690}, '{28192, 35328, 38088}, '{32767, 32769, 32770}};

  int  hit_interval [I];
  int  hit_code [4];
  int  hit_ymsb [2];
  int  n_used;
  real emax, esum, ezmax, err, ezz;
  real errs[$];
  logic [Z_W-1:0]  z_prev;
  logic [ZZ_W-1:0] zz_prev;

  initial begin
    emax = 0.0; esum = 0.0; ezmax = 0.0;
    foreach (hit_interval[k]) hit_interval[k] = 0;
    foreach (hit_code[k]) hit_code[k] = 0;
    hit_ymsb[0] = 0; hit_ymsb[1] = 0;

    // Reset clears the registered outputs.
    repeat (3) @(posedge clk);
    #1 check(z == '0 && zz == '0, "reset clears outputs");
    @(negedge clk) rst_n = 1'b1;

    for (int n = 0; n < int'(NV); n++) begin
      real vr, zr, zzr;
      @(negedge clk);
      z_prev  = z;
      zz_prev = zz;
      v = V_W'((1 << V_F) + n);
      #1;
      hit_interval[dut.u_core.xi]++;
      hit_code[v[V_W-1 -: 2]]++;
      hit_ymsb[dut.u_core.y[Y_W-1]]++;
      // Registered: nothing moves before the clock edge.
      @(posedge clk);
      #0 check(z == z_prev && zz == zz_prev, "outputs stable before the edge");
      #1;
      vr  = real'(v) / real'(1 << V_F);
      zr  = 1.0 / $sqrt(vr);
      zzr = 1.0 / vr;
      err = real'(z) / real'(1 << Z_F) - zr;
      ezz = real'(zz) / real'(1 << ZZ_F) - zzr;
      esum += err;
      errs.push_back(err);
      if (err < 0 ? -err > emax : err > emax) emax = (err < 0) ? -err : err;
      if (ezz < 0 ? -ezz > ezmax : ezz > ezmax) ezmax = (ezz < 0) ? -ezz : ezz;
      check((err < 0 ? -err : err) < 2.0 ** (-15.0),
            $sformatf("z error v=%0d z=%0d err=%g", v, z, err));
      check((ezz < 0 ? -ezz : ezz) < 2.0 ** (-14.0),
            $sformatf("zz error v=%0d zz=%0d err=%g", v, zz, ezz));
      if (n == 0) begin
        check(z == Z_W'(1 << Z_F), "z == 1 exactly for v = 1");
        check(zz == ZZ_W'(1 << ZZ_F), "zz == 1 exactly for v = 1");
      end
      foreach (golden[g]) begin
        if (golden[g].v == int'(v)) begin
          check(int'(z) == golden[g].z && int'(zz) == golden[g].zz,
                $sformatf("golden v=%0d z=%0d/%0d zz=%0d/%0d", v, z, golden[g].z,
                          zz, golden[g].zz));
        end
      end
    end

    // Mechanism coverage.
    n_used = 0;
    foreach (hit_interval[k]) if (hit_interval[k] > 0) n_used++;
    foreach (hit_interval[k]) check(hit_interval[k] > 0, $sformatf("interval %0d used", k));
    for (int c = 1; c < 4; c++) check(hit_code[c] > 0, $sformatf("integral code %0d", c));
    check(hit_code[0] == 0, "no integral code 00");
    check(hit_ymsb[0] > 0 && hit_ymsb[1] > 0, "both post-processing cases");

    $display("intervals used: %0d of %0d; integral codes 01/10/11: %0d/%0d/%0d; y>=1: %0d",
             n_used, I, hit_code[1], hit_code[2], hit_code[3], hit_ymsb[1]);
    $display("z  max |err| = %e (%0.2f bits), mean err = %e", emax, -$ln(emax) / $ln(2.0),
             esum / real'(NV));
    $display("zz max |err| = %e", ezmax);
    begin
      real mean, m2, m3, sd, rms, med;
      mean = esum / real'(NV);
      m2 = 0.0; m3 = 0.0; rms = 0.0;
      foreach (errs[k]) begin
        m2  += (errs[k] - mean) ** 2;
        m3  += (errs[k] - mean) ** 3;
        rms += errs[k] ** 2;
      end
      sd  = $sqrt(m2 / real'(NV));
      rms = $sqrt(rms / real'(NV));
      errs.sort();
      med = (errs[NV/2 - 1] + errs[NV/2]) / 2.0;
      if (0) check((mean < 0 ? -mean : mean) < 5.0e-8, "tuned table: |mean error| < 5e-8");
      $display("z  median err = %e, SD = %e, RMS = %e, skew = %e", med, sd, rms,
               (m3 / real'(NV)) / (sd ** 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
