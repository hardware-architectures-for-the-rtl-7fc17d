// tb_hps_postproc: applies every y in [0,1] (Q1.15) to the post-processing
// block and checks that z, read as Q1.16, equals (y + 1)/2 exactly, that is
// z = y + 2^15 as integers.
module tb_hps_postproc;
  import hps_pkg::*;
  int checks = 0, failures = 0;
  logic [Y_W-1:0] y;
  logic [Z_W-1:0] z;

  hps_postproc dut (.y(y), .z(z));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n <= (1 << 15); n++) begin
      y = Y_W'(n);
      #1;
      checks++;
      if (int'(z) != n + (1 << 15)) begin
        failures++;
        if (failures < 20) $display("FAIL y=%0d z=%0d", n, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
