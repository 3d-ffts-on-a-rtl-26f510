// tb_fft3d_sizes: the 3D FFT engine on the cube sizes and pipeline counts of the
// published results, side by side: 16^3 with 16 and with 8 pipelines and 32^3
// with 8 pipelines. (32^3 with 32 pipelines is tb_fft3d_full; 64^3 is left out
// because a 64-pipeline build takes too long to compile for a routine test.)
//
// Each is one complete transform of random data checked point by point against
// a double-precision 3D DFT. The FFT latencies (120 cycles for 16 points, 194
// for 32) stand in for the vendor cores' unpublished latencies and
// were fitted to the published cycle counts; the test checks the formula
// 3 * (N^3/P + L + 3) + P inside each harness and, against the published
// counts 1149, 1916 and 12907 cycles, a match within 0.5 %.
module tb_fft3d_sizes;

  localparam int NCFG = 3;
  localparam int PUBLISHED [NCFG] = '{1149, 1916, 12907};

  int   c [NCFG], f [NCFG], cyc [NCFG];
  logic d [NCFG];

  fft3d_e2e #(.N(16), .P(16), .L(120)) u_16_16 (.checks_o(c[0]), .failures_o(f[0]), .cycles_o(cyc[0]), .done_o(d[0]));
  fft3d_e2e #(.N(16), .P(8),  .L(120)) u_16_8  (.checks_o(c[1]), .failures_o(f[1]), .cycles_o(cyc[1]), .done_o(d[1]));
  fft3d_e2e #(.N(32), .P(8),  .L(194)) u_32_8  (.checks_o(c[2]), .failures_o(f[2]), .cycles_o(cyc[2]), .done_o(d[2]));

  int checks, failures;

  initial begin
    fork
      begin
        #1;
        wait (d[0] && d[1] && d[2]);
      end
      begin
        #20ms;
        failures++;
        $display("watchdog expired");
      end
    join_any
    checks   += c[0] + c[1] + c[2];
    failures += f[0] + f[1] + f[2];
    for (int i = 0; i < NCFG; i++) begin
      int diff;
      diff = cyc[i] - PUBLISHED[i];
      if (diff < 0) diff = -diff;
      checks++;
      $display("configuration %0d: %0d cycles, published %0d", i, cyc[i], PUBLISHED[i]);
      if (diff * 200 > PUBLISHED[i]) begin
        failures++;
        $display("FAIL: configuration %0d more than 0.5%% off the published cycle count", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
