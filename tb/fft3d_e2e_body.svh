// fft3d_e2e_body.svh: body shared by the end-to-end testbenches of fft3d_top.
//
// Included inside a module that has already declared the localparams N, P,
// L (FFT latency) and RUNS, the clock clk, the reset rst_n, the DUT port
// signals and the DUT instance `dut`. It counts checks and failures and sets
// e2e_done when finished; the enclosing module reports and ends the run. It attaches P behavioural
// FFT pipelines, loads a random cube through the host port, runs the 3D FFT,
// reads the cube back and compares every point with a 3D DFT computed here in
// double precision, pass by pass (three sets of 1D DFTs on a plain array, so
// independent of the engine's data placement and schedule). It also checks the
// cycle count from start to done against 3 * (N^3/P + L + 3) + P, that err
// stays low, and that each mechanism of the engine occurred: the skew between
// pipelines, the three passes, a D3 crossbar setting other than the identity,
// write-back of one pass overlapping the reads of the next, and a start pulse
// ignored while busy.

  localparam int unsigned NPTS = N * N * N;
  localparam int unsigned EXPECT_CYCLES = 3 * (NPTS / P + L + 3) + P;

  int   checks = 0, failures = 0;
  logic e2e_done = 1'b0;
  int   last_cycles = 0;

  // ------------------------------------------------- FFT pipeline models
  for (genvar p = 0; p < P; p++) begin : g_fft
    logic out_last_unused;
    fft1d_model #(.N(N), .LATENCY(L)) u_fft (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (fft_in_valid[p]),
      .in_last  (fft_in_last[p]),
      .in_data  (fft_in_data[p]),
      .out_ready(fft_out_ready[p]),
      .out_valid(fft_out_valid[p]),
      .out_last (out_last_unused),
      .out_data (fft_out_data[p]),
      .status   (fft_status[p])
    );
  end

  // ------------------------------------------------- clock
  initial clk = 1'b0;
  always #5 clk = ~clk;

  // ------------------------------------------------- mechanism counters
  int n_skew = 0, n_pass = 0, n_transpose = 0, n_overlap = 0, n_ignored = 0;
  logic v0_q = 1'b0;

  always @(posedge clk) begin
    if (rst_n && busy) begin
      if (fft_in_valid[0] != fft_in_valid[P-1]) n_skew++;
      if (fft_in_valid[0] && !v0_q) n_pass++;
      for (int p = 0; p < P; p++)
        if (fft_in_valid[p] && dut.rx_sel[p] != p[$bits(dut.rx_sel[p])-1:0]) begin
          n_transpose++;
          break;
        end
      if (dut.u_ctrl.rd_q.act && dut.u_ctrl.wr_q.act &&
          dut.u_ctrl.rd_q.ph != dut.u_ctrl.wr_q.ph) n_overlap++;
    end
    v0_q <= fft_in_valid[0];
  end

  // ------------------------------------------------- reference
  real cr [NPTS], ci [NPTS];   // cube, index {z, y, x}

  function automatic int idx(int x, int y, int z);
    return (z * N + y) * N + x;
  endfunction

  // 1D DFTs along dimension d (0: x, 1: y, 2: z) over the whole cube
  task automatic ref_pass(int d);
    real tr [N], ti [N], tc [N], ts [N];
    for (int i = 0; i < N; i++) begin
      tc[i] = $cos(-2.0 * 3.14159265358979323846 * i / N);
      ts[i] = $sin(-2.0 * 3.14159265358979323846 * i / N);
    end
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        for (int k = 0; k < N; k++) begin
          real sr, si;
          sr = 0.0;
          si = 0.0;
          for (int n = 0; n < N; n++) begin
            int j, m;
            j  = (d == 0) ? idx(n, a, b) : (d == 1) ? idx(a, n, b) : idx(a, b, n);
            m  = (n * k) % N;
            sr = sr + cr[j] * tc[m] - ci[j] * ts[m];
            si = si + cr[j] * ts[m] + ci[j] * tc[m];
          end
          tr[k] = sr;
          ti[k] = si;
        end
        for (int k = 0; k < N; k++) begin
          int j;
          j = (d == 0) ? idx(k, a, b) : (d == 1) ? idx(a, k, b) : idx(a, b, k);
          cr[j] = tr[k];
          ci[j] = ti[k];
        end
      end
  endtask

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------- stimulus
  initial begin
    int   cyc;
    real  tol, worst;
    rst_n      = 1'b0;
    start      = 1'b0;
    host_we    = 1'b0;
    host_re    = 1'b0;
    host_waddr = '0;
    host_raddr = '0;
    host_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    for (int run = 0; run < RUNS; run++) begin
      // load a random cube, values in [-1, 1)
      for (int i = 0; i < NPTS; i++) begin
        cr[i] = (real'($urandom_range(0, 65535)) - 32768.0) / 32768.0;
        ci[i] = (real'($urandom_range(0, 65535)) - 32768.0) / 32768.0;
        host_we    <= 1'b1;
        host_waddr <= i[$bits(host_waddr)-1:0];
        host_wdata <= to_cplx(cr[i], ci[i]);
        @(posedge clk);
      end
      host_we <= 1'b0;
      @(posedge clk);

      // run
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cyc = 0;                  // clock edges after the one that sampled start
      repeat (20) @(posedge clk);
      cyc += 20;
      start <= 1'b1;            // must be ignored: the engine is busy
      @(posedge clk);
      start <= 1'b0;
      cyc++;
      if (busy) n_ignored++;
      while (!done) begin
        @(posedge clk);
        cyc++;
      end
      check($sformatf("cycles start->done %0d, expected %0d", cyc, EXPECT_CYCLES),
            cyc == EXPECT_CYCLES);
      check("err stays low", !err);
      $display("N=%0d P=%0d run %0d: %0d cycles from start to done", N, P, run, cyc);
      last_cycles = cyc;

      ref_pass(0);
      ref_pass(1);
      ref_pass(2);
      tol   = 2.0e-5 * $sqrt(real'(NPTS));
      worst = 0.0;

      // read back and compare: the word read at an edge is on host_rdata after it
      @(posedge clk);
      for (int i = 0; i < NPTS; i++) begin
        host_re    <= 1'b1;
        host_raddr <= i[$bits(host_raddr)-1:0];
        @(posedge clk);
        #1;
        begin
          real er, ei;
          er = re_of(host_rdata) - cr[i];
          ei = im_of(host_rdata) - ci[i];
          if (er < 0) er = -er;
          if (ei < 0) ei = -ei;
          if (er > worst) worst = er;
          if (ei > worst) worst = ei;
          check($sformatf("point %0d: got (%f, %f) expected (%f, %f)", i,
                          re_of(host_rdata), im_of(host_rdata), cr[i], ci[i]),
                er <= tol && ei <= tol);
        end
      end
      host_re <= 1'b0;
      $display("run %0d: largest error %g (tolerance %g)", run, worst, tol);
    end

    $display("mechanisms: skew %0d cycles, passes %0d, D3 transpose %0d cycles, pass overlap %0d cycles, ignored start %0d",
             n_skew, n_pass, n_transpose, n_overlap, n_ignored);
    check("skew between pipelines occurred", n_skew > 0);
    check("three passes per run", n_pass == 3 * RUNS);
    check("D3 crossbar transposed", n_transpose > 0);
    check("write-back overlapped next pass reads", n_overlap > 0);
    check("start ignored while busy", n_ignored > 0);
    e2e_done = 1'b1;
  end
