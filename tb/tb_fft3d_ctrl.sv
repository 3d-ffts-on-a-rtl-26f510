// tb_fft3d_ctrl: self-checking test of the 3D FFT controller on its own.
//
// The RAMs, crossbars and FFT pipelines are replaced by a symbolic model in
// which every word is the tag {z, y, x} of the grid point it belongs to. The
// model RAMs start with each tag at its home (RAM z mod P, address
// {z div P, y, x}); the controller's enables, addresses and selects then move
// tags exactly as the real datapath would move data (RAM read 1 cycle,
// crossbars 1 cycle each, pipelines a fixed LATENCY). The test checks, with no
// knowledge of how the controller computes its schedule:
//   * every frame a pipeline receives is one whole line of the cube along the
//     dimension of the current pass, in natural order, with last on word N-1;
//   * every point passes through a pipeline exactly three times, once per pass;
//   * a point is never read for a pass before its previous pass was written
//     back, and is always written back to its home RAM and address;
//   * the start-to-done time is 3 * (N^3/P + L + 3) + P edges, err stays low;
//   * err is raised by a stray data-out valid and by a pipeline status bit.
// Three runs: clean, one with a stray valid, one with a status bit.
module tb_fft3d_ctrl;
  import fft3d_pkg::*;

  localparam int unsigned N    = 8;
  localparam int unsigned P    = 4;
  localparam int unsigned L    = 12;
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned LOGP = $clog2(P);
  localparam int unsigned AW   = 3 * LOGN - LOGP;
  localparam int unsigned W    = N * N * N / P;
  localparam int unsigned NPTS = N * N * N;
  localparam int unsigned EXPECT_CYCLES = 3 * (W + L + 3) + P;

  logic            clk = 1'b0, rst_n, start, busy, done, err;
  logic            ram_re [P], ram_we [P];
  logic [AW-1:0]   ram_raddr [P], ram_waddr [P];
  logic [LOGP-1:0] rx_sel [P], wx_sel [P];
  logic            fft_in_valid [P], fft_in_last [P], fft_out_ready [P];
  logic            fft_out_valid [P];
  fft_status_t     fft_status [P];

  fft3d_ctrl #(.N(N), .P(P), .FFT_LATENCY(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- symbolic model
  int mem [P][W];
  int ram_out [P], rx_reg [P], wx_reg [P];
  int line_tag [P][L];
  logic line_v [P][L];
  int n_read [NPTS], n_fft [NPTS], n_write [NPTS];
  int frame_pos [P], frame_base [P], frame_pass [P];
  logic inject_valid = 1'b0, inject_status = 1'b0;

  function automatic int home_ram(int tag);
    return (tag / (N * N)) % P;
  endfunction

  function automatic int home_addr(int tag);
    return (tag / (N * N * P)) * N * N + tag % (N * N);
  endfunction

  function automatic int coord(int tag, int d);
    return (d == 0) ? tag % N : (d == 1) ? (tag / N) % N : tag / (N * N);
  endfunction

  for (genvar p = 0; p < P; p++) begin : g_out
    assign fft_out_valid[p] = line_v[p][L-1] || (p == 0 && inject_valid);
    assign fft_status[p]    = (p == P - 1 && inject_status) ? 2'b01 : 2'b00;
  end

  task automatic reset_model();
    for (int i = 0; i < NPTS; i++) begin
      mem[home_ram(i)][home_addr(i)] = i;
      n_read[i]  = 0;
      n_fft[i]   = 0;
      n_write[i] = 0;
    end
    for (int p = 0; p < P; p++) begin
      frame_pos[p] = 0;
      for (int j = 0; j < L; j++) begin
        line_v[p][j]   = 1'b0;
        line_tag[p][j] = 0;
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      int ram_out_n [P], rx_n [P], wx_n [P];
      // RAM write ports (word from the FFT-to-RAM register)
      for (int r = 0; r < P; r++)
        if (ram_we[r]) begin
          int tg;
          tg = wx_reg[r];
          check($sformatf("RAM %0d addr %0d written with point %0d", r, ram_waddr[r], tg),
                home_ram(tg) == r && home_addr(tg) == int'(ram_waddr[r]));
          n_write[tg]++;
          mem[r][ram_waddr[r]] = tg;
        end
      // RAM read ports
      for (int r = 0; r < P; r++) begin
        ram_out_n[r] = ram_out[r];
        if (ram_re[r]) begin
          int tg;
          tg = mem[r][ram_raddr[r]];
          check($sformatf("point %0d read before its write-back", tg), n_read[tg] == n_write[tg]);
          n_read[tg]++;
          ram_out_n[r] = tg;
        end
      end
      // crossbars
      for (int p = 0; p < P; p++) rx_n[p] = ram_out[rx_sel[p]];
      for (int r = 0; r < P; r++) wx_n[r] = line_tag[wx_sel[r]][L-1];
      // pipelines: frame check and delay line
      for (int p = 0; p < P; p++) begin
        for (int j = L - 1; j > 0; j--) begin
          line_v[p][j]   = line_v[p][j-1];
          line_tag[p][j] = line_tag[p][j-1];
        end
        line_v[p][0]   = fft_in_valid[p];
        line_tag[p][0] = rx_reg[p];
        if (fft_in_valid[p]) begin
          int tg, d, k;
          tg = rx_reg[p];
          d  = n_fft[tg];
          k  = frame_pos[p];
          if (k == 0) begin
            frame_base[p] = tg;
            frame_pass[p] = d;
          end
          check($sformatf("pipeline %0d word %0d: point %0d not on the line (pass %0d)", p, k, tg, d),
                d < 3 && coord(tg, d) == k && frame_pass[p] == d &&
                coord(tg, (d + 1) % 3) == coord(frame_base[p], (d + 1) % 3) &&
                coord(tg, (d + 2) % 3) == coord(frame_base[p], (d + 2) % 3));
          check("last flag on word N-1 only", fft_in_last[p] == (k == N - 1));
          n_fft[tg]++;
          frame_pos[p] = (k + 1) % N;
        end
      end
      ram_out = ram_out_n;
      rx_reg  = rx_n;
      wx_reg  = wx_n;
    end
  end

  // ---------------------------------------------------------- stimulus
  initial begin
    int cyc;
    rst_n = 1'b0;
    start = 1'b0;
    reset_model();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int run = 0; run < 3; run++) begin
      reset_model();
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cyc = 0;
      while (!done) begin
        @(posedge clk);
        cyc++;
        check("ready held while busy", !busy || fft_out_ready[0]);
        if (cyc == 5 && run == 1) inject_valid <= 1'b1;
        if (cyc == 6 && run == 1) inject_valid <= 1'b0;
        if (cyc == 300 && run == 2) inject_status <= 1'b1;
        if (cyc == 301 && run == 2) inject_status <= 1'b0;
      end
      check($sformatf("run %0d: %0d cycles, expected %0d", run, cyc, EXPECT_CYCLES),
            cyc == EXPECT_CYCLES);
      check("busy falls with done", !busy);
      if (run == 0) begin
        check("err low on a clean run", !err);
        for (int i = 0; i < NPTS; i++)
          check($sformatf("point %0d: %0d reads, %0d FFTs, %0d writes", i, n_read[i], n_fft[i], n_write[i]),
                n_read[i] == 3 && n_fft[i] == 3 && n_write[i] == 3);
      end else begin
        check($sformatf("run %0d: err raised by injected fault", run), err);
      end
      repeat (5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
