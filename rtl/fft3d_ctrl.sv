// fft3d_ctrl: controller of the 3D FFT engine.
//
// Drives every control input of the RAMs, both crossbars and the 1D FFT
// pipelines for the three passes D1, D2, D3 that make up the 3D FFT. It is one
// schedule evaluated twice (fft3d_addr_gen):
//   * the read side walks base time t through each pass: RAM read enables and
//     addresses, RAM-to-FFT selects, FFT data-in valid and last;
//   * the write side is the same schedule running RD_LAT + FFT_LATENCY cycles
//     later. It yields the FFT-to-RAM selects and the RAM write enables and
//     addresses. Because a point's RAM and address never change, the write-back
//     controls are simply a delayed mirror of the read controls, and no state
//     has to be carried through the FFT latency.
// Pipeline p is skewed p cycles behind pipeline 0 in every pass, so that in D3
// the P pipelines read P different RAMs in each cycle.
//
// Pass dependency: RAM r is read for t in [r, r + W) and written for the same
// window shifted by RD_LAT + FFT_LATENCY + WR_LAT. The next pass starts its base
// time PERIOD = W + RD_LAT + FFT_LATENCY + WR_LAT cycles after the current one,
// the earliest point at which every RAM has received all its write-backs before
// its first read. The skew is thus paid once, in the last pass: done rises at
// the 3 * (W + FFT_LATENCY + 3) + P -th clock edge after the edge that samples
// start.
//
// Latencies assumed of the datapath: RAM read 1 cycle, RAM-to-FFT crossbar
// 1 cycle (RD_LAT = 2); the FFT pipeline presents output word i exactly
// FFT_LATENCY cycles after it sampled input word i; FFT-to-RAM crossbar
// 1 cycle (WR_LAT = 1), after which the RAM writes.
//
// Interface: start (pulse, ignored while busy), busy, done (one-cycle pulse in
// the cycle after the last RAM write; busy falls with it), err (sticky until the next start): set when
// a pipeline reports a status bit, when a pipeline's data-out valid differs from
// the schedule's expectation, or if two pipelines would read one RAM in the
// same cycle. fft_out_ready is held high while busy: the pipelines run in
// real-time mode and are never stalled.
// The phase split, skew and delayed-mirror write-back follow the design; the
// counters, the exact pass spacing, err and the start/done handshake are this
// implementation's choices.
module fft3d_ctrl
  import fft3d_pkg::*;
#(
  parameter int unsigned N           = 32,
  parameter int unsigned P           = 32,
  parameter int unsigned FFT_LATENCY = 194,
  localparam int unsigned LOGP   = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned AW     = 3 * $clog2(N) - $clog2(P),
  localparam int unsigned W      = N * N * N / P,
  localparam int unsigned RD_LAT = 2,
  localparam int unsigned WR_LAT = 1,
  localparam int unsigned PERIOD = W + RD_LAT + FFT_LATENCY + WR_LAT,
  localparam int unsigned T_W    = $clog2(PERIOD + P + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic            err,
  // RAMs
  output logic            ram_re    [P],
  output logic [AW-1:0]   ram_raddr [P],
  output logic            ram_we    [P],
  output logic [AW-1:0]   ram_waddr [P],
  // crossbars
  output logic [LOGP-1:0] rx_sel    [P],   // RAM-to-FFT: RAM feeding pipeline p
  output logic [LOGP-1:0] wx_sel    [P],   // FFT-to-RAM: pipeline feeding RAM r
  // 1D FFT pipelines
  output logic            fft_in_valid  [P],
  output logic            fft_in_last   [P],
  output logic            fft_out_ready [P],
  input  logic            fft_out_valid [P],
  input  fft_status_t     fft_status    [P]
);

  localparam int unsigned LAG = RD_LAT + FFT_LATENCY;   // write side behind read side

  // elaboration-time checks of the supported configurations
  if ((1 << $clog2(P)) != P) begin : g_bad_p
    $error("P must be a power of two");
  end
  if ((1 << $clog2(N)) != N || N < P || N < 2) begin : g_bad_n
    $error("N must be a power of two, at least 2 and at least P");
  end
  if (FFT_LATENCY < N) begin : g_bad_lat
    $error("an N-point FFT cannot answer before its N-th input");
  end

  // ---------------------------------------------------------------- counters
  typedef struct packed {
    logic           act;
    phase_t         ph;
    logic [T_W-1:0] t;
  } sched_t;

  sched_t rd_q, wr_q;
  logic   wr_end, fin;

  // last base time of the D3 pass: the window of lane P-1 ends at W + P - 2
  assign wr_end = wr_q.act && wr_q.ph == PH_D3 && wr_q.t == T_W'(W + P - 2);

  function automatic sched_t step(sched_t s);
    sched_t n;
    n = s;
    if (s.act) begin
      if (s.ph == PH_D3 && s.t == T_W'(W + P - 2)) begin
        n.act = 1'b0;
      end else if (s.ph != PH_D3 && s.t == T_W'(PERIOD - 1)) begin
        n.ph = phase_t'(s.ph + 2'd1);
        n.t  = '0;
      end else begin
        n.t = s.t + 1'b1;
      end
    end
    return n;
  endfunction

  logic start_ok;
  assign start_ok = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= '{act: 1'b0, ph: PH_D1, t: '0};
      wr_q <= '{act: 1'b0, ph: PH_D1, t: '0};
      busy <= 1'b0;
      fin  <= 1'b0;
      done <= 1'b0;
    end else begin
      fin  <= wr_end;                 // the last RAM write happens in this cycle
      done <= 1'b0;
      if (start_ok) begin
        rd_q <= '{act: 1'b1, ph: PH_D1, t: '0};
        busy <= 1'b1;
      end else begin
        rd_q <= step(rd_q);
      end
      // the write side follows LAG cycles behind the read side
      if (rd_q.act && rd_q.ph == PH_D1 && rd_q.t == T_W'(LAG - 1))
        wr_q <= '{act: 1'b1, ph: PH_D1, t: '0};
      else
        wr_q <= step(wr_q);
      if (fin) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ read side
  logic            a_ram_en   [P];
  logic [AW-1:0]   a_ram_addr [P];
  logic [LOGP-1:0] a_ram_ip   [P];
  logic            a_ip_en    [P];
  logic [LOGP-1:0] a_ip_ram   [P];
  logic            a_ip_last  [P];

  fft3d_addr_gen #(.N(N), .P(P), .T_W(T_W)) u_rd_sched (
    .phase   (rd_q.ph),
    .t       (rd_q.t),
    .ram_en  (a_ram_en),
    .ram_addr(a_ram_addr),
    .ram_ip  (a_ram_ip),
    .ip_en   (a_ip_en),
    .ip_ram  (a_ip_ram),
    .ip_last (a_ip_last)
  );

  logic ip_v1 [P], ip_l1 [P];   // one cycle after the read: RAM output stage

  for (genvar i = 0; i < P; i++) begin : g_rd
    assign ram_re[i]    = rd_q.act && a_ram_en[i];
    assign ram_raddr[i] = a_ram_addr[i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rx_sel[i]       <= '0;
        ip_v1[i]        <= 1'b0;
        ip_l1[i]        <= 1'b0;
        fft_in_valid[i] <= 1'b0;
        fft_in_last[i]  <= 1'b0;
      end else begin
        rx_sel[i]       <= a_ip_ram[i];
        ip_v1[i]        <= rd_q.act && a_ip_en[i];
        ip_l1[i]        <= rd_q.act && a_ip_last[i];
        fft_in_valid[i] <= ip_v1[i];
        fft_in_last[i]  <= ip_l1[i];
      end
    end
    assign fft_out_ready[i] = busy;
  end

  // two pipelines reading one RAM in the same cycle would be a schedule fault
  logic rd_conflict;
  always_comb begin
    logic [P-1:0] used;
    used        = '0;
    rd_conflict = 1'b0;
    for (int p = 0; p < P; p++) begin
      if (rd_q.act && a_ip_en[p]) begin
        if (used[a_ip_ram[p]]) rd_conflict = 1'b1;
        used[a_ip_ram[p]] = 1'b1;
      end
    end
  end

  // ----------------------------------------------------------- write side
  logic            b_ram_en   [P];
  logic [AW-1:0]   b_ram_addr [P];
  logic [LOGP-1:0] b_ram_ip   [P];
  logic            b_ip_en    [P];
  logic [LOGP-1:0] b_ip_ram   [P];
  logic            b_ip_last  [P];

  fft3d_addr_gen #(.N(N), .P(P), .T_W(T_W)) u_wr_sched (
    .phase   (wr_q.ph),
    .t       (wr_q.t),
    .ram_en  (b_ram_en),
    .ram_addr(b_ram_addr),
    .ram_ip  (b_ram_ip),
    .ip_en   (b_ip_en),
    .ip_ram  (b_ip_ram),
    .ip_last (b_ip_last)
  );

  logic out_mismatch;
  always_comb begin
    out_mismatch = 1'b0;
    for (int p = 0; p < P; p++) begin
      if (busy && (fft_out_valid[p] != (wr_q.act && b_ip_en[p]))) out_mismatch = 1'b1;
      if (busy && (fft_status[p] != '0)) out_mismatch = 1'b1;
    end
  end

  for (genvar i = 0; i < P; i++) begin : g_wr
    // the FFT-to-RAM register samples in this cycle; the RAM writes next cycle
    assign wx_sel[i] = b_ram_ip[i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ram_we[i]    <= 1'b0;
        ram_waddr[i] <= '0;
      end else begin
        ram_we[i]    <= wr_q.act && b_ram_en[i];
        ram_waddr[i] <= b_ram_addr[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  err <= 1'b0;
    else if (start_ok)                           err <= 1'b0;
    else if (rd_conflict || out_mismatch)        err <= 1'b1;
  end

  // the D3 skew guarantees one reader per RAM and cycle
  a_one_reader : assert property (@(posedge clk) disable iff (!rst_n) !rd_conflict);

endmodule
