// fft3d_top: single-chip 3D FFT engine, N^3 complex binary32 points.
//
// The whole cube stays on chip. It is split into P RAMs by x-y slabs
// (slab z lives in RAM z mod P) and each RAM has its own 1D N-point FFT
// pipeline. The 3D FFT is three passes of N^2 1D FFTs, along x (D1), y (D2)
// and z (D3). In D1 and D2 every pipeline works from its own RAM; in D3 each
// line along z crosses all RAMs, and the RAM-to-FFT crossbar gathers it while
// the FFT-to-RAM crossbar returns the results to their home addresses. Each
// point keeps one RAM and address for the whole run, so the transform is done
// in place. The controller (fft3d_ctrl) drives all RAM, crossbar and pipeline
// controls; the write-back controls are a delayed copy of the read controls.
//
// The 1D FFT pipelines are vendor cores and sit outside this module: for each
// pipeline p the ports fft_in_* feed it and fft_out_* / fft_status return its
// output. A pipeline must present output word i exactly FFT_LATENCY cycles
// after it sampled input word i, in natural order, one word per clock.
//
// Host port (this design's own choice): while not busy, host_we writes
// host_wdata to point host_waddr = {z, y, x} and host_re reads point
// host_raddr, returned on host_rdata the next cycle. Load the cube, pulse
// start, wait for done, read the transform back from the same indices.
// Host accesses are ignored while busy.
//
// Timing: done rises 3 * (N^3/P + FFT_LATENCY + 3) + P clock edges after the
// edge that samples start; with N = 32, P = 32 and FFT_LATENCY = 194 that is
// 3695 cycles.
// err is sticky until the next start (see fft3d_ctrl).
module fft3d_top
  import fft3d_pkg::*;
#(
  parameter int unsigned N           = 32,
  parameter int unsigned P           = 32,
  parameter int unsigned FFT_LATENCY = 194,
  localparam int unsigned LOGN = $clog2(N),
  localparam int unsigned LOGP = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned IW   = 3 * $clog2(N),              // point index width
  localparam int unsigned AW   = 3 * $clog2(N) - $clog2(P),  // RAM address width
  localparam int unsigned W    = N * N * N / P
) (
  input  logic            clk,
  input  logic            rst_n,
  // run control
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic            err,
  // host access to the cube
  input  logic            host_we,
  input  logic [IW-1:0]   host_waddr,
  input  cplx_t           host_wdata,
  input  logic            host_re,
  input  logic [IW-1:0]   host_raddr,
  output cplx_t           host_rdata,
  // the P external 1D FFT pipelines
  output logic            fft_in_valid  [P],
  output logic            fft_in_last   [P],
  output cplx_t           fft_in_data   [P],
  output logic            fft_out_ready [P],
  input  logic            fft_out_valid [P],
  input  cplx_t           fft_out_data  [P],
  input  fft_status_t     fft_status    [P]
);

  localparam int unsigned LP = $clog2(P);

  // ------------------------------------------------------------ controller
  logic            c_re    [P];
  logic [AW-1:0]   c_raddr [P];
  logic            c_we    [P];
  logic [AW-1:0]   c_waddr [P];
  logic [LOGP-1:0] rx_sel  [P];
  logic [LOGP-1:0] wx_sel  [P];

  fft3d_ctrl #(.N(N), .P(P), .FFT_LATENCY(FFT_LATENCY)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (start),
    .busy         (busy),
    .done         (done),
    .err          (err),
    .ram_re       (c_re),
    .ram_raddr    (c_raddr),
    .ram_we       (c_we),
    .ram_waddr    (c_waddr),
    .rx_sel       (rx_sel),
    .wx_sel       (wx_sel),
    .fft_in_valid (fft_in_valid),
    .fft_in_last  (fft_in_last),
    .fft_out_ready(fft_out_ready),
    .fft_out_valid(fft_out_valid),
    .fft_status   (fft_status)
  );

  // ------------------------------------------------------------ host port
  // point {z, y, x} -> RAM z mod P, address {z div P, y, x}
  function automatic logic [LOGP-1:0] home_ram(logic [IW-1:0] idx);
    return LOGP'(idx >> (2 * LOGN)) & LOGP'(P - 1);
  endfunction

  function automatic logic [AW-1:0] home_addr(logic [IW-1:0] idx);
    return AW'(((idx >> (2 * LOGN + LP)) << (2 * LOGN)) | (idx & IW'((N * N) - 1)));
  endfunction

  logic [LOGP-1:0] h_wram, h_rram, h_rram_q;
  assign h_wram = home_ram(host_waddr);
  assign h_rram = home_ram(host_raddr);

  always_ff @(posedge clk) begin
    if (host_re && !busy) h_rram_q <= h_rram;
  end

  // ------------------------------------------------------------ RAMs
  cplx_t ram_rdata [P];
  cplx_t ram_wdata [P];   // FFT-to-RAM crossbar output
  cplx_t ram_din   [P];

  for (genvar r = 0; r < P; r++) begin : g_ram
    logic          re, we;
    logic [AW-1:0] raddr, waddr;

    always_comb begin
      if (busy) begin
        re         = c_re[r];
        raddr      = c_raddr[r];
        we         = c_we[r];
        waddr      = c_waddr[r];
        ram_din[r] = ram_wdata[r];
      end else begin
        re         = host_re && h_rram == LOGP'(r);
        raddr      = home_addr(host_raddr);
        we         = host_we && h_wram == LOGP'(r);
        waddr      = home_addr(host_waddr);
        ram_din[r] = host_wdata;
      end
    end

    fft3d_ram #(.DEPTH(W), .DATA_W(CPLX_W)) u_ram (
      .clk  (clk),
      .re   (re),
      .raddr(raddr),
      .rdata(ram_rdata[r]),
      .we   (we),
      .waddr(waddr),
      .wdata(ram_din[r])
    );
  end

  assign host_rdata = ram_rdata[h_rram_q];

  // ------------------------------------------------------------ crossbars
  fft3d_xbar #(.NUM_IN(P), .NUM_OUT(P), .DATA_W(CPLX_W)) u_ram_to_fft (
    .clk (clk),
    .din (ram_rdata),
    .sel (rx_sel),
    .dout(fft_in_data)
  );

  fft3d_xbar #(.NUM_IN(P), .NUM_OUT(P), .DATA_W(CPLX_W)) u_fft_to_ram (
    .clk (clk),
    .din (fft_out_data),
    .sel (wx_sel),
    .dout(ram_wdata)
  );

endmodule
