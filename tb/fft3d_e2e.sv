// fft3d_e2e: self-contained end-to-end harness for one size of the 3D FFT engine.
//
// Instantiates fft3d_top with the given N, P and FFT latency, P behavioural
// FFT pipelines and the checking sequence of fft3d_e2e_body.svh (random cube in,
// 3D FFT, every point compared with a double-precision 3D DFT, cycle count,
// mechanisms). Runs on its own clock; reports its counts on the ports so that
// one testbench can run several sizes side by side.
module fft3d_e2e
  import fft3d_pkg::*;
  import fft3d_tb_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 16,
  parameter int unsigned L = 120
) (
  output int   checks_o,
  output int   failures_o,
  output int   cycles_o,
  output logic done_o
);

  localparam int unsigned RUNS = 1;

  logic        clk, rst_n, start, busy, done, err;
  logic        host_we, host_re;
  logic [3*$clog2(N)-1:0] host_waddr, host_raddr;
  cplx_t       host_wdata, host_rdata;
  logic        fft_in_valid [P], fft_in_last [P], fft_out_ready [P], fft_out_valid [P];
  cplx_t       fft_in_data [P], fft_out_data [P];
  fft_status_t fft_status [P];

  fft3d_top #(.N(N), .P(P), .FFT_LATENCY(L)) dut (.*);

  `include "fft3d_e2e_body.svh"

  assign checks_o   = checks;
  assign failures_o = failures;
  assign cycles_o   = last_cycles;
  assign done_o     = e2e_done;

endmodule
