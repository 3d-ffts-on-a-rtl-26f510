// tb_fft3d_full: one complete 3D FFT on the engine at its default size.
//
// fft3d_top is instantiated with its defaults: a 32^3 cube over 32 RAMs and 32
// pipelines, FFT latency 194 cycles (the localparams below only describe the
// attached pipeline models and the reference and must match those defaults).
// One transform of random data is checked point by point against a
// double-precision 3D DFT and its start-to-done time against 3695 cycles.
module tb_fft3d_full;
  import fft3d_pkg::*;
  import fft3d_tb_pkg::*;

  localparam int unsigned N          = 32;
  localparam int unsigned P          = 32;
  localparam int unsigned L          = 194;
  localparam int unsigned RUNS       = 1;
  localparam int unsigned MAX_CYCLES = 200000;

  logic        clk, rst_n, start, busy, done, err;
  logic        host_we, host_re;
  logic [3*$clog2(N)-1:0] host_waddr, host_raddr;
  cplx_t       host_wdata, host_rdata;
  logic        fft_in_valid [P], fft_in_last [P], fft_out_ready [P], fft_out_valid [P];
  cplx_t       fft_in_data [P], fft_out_data [P];
  fft_status_t fft_status [P];

  fft3d_top dut (.*);

  `include "fft3d_e2e_body.svh"

  initial begin
    fork
      wait (e2e_done);
      begin
        repeat (MAX_CYCLES) @(posedge clk);
        failures++;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
