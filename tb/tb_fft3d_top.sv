// tb_fft3d_top: end-to-end test of the 3D FFT engine at reduced size.
//
// N = 8 points per dimension over P = 4 RAMs and pipelines, so every RAM holds
// two slabs and the D3 pass moves data through the crossbars; FFT latency 12.
// Two complete transforms are run back to back on random data and checked
// point by point against a double-precision 3D DFT (see fft3d_e2e_body.svh).
module tb_fft3d_top;
  import fft3d_pkg::*;
  import fft3d_tb_pkg::*;

  localparam int unsigned N          = 8;
  localparam int unsigned P          = 4;
  localparam int unsigned L          = 12;
  localparam int unsigned RUNS       = 2;
  localparam int unsigned MAX_CYCLES = 20000;

  logic        clk, rst_n, start, busy, done, err;
  logic        host_we, host_re;
  logic [3*$clog2(N)-1:0] host_waddr, host_raddr;
  cplx_t       host_wdata, host_rdata;
  logic        fft_in_valid [P], fft_in_last [P], fft_out_ready [P], fft_out_valid [P];
  cplx_t       fft_in_data [P], fft_out_data [P];
  fft_status_t fft_status [P];

  fft3d_top #(.N(N), .P(P), .FFT_LATENCY(L)) dut (.*);

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
