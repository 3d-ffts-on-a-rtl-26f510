// fft1d_model: behavioural model of a streaming N-point floating point 1D FFT
// pipeline (simulation only, not synthesizable).
//
// Stands in for the vendor FFT core of the engine: binary32 complex data,
// natural-order output, pipelined streaming I/O, one word per clock in and out,
// fixed latency. A word sampled on in_data at a rising edge (in_valid high)
// leaves on out_data exactly LATENCY cycles later; when the N-th word of a
// frame arrives, the forward DFT X[k] = sum_n x[n] exp(-2 pi i n k / N) of the
// frame (unscaled) replaces the frame's words still inside the delay line, so
// output word k of a frame is X[k]. Frames may follow each other back to back.
// out_ready is accepted and ignored, as in a core run in real-time mode.
// status reports a frame whose last flag came early (tlast_unexpected) or did
// not come on the N-th word (tlast_missing), for one cycle.
module fft1d_model
  import fft3d_pkg::*;
  import fft3d_tb_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned LATENCY = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_last,
  input  cplx_t       in_data,
  input  logic        out_ready,
  output logic        out_valid,
  output logic        out_last,
  output cplx_t       out_data,
  output fft_status_t status
);

  // circular delay line: a word written at slot wp is presented again when the
  // write pointer has gone once around, LATENCY edges later
  logic  pv [LATENCY];
  logic  pl [LATENCY];
  cplx_t pd [LATENCY];
  int    wp;
  real   xr [N], xi [N];
  real   cw [N], sw [N];
  int    cnt;

  initial begin
    for (int i = 0; i < N; i++) begin
      cw[i] = $cos(2.0 * 3.14159265358979323846 * i / N);
      sw[i] = -$sin(2.0 * 3.14159265358979323846 * i / N);
    end
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) begin
        pv[i] = 1'b0;
        pl[i] = 1'b0;
        pd[i] = '0;
      end
      wp     = 0;
      cnt    = 0;
      status <= '0;
    end else begin
      fft_status_t st;
      st = '0;
      pv[wp] = in_valid;
      pl[wp] = in_valid && cnt == N - 1;
      pd[wp] = in_data;
      if (in_valid) begin
        xr[cnt] = re_of(in_data);
        xi[cnt] = im_of(in_data);
        if (in_last && cnt != N - 1) st.tlast_unexpected = 1'b1;
        if (!in_last && cnt == N - 1) st.tlast_missing = 1'b1;
        if (cnt == N - 1) begin
          for (int k = 0; k < N; k++) begin
            real ar, ai;
            ar = 0.0;
            ai = 0.0;
            for (int n = 0; n < N; n++) begin
              int j;
              j  = (n * k) % N;
              ar = ar + xr[n] * cw[j] - xi[n] * sw[j];
              ai = ai + xr[n] * sw[j] + xi[n] * cw[j];
            end
            // word k of the frame sits N-1-k slots behind the newest one
            pd[(wp + LATENCY - (N - 1 - k)) % LATENCY] = to_cplx(ar, ai);
          end
          cnt = 0;
        end else begin
          cnt = cnt + 1;
        end
      end
      wp = (wp + 1) % LATENCY;
      status <= st;
    end
  end

  assign out_valid = pv[wp];
  assign out_last  = pl[wp];
  assign out_data  = pd[wp];

endmodule
