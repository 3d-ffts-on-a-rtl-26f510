// fft3d_addr_gen: combinational schedule of one cycle of a 3D FFT pass.
//
// Data placement. Point (x, y, z) of the N^3 cube, x being the D1 index, y the
// D2 index and z the D3 index, lives in RAM r = z mod P at address
// {z div P, y, x}: x in the low log2(N) bits, y above it, the slab number within
// the RAM on top. For N = 16 and P = 4 this is address[3:0] = D1, [7:4] = D2,
// [9:8] = D3, as in the data-mapping figure of the design. Each RAM therefore
// holds N/P whole x-y slabs.
//
// Streams. In every pass each of the P FFT pipelines takes W = N^3/P words, one
// per cycle, as W/N back-to-back N-point frames. Pipeline p runs p cycles behind
// pipeline 0 (the skew): at base time t it takes word u = t - p of its stream.
//   D1: pipeline p reads RAM p at address u (frames run along x).
//   D2: pipeline p reads RAM p; frame f = u div N, point k = u mod N;
//       address {f div N, k, f mod N} (frames run along y).
//   D3: frame g = (u div N) * P + p picks the line (y, x) = g; point k = u mod N
//       is z = k, so the word comes from RAM k mod P at address
//       {k div P, g}. Because of the skew, the P pipelines need P different
//       RAMs in every cycle: RAM r serves pipeline (t - r) mod P.
// In all passes RAM r is busy exactly for t in [r, r + W), and the RAM index
// and address of a point never change, so the same function evaluated at a
// delayed time gives the write-back controls (the delayed mirror).
//
// Outputs, all functions of (phase, t) only:
//   ram_en[r], ram_addr[r]  read (or write) enable and address of RAM r
//   ram_ip[r]               pipeline that RAM r serves (FFT-to-RAM select)
//   ip_en[p], ip_ram[p]     pipeline p takes a word, and from which RAM
//                           (RAM-to-FFT select)
//   ip_last[p]              that word is the last of an N-point frame
// The placement follows the design; the exact frame order inside each pass and
// the slab interleave z mod P are this design's reading of it.
module fft3d_addr_gen
  import fft3d_pkg::*;
#(
  parameter int unsigned N    = 32,
  parameter int unsigned P    = 32,
  parameter int unsigned T_W  = 16,
  localparam int unsigned LOGN = $clog2(N),
  localparam int unsigned LOGP = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned AW   = 3 * $clog2(N) - $clog2(P),
  localparam int unsigned W    = N * N * N / P
) (
  input  phase_t          phase,
  input  logic [T_W-1:0]  t,
  output logic            ram_en   [P],
  output logic [AW-1:0]   ram_addr [P],
  output logic [LOGP-1:0] ram_ip   [P],
  output logic            ip_en    [P],
  output logic [LOGP-1:0] ip_ram   [P],
  output logic            ip_last  [P]
);

  // log2(P) bits of the plain (unpadded) lane index; zero when P = 1.
  localparam int unsigned LP = $clog2(P);
  localparam int unsigned GW = 2 * LOGN;   // width of a {y, x} line index

  // Address of stream word u of pipeline p in the given pass.
  function automatic logic [AW-1:0] word_addr(phase_t ph, logic [T_W-1:0] u,
                                               logic [LOGP-1:0] p);
    logic [AW-1:0]     uw;
    logic [LOGN-1:0]   k;
    logic [AW-1:0]     f;
    logic [GW-1:0]     g;
    uw = u[AW-1:0];
    k  = uw[LOGN-1:0];
    f  = uw >> LOGN;                    // frame number within the pass
    unique case (ph)
      PH_D2: begin
        // f = {slab, x}; word k is y
        word_addr = AW'(((f >> LOGN) << (2 * LOGN)) | (AW'(k) << LOGN)
                        | (f & AW'(N - 1)));
      end
      PH_D3: begin
        // line g = f * P + p is {y, x}; word k is z = {slab, RAM}
        g = GW'((f << LP) | AW'(p));
        word_addr = AW'((AW'(k) >> LP) << (2 * LOGN)) | AW'(g);
      end
      default: word_addr = uw;          // D1: stream order is address order
    endcase
  endfunction

  for (genvar r = 0; r < P; r++) begin : g_lane
    logic [T_W-1:0]  t_r;     // t - r: how far lane r is into its window
    logic [LOGP-1:0] p_srv;   // pipeline served by RAM r
    logic [T_W-1:0]  u_srv;   // its stream word

    always_comb begin
      // RAM r side
      t_r      = t - T_W'(r);
      p_srv    = (phase == PH_D3) ? LOGP'(t_r) & LOGP'(P - 1) : LOGP'(r);
      u_srv    = t - T_W'(p_srv);
      ram_en[r]   = (t >= T_W'(r)) && (t_r < T_W'(W));
      ram_addr[r] = word_addr(phase, u_srv, p_srv);
      ram_ip[r]   = p_srv;
      // pipeline r side (u = t - r)
      ip_en[r]   = ram_en[r];
      ip_ram[r]  = (phase == PH_D3) ? LOGP'(t_r) & LOGP'(P - 1) : LOGP'(r);
      ip_last[r] = ram_en[r] && (t_r[LOGN-1:0] == LOGN'(N - 1));
    end
  end

endmodule
