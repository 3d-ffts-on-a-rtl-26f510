// fft3d_pkg: types and helpers shared by the single-chip 3D FFT engine.
//
// Every grid point is one complex single-precision value. The engine never does
// arithmetic on it (the 1D FFT pipelines do), so a point is carried as a packed
// struct of two IEEE-754 binary32 words. The three passes of the 3D transform
// are named after the dimension whose 1D FFTs they compute: D1 (fastest index
// x), D2 (y) and D3 (z, the dimension that is spread over the RAMs).
package fft3d_pkg;

  // One complex binary32 point: real part in the upper word.
  typedef struct packed {
    logic [31:0] re;
    logic [31:0] im;
  } cplx_t;

  localparam int unsigned CPLX_W = $bits(cplx_t);

  // Pass of the 3D FFT currently being read or written back.
  typedef enum logic [1:0] {
    PH_D1 = 2'd0,
    PH_D2 = 2'd1,
    PH_D3 = 2'd2
  } phase_t;

  // Status bits a 1D FFT pipeline reports to the controller (debug status).
  typedef struct packed {
    logic tlast_unexpected;  // last flag seen before the N-th word of a frame
    logic tlast_missing;     // N-th word of a frame arrived without the last flag
  } fft_status_t;

  localparam int unsigned STATUS_W = $bits(fft_status_t);

endpackage
