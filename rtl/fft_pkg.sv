// fft_pkg: types and constants shared by the FFT processor.
//
// A complex sample is 32 bits: the real part in the upper 16 bits and the
// imaginary part in the lower 16 bits, the layout the SRAM words use. The
// processor moves 8 samples per cycle (8 lanes onto 8 banks per memory group).
// The 16-bit component width is this design's choice, matching 32-bit words.
package fft_pkg;
  localparam int DW     = 16;          // bits per real / imaginary component
  localparam int LANES  = 8;           // parallel lanes = banks per group
  localparam int NMAX   = 4096;        // largest transform size
  localparam int DEPTH  = NMAX / LANES;// words per bank (512)
  localparam int AB     = $clog2(DEPTH);
  localparam int LB     = $clog2(NMAX);// label (sample index) bits

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Phases of one transform.
  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,
    PH_LOAD  = 2'd1,
    PH_STAGE = 2'd2,
    PH_OUT   = 2'd3
  } phase_t;
endpackage
