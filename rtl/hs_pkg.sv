// hs_pkg: sizes, number formats and shared types of the HyperSpike
// inference engine (one random LIF spiking layer feeding a binary
// hyperdimensional classifier).
//
// Sizes that follow the published design: hypervector dimension
// D = 10,000, up to 24 classes (ASL-DVS, the largest of the three
// evaluated data sets), 16-bit fixed point for the SNN state and weights.
// Sizes that are this design's own choice: 2560 SNN inputs (room for a
// 34x34 two-polarity DVS frame, 2312 channels, or a 32x32 one, 2048),
// 256 LIF neurons (the feature-vector length), 16 synapses processed per
// cycle, 500 hypervector bits per memory word, and up to 512 time steps
// of 1 ms per query held in the input bank.
package hs_pkg;

  // ---------------- SNN layer ----------------
  localparam int unsigned N_IN      = 2560;  // input spike channels per time step
  localparam int unsigned N_NEUR    = 256;   // LIF neurons = HDC feature count
  localparam int unsigned LANES     = 16;    // synapses per cycle
  localparam int unsigned T_MAX     = 512;   // time steps a query may hold
  localparam int unsigned W_W       = 16;    // signed integer weight width
  localparam int unsigned P_W       = 16;    // unsigned trace width
  localparam int unsigned P_FRAC    = 12;    // trace fraction bits (1.0 = 4096)
  localparam int unsigned ALPHA_W   = 16;    // decay alpha, unsigned Q0.16
  localparam int unsigned ACC_W     = 48;    // membrane / reset state width, P_FRAC fraction bits

  // ---------------- HDC layer ----------------
  localparam int unsigned HV_D      = 10000; // hypervector dimensions
  localparam int unsigned HV_CHUNK  = 500;   // dimensions per memory word
  localparam int unsigned N_CLASS   = 24;    // class hypervectors held

  // ---------------- parameter memory banks ----------------
  typedef enum logic [1:0] {
    BANK_WEIGHT = 2'd0,  // SNN weights,          LANES*W_W bits per word
    BANK_INPUT  = 2'd1,  // query input spikes,   LANES bits per word
    BANK_PROJ   = 2'd2,  // projection vectors,   HV_CHUNK bits per word
    BANK_CLASS  = 2'd3   // class hypervectors,   HV_CHUNK bits per word
  } bank_e;

  localparam int unsigned CFG_AW = 32;

  // ceil(log2(n)) with a minimum of 1, for address and counter widths
  function automatic int unsigned clog2_min1(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
