// snn_pkg: types and bus widths shared by the spiking convolution processor.
//
// Events carry 7-bit coordinates (images up to 128x128) and output spikes
// add a 6-bit convolution-engine id (up to 64 engines). Every neuron holds
// an 8-bit signed membrane potential and two 8-bit timestamps, one for
// leakage and one for the refractory period (24 bits per neuron). Each layer
// has a parameter bank: threshold, leakage per counter tick, refractory
// period in counter ticks, kernel size (1..7) and a pooling enable.
// The 128x128 array, 64 engines, kernels up to 7x7 and the per-layer
// leakage/refractory banks follow the published architecture; the bit
// widths and the configuration register map are this design's own choice.
package snn_pkg;

  localparam int unsigned CW   = 7;  // coordinate width
  localparam int unsigned CEW  = 6;  // engine id width
  localparam int unsigned LIDW = 3;  // layer id width (up to 8 layers)
  localparam int unsigned VW   = 8;  // membrane potential width (signed)
  localparam int unsigned TSW  = 8;  // timestamp / global counter width
  localparam int unsigned WW   = 8;  // kernel weight width (signed)
  localparam int unsigned KW   = 3;  // kernel size field (1..7)
  localparam int unsigned PSW  = 16; // counter prescaler width

  typedef logic [CW-1:0]   coord_t;
  typedef logic [LIDW-1:0] layer_t;

  // Input event / event between layers.
  typedef struct packed {
    coord_t y;
    coord_t x;
  } event_t;

  // Output spike of an engine: engine id and position.
  typedef struct packed {
    logic [CEW-1:0] ceid;
    coord_t         y;
    coord_t         x;
  } spike_t;

  // Per-layer parameter bank.
  typedef struct packed {
    logic signed [VW-1:0] thresh;  // firing threshold
    logic [VW-1:0]        leak;    // potential decay per leakage tick
    logic [TSW-1:0]       refrac;  // refractory period in refractory ticks
    logic [KW-1:0]        ksize;   // kernel size K (KxK), 1..7
    logic                 pool;    // halve output coordinates
  } layer_params_t;

  // State of one neuron as stored in block RAM.
  typedef struct packed {
    logic signed [VW-1:0] v;
    logic [TSW-1:0]       ts_leak;
    logic [TSW-1:0]       ts_ref;
  } neuron_t;

  localparam int unsigned NEURON_W = $bits(neuron_t);

  // Configuration register map (32-bit word addresses).
  localparam logic [15:0] A_CTRL      = 16'h0000; // [0] enable, [1] clear (self-clearing), [6:4] number of layers
  localparam logic [15:0] A_LEAK_PS   = 16'h0001; // leakage counter prescaler (cycles per tick)
  localparam logic [15:0] A_REF_PS    = 16'h0002; // refractory counter prescaler
  localparam logic [15:0] A_STATUS    = 16'h0003; // read: [0] any engine busy, [1] clearing
  localparam logic [15:0] A_LAYER     = 16'h0010; // + 4*layer + {0 thresh, 1 leak, 2 refrac, 3 {pool,ksize}}
  localparam logic [15:0] A_MASK      = 16'h0100; // + engine: layer mask entry
  localparam logic [15:0] A_WEIGHT    = 16'h1000; // + 64*engine + (7*row + col): kernel weight

  localparam logic signed [VW:0] VMAX = (VW+1)'((1 << (VW-1)) - 1);
  localparam logic signed [VW:0] VMIN = -(VW+1)'(1 << (VW-1));

  // Saturating signed add of a weight (WW <= VW) to a membrane potential.
  function automatic logic signed [VW-1:0] sat_add(logic signed [VW-1:0] a,
                                                   logic signed [WW-1:0] b);
    logic signed [VW:0] s;
    s = (VW+1)'(a) + (VW+1)'(b);
    if (s > VMAX)      return VMAX[VW-1:0];
    else if (s < VMIN) return VMIN[VW-1:0];
    else               return s[VW-1:0];
  endfunction

endpackage
