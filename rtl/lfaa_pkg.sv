// lfaa_pkg: constants and types shared by the LFAA tile processing RTL.
//
// The channelizer numbers (1024-point transform, 864-sample hop, 14 tap
// blocks, 4 samples per clock), the 781.25 kHz channel spacing, the 1080 ns
// frame and the SPEAD item identifiers are those of the design this RTL
// follows. The struct layouts and the 200 MHz processing clock (5 ns per
// 4-sample beat) are this implementation's own choices.
package lfaa_pkg;

  // Channelizer geometry
  localparam int unsigned LANES      = 4;     // samples per clock
  localparam int unsigned NFFT       = 1024;  // polyphase transform length N
  localparam int unsigned MHOP       = 864;   // frame advance M (oversampling N/M = 32/27)
  localparam int unsigned NTAPS      = 14;    // WOLA tap blocks (filter order 14*N)
  localparam int unsigned NCHAN      = NFFT / 2;
  localparam int unsigned FRAME_BEATS = MHOP / LANES;  // 216 clocks per frame

  // Timing
  localparam int unsigned NS_PER_BEAT = 5;     // 4 samples at 800 MS/s
  localparam int unsigned FRAME_NS    = 1080;  // 864 samples at 800 MS/s
  localparam int unsigned PRELOAD_NS  = 7560;  // channelizer preload time t1

  // Frequency plan
  localparam longint unsigned CHAN_SPACING_HZ = 781_250;

  // Beamformer
  localparam int unsigned NBEAM    = 8;
  localparam int unsigned NSUBBAND = 16;
  localparam int unsigned NSLOT    = 384;   // selected channel/beam combinations per tile

  // Station beamformer packets
  localparam int unsigned PKT_TIMES  = 128;  // time samples per chain packet
  localparam int unsigned PKT_CHANS  = 8;    // channels per chain packet
  localparam int unsigned CSP_TIMES  = 2048; // time samples per CSP frame

  // SPEAD-64-48
  localparam logic [7:0]  SPEAD_MAGIC    = 8'h53;
  localparam logic [7:0]  SPEAD_VERSION  = 8'h04;
  localparam logic [7:0]  SPEAD_ITEM_W   = 8'h02;   // item identifier width, bytes
  localparam logic [7:0]  SPEAD_ADDR_W   = 8'h06;   // heap address width, bytes
  localparam logic [14:0] ID_HEAP_CNT    = 15'h0001;
  localparam logic [14:0] ID_PKT_LEN     = 15'h0004;
  localparam logic [14:0] ID_REF_TIME    = 15'h1027;
  localparam logic [14:0] ID_TIMESTAMP   = 15'h1600;
  localparam logic [14:0] ID_CENTER_FREQ = 15'h1011;
  localparam logic [14:0] ID_CSP_CHAN    = 15'h3000;
  localparam logic [14:0] ID_CSP_ANT     = 15'h3001;
  localparam logic [14:0] ID_CSP_SAMPLES = 15'h3300;
  localparam int unsigned SPEAD_CSP_ITEMS = 8;

  // Immediate SPEAD item: MSb set, 15-bit identifier, 48-bit value
  function automatic logic [63:0] spead_item(input logic [14:0] id, input logic [47:0] value);
    return {1'b1, id, value};
  endfunction

  // Complex sample types
  typedef struct packed { logic signed [17:0] re; logic signed [17:0] im; } cplx18_t;
  typedef struct packed { logic signed [15:0] re; logic signed [15:0] im; } cplx16_t;
  typedef struct packed { logic signed [11:0] re; logic signed [11:0] im; } cplx12_t;
  typedef struct packed { logic signed [7:0]  re; logic signed [7:0]  im; } cplx8_t;

  // One beam sample for both polarisations, 64 bits: {V, H}, imaginary in
  // the low half of each, which matches the byte order of the CSP payload.
  typedef struct packed { cplx16_t v; cplx16_t h; } beam16_t;

  // Per-sample sideband of the beam streams after the tile beamformer
  typedef struct packed {
    logic [31:0] frame;   // frame number of the packet's first time sample
    logic [3:0]  beam;    // beam id
    logic [8:0]  chan;    // physical channel id
    logic [8:0]  slot;    // logical channel (selected slot) id
  } beam_user_t;

  // Saturate a wide signed value to W bits
  function automatic logic signed [63:0] sat(input logic signed [63:0] x, input int unsigned w);
    logic signed [63:0] mx, mn;
    mx = (64'sd1 <<< (w - 1)) - 64'sd1;
    mn = -(64'sd1 <<< (w - 1));
    if (x > mx) return mx;
    if (x < mn) return mn;
    return x;
  endfunction

  // Arithmetic right shift with round-half-up
  function automatic logic signed [63:0] rshift_round(input logic signed [63:0] x, input int unsigned s);
    if (s == 0) return x;
    return (x + (64'sd1 <<< (s - 1))) >>> s;
  endfunction


endpackage
