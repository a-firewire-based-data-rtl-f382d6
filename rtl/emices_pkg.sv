// emices_pkg - types and constants shared by the eMiCES acquisition FPGAs.
//
// The central type is the 16-byte detector event packet that each node
// stores in its Firewire controller FIFO for every accepted coincidence.
// Field list, byte counts and the module-ID byte layout follow the packet
// definition of the MiCES scanner; the byte order inside multi-byte fields
// (most significant byte first, as on the 1394 bus), the 16-bit container for
// each 12-bit position signal and the order of the two singles bytes are
// choices of this implementation.
//
//   byte 0      : {1'b0, pmt_id, module_id[5:0]}
//   bytes 1..4  : run time clock (62.5 MHz ticks) at the trigger
//   byte 5      : 8 most significant bits of the TAC (fine time)
//   bytes 6..13 : four integrated position signals X-, X+, Y-, Y+,
//                 each 12 bits right-aligned in 16 bits
//   bytes 14,15 : singles rate of PMT 0 and PMT 1, triggers / 256
//
// A 2016-byte block payload (2012 bytes streamed, then 4 bytes held back
// until the node processor has written the block header) carries 126 events.
package emices_pkg;

  localparam int unsigned CLK_PERIOD_NS = 16;     // 62.5 MHz master clock
  localparam int unsigned TS_W          = 32;     // time stamp width
  localparam int unsigned ADC_W         = 10;     // ADC sample width
  localparam int unsigned SIG_W         = 12;     // integrated signal width
  localparam int unsigned N_CHAN        = 4;      // X-, X+, Y-, Y+
  localparam int unsigned N_PMT         = 2;      // PMTs per node
  localparam int unsigned EVENT_BYTES   = 16;
  localparam int unsigned EVENT_BITS    = EVENT_BYTES * 8;
  localparam int unsigned BLOCK_PAYLOAD = 2016;   // Firewire payload
  localparam int unsigned BLOCK_HOLD    = 4;      // held until header is set

  typedef logic [ADC_W-1:0] adc_t;
  typedef logic [SIG_W-1:0] sig_t;

  typedef struct packed {
    logic        zero;        // always 0
    logic        pmt_id;
    logic [5:0]  module_id;
  } id_byte_t;

  typedef struct packed {
    id_byte_t         id;
    logic [TS_W-1:0]  timestamp;
    logic [7:0]       tac;
    logic [15:0]      x_minus;
    logic [15:0]      x_plus;
    logic [15:0]      y_minus;
    logic [15:0]      y_plus;
    logic [7:0]       singles0;
    logic [7:0]       singles1;
  } event_t;

  // Byte k (k = 0 is sent first) of a packed event.
  function automatic logic [7:0] event_byte(event_t ev, int unsigned k);
    logic [EVENT_BITS-1:0] v;
    v = ev;
    return v[EVENT_BITS-1-8*k -: 8];
  endfunction

endpackage
