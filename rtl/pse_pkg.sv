// Shared types and constants of the 2x2 packet switch element (PSE).
//
// A packet is a sequence of 80 nine-bit words: eight data bits and one odd
// parity bit. On every nine-bit lead the parity bit is bit 0 and the data byte
// is bits 8:1. The first word carries the 3-bit routing control field RC in
// its top three data bits; the second word is the fanout (broadcast) or the
// link number (point-to-point and test packets); the fourth word carries the
// low byte of the broadcast channel number, whose bit 0 decides which copy of
// a replicated packet gets the larger fanout.
//
// A port request is the 3-bit vector r[N10]: N says a port is needed, r1 and
// r0 name the ports (100 either, 101 port 0, 110 port 1, 111 both). An enable
// vector e[10] says which output ports an input may drive.
package pse_pkg;

  localparam int unsigned WORD_W    = 9;   // 8 data bits + odd parity
  localparam int unsigned PKT_WORDS = 80;  // words per packet
  localparam int unsigned ISR_TAP   = 2;   // header tap after the second stage
  localparam int unsigned ISR_LEN   = 21;  // input shift register length

  typedef logic [WORD_W-1:0] word_t;

  // Routing control codes (word 0, data bits 7:5)
  localparam logic [2:0] RC_EMPTY = 3'b000;
  localparam logic [2:0] RC_POINT = 3'b001;
  localparam logic [2:0] RC_BCAST = 3'b010;
  localparam logic [2:0] RC_TEST  = 3'b100;

  // Operation mode om[10]
  typedef enum logic [1:0] {
    OM_UNDEF = 2'b00,
    OM_RN    = 2'b01,   // routing network
    OM_DN    = 2'b10,   // distribution network
    OM_CN    = 2'b11    // copy network
  } om_t;

  // Path through the input circuit towards the header modification circuit
  typedef enum logic [1:0] {
    BSEL_BSR0 = 2'b00,
    BSEL_BSR1 = 2'b01,
    BSEL_CUT  = 2'b10,
    BSEL_NONE = 2'b11
  } bsel_t;

  // Port request r[N10]
  typedef struct packed {
    logic need;
    logic p1;
    logic p0;
  } req_t;

  localparam req_t REQ_NONE   = 3'b000;
  localparam req_t REQ_EITHER = 3'b100;
  localparam req_t REQ_PORT0  = 3'b101;
  localparam req_t REQ_PORT1  = 3'b110;
  localparam req_t REQ_BOTH   = 3'b111;

  // Decoded header of one packet: the six bits a buffer control register holds
  typedef struct packed {
    req_t r;
    logic copy;   // replicate to both outputs, splitting the fanout
    logic test;   // test packet (specific path), rotatable routing field
    logic bcn;    // low-order bit of the broadcast channel number
  } hinfo_t;

  localparam hinfo_t HINFO_NONE = '0;

  // Timing strobes from the timing control circuit. t_i is high for one
  // clock, i+1 clocks after the clock in which packet-time was high.
  typedef struct packed {
    logic t1;      // word 0 at the header tap
    logic t2;      // word 1 at the header tap
    logic t3;      // word 2 at the header tap
    logic t4;      // word 3 at the header tap
    logic t16;     // port decision is latched
    logic t19;     // buffer shift / path select take effect next clock
    logic t20;     // output enables and header-modify controls take effect
    logic t22;     // word 1 (fanout) sits in the HMC delay stage
    logic trot;    // t22 and t23: routing-field rotation window
    logic tshift;  // 80-clock window in which buffers shift
  } tstrobe_t;

  function automatic logic [7:0] wdata(word_t w);
    return w[8:1];
  endfunction

  // Build a word with correct odd parity
  function automatic word_t mkword(logic [7:0] d);
    return {d, ~^d};
  endfunction

  // Odd parity violated
  function automatic logic parity_bad(word_t w);
    return ~^w;
  endfunction

endpackage
