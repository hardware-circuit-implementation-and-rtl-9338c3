// csma_pkg: codes and types shared by the three-slot NP-CSMA channel system.
//
// The channel is in one of three states per slot. Each state travels between
// blocks as an 8-bit code: idle I = 8'b0000_0001, success U = 8'b0000_0110 and
// collision B = 8'b0000_0111. These three values are the ones the design is
// built around; the value 8'h00 (no slot on the channel, the FIFO ran dry) is
// an addition of this implementation.
//
// A source word packs the arrivals of both stations in one idle slot: bits
// [3:0] the transmitting site, bits [7:4] the monitoring site (a choice of this
// implementation).
package csma_pkg;

  typedef enum logic [7:0] {
    CH_NONE = 8'h00,  // nothing on the channel (starved)
    CH_IDLE = 8'h01,  // I: no station transmits
    CH_SUCC = 8'h06,  // U: exactly one packet, received
    CH_COLL = 8'h07   // B: two or more packets collide
  } chan_state_e;

  localparam int unsigned ARR_W = 4;  // arrivals per station per word
  localparam int unsigned ATT_W = 5;  // packets one station sends at a decision

  // Counters of the receive statistics block.
  typedef struct packed {
    logic [31:0] n_u;          // success time in idle-slot units (Eq. 18's N_U)
    logic [31:0] n_idle;       // idle slots started
    logic [31:0] n_succ;       // success slots started
    logic [31:0] n_coll;       // collision slots started
    logic [31:0] idle_cycles;  // cycles in idle slots
    logic [31:0] succ_cycles;  // cycles in success slots (tail included)
    logic [31:0] coll_cycles;  // cycles in collision slots (tail included)
    logic [31:0] none_cycles;  // cycles with no slot (FIFO empty)
    logic [31:0] total_cycles; // window length t in cycles
  } stats_t;

endpackage
