// Shared definitions of the bit-serial storage-ring.
//
// The storage-ring is a problem-store: a multiset of words that processors
// insert into and retrieve from at independent ports. Words circulate in a
// ring of bit-serial registers until a port with a matching pattern takes
// them. This package holds the default sizes used by every module and the
// control bundle a wire transition hands to the registers it connects.
//
// Defaults: 32 ports and rubber-wire height 8 follow the evaluated
// configuration of the original design; the 16-bit word and the 4 category
// bits per word are this implementation's choice (the design leaves the word
// width open).
package st_pkg;

  parameter int unsigned N_PORTS_DEF = 32; // ports (= ring registers)
  parameter int unsigned WW_DEF      = 16; // word width, bits per element
  parameter int unsigned HEIGHT_DEF  = 8;  // height d of every rubber-wire
  parameter int unsigned NCAT_DEF    = 4;  // category bits at the top of a word

  // What one enabled wire transition does to its two registers in a cycle.
  //   copy     : shift one bit from the source into the target (transfer high)
  //   newstate : source becomes empty, target full (transfer low)
  typedef struct packed {
    logic copy;
    logic newstate;
  } xfer_t;

endpackage
