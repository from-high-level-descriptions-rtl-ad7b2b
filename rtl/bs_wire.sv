// Wire transition between two bit-serial registers.
//
// The transition is enabled when its source is full, its target empty and
// its guard true:  enable = from_s AND NOT to_s AND guard.
// While 'transfer' is high an enabled wire copies, one bit per cycle (the
// registers do the shifting); in the single cycle where 'transfer' is low it
// performs newstate: the target becomes full and the source empty. The guard
// carries the extra conjuncts with which a transition is made exclusive with
// the other transitions that touch the same register, so that all enabled
// transitions can be performed in the same cycle.
//
// Because flags change only when transfer is low, 'go' is constant through
// the transfer cycles of a frame.
//
// Outputs: 'go' (the enable), and 'ctl', the bundle for both registers:
// ctl.copy = go AND transfer, ctl.newstate = go AND NOT transfer.
// The enable / newstate / copy split follows the original design; the guard
// input is how this implementation attaches the exclusion conjuncts.
module bs_wire
  import st_pkg::*;
(
  input  logic  from_s,
  input  logic  to_s,
  input  logic  guard,
  input  logic  transfer,
  output logic  go,
  output xfer_t ctl
);

  always_comb begin
    go           = from_s && !to_s && guard;
    ctl.copy     = go && transfer;
    ctl.newstate = go && !transfer;
  end

endmodule
