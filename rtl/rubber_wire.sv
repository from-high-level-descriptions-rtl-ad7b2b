// Rubber-wire: a connection between two ring registers A and B that can
// stretch to hold more words.
//
// A plain wire moves the word in A to B when A is full and B empty. When B is
// full, the rubber-wire instead lifts the word in A into an upper register
// Au; the upper registers Au and Bu are themselves joined by a rubber-wire of
// height d-1 (a plain wire at d = 1), and a word in Bu comes back down into B
// when B is empty and A is empty. Level k (1..HEIGHT) holds the pair A_k, B_k;
// level 0 is the external pair A, B. For every level k:
//   horizontal  wire(A_k, B_k)                           k = 0..HEIGHT
//   up          wire(A_k, A_k+1)  only while B_k is full   k = 0..HEIGHT-1
//   down        wire(B_k+1, B_k)  only while A_k is empty  k = 0..HEIGHT-1
// The recursive description is unrolled into this loop over levels. The
// 'only while' conditions make every pair of transitions that share a
// register exclusive, so all enabled transitions run in the same frame.
//
// The external registers A and B live in the ring; this module sees their
// flags and A's serial bit and returns the control bundles for them.
// 'a_hold' withdraws A as a source: the port at A is taking its word, and
// retrieval has priority over moving the word on. 'b_hold' withdraws B as a
// target: the port at B has won B for a new word this frame. 'b_want' tells
// that port whether a word would move into B without the hold. HEIGHT = 0
// gives the plain wire of the simple storage-ring.
//
// Timing: one word moves one register per frame of WW+1 cycles.
// The structure (levels, up/down conditions) follows the original design;
// the a_hold/b_hold priorities at the ring registers, the level-by-level unrolling and the
// event/occupancy outputs are this implementation's choices.
module rubber_wire
  import st_pkg::*;
#(
  parameter int unsigned WW     = WW_DEF,
  parameter int unsigned HEIGHT = HEIGHT_DEF,
  localparam int unsigned OW    = $clog2(2 * HEIGHT + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          transfer,
  // external source register A
  input  logic          a_s,
  input  logic          a_bit,
  input  logic          a_hold,
  output xfer_t         a_drain,
  // external target register B
  input  logic          b_s,
  input  logic          b_hold,
  output logic          b_want,
  output xfer_t         b_fill,
  output logic          b_sin,
  output logic          b_go,
  // observation
  output logic          stretch_evt,  // a word went up from A into A_1
  output logic          descend_evt,  // a word came down from B_1 into B
  output logic [OW-1:0] occupancy     // full upper registers
);

  logic  sa [HEIGHT+1];
  logic  sb [HEIGHT+1];
  logic  ba [HEIGHT+1];
  logic  bb [HEIGHT+1];
  logic  h_go  [HEIGHT+1];
  logic  dn_go [HEIGHT+1];
  xfer_t h_ctl  [HEIGHT+1];
  xfer_t up_ctl [HEIGHT+1];
  xfer_t dn_ctl [HEIGHT+1];

  assign sa[0] = a_s;
  assign ba[0] = a_bit;
  assign sb[0] = b_s;
  assign bb[0] = 1'b0;  // B's own bit is not used here

  for (genvar k = 0; k <= HEIGHT; k++) begin : g_lvl
    // horizontal wire A_k -> B_k
    bs_wire u_h (
      .from_s(sa[k]), .to_s(sb[k]), .guard(k == 0 ? (!a_hold && !b_hold) : 1'b1),
      .transfer(transfer), .go(h_go[k]), .ctl(h_ctl[k])
    );

    if (k < HEIGHT) begin : g_updn
      // stretch: A_k -> A_k+1 while B_k is full
      bs_wire u_up (
        .from_s(sa[k]), .to_s(sa[k+1]), .guard(sb[k] && (k == 0 ? !a_hold : 1'b1)),
        .transfer(transfer), .go(), .ctl(up_ctl[k])
      );
      // return: B_k+1 -> B_k while A_k is empty
      bs_wire u_dn (
        .from_s(sb[k+1]), .to_s(sb[k]), .guard(!sa[k] && (k == 0 ? !b_hold : 1'b1)),
        .transfer(transfer), .go(dn_go[k]), .ctl(dn_ctl[k])
      );
    end else begin : g_top
      assign dn_go[k]  = 1'b0;
      assign up_ctl[k] = '0;
      assign dn_ctl[k] = '0;
    end

    if (k > 0) begin : g_regs
      xfer_t au_drain, bu_fill;

      assign au_drain = h_ctl[k] | up_ctl[k];
      assign bu_fill  = h_ctl[k] | dn_ctl[k];

      bs_register #(.WW(WW)) u_au (
        .clk(clk), .rst_n(rst_n),
        .fill(up_ctl[k-1]), .drain(au_drain), .sin(ba[k-1]),
        .load(1'b0), .load_data('0), .clear(1'b0),
        .s(sa[k]), .r(), .sout(ba[k])
      );

      bs_register #(.WW(WW)) u_bu (
        .clk(clk), .rst_n(rst_n),
        .fill(bu_fill), .drain(dn_ctl[k-1]),
        .sin(h_go[k] ? ba[k] : bb[(k < HEIGHT) ? k + 1 : k]),
        .load(1'b0), .load_data('0), .clear(1'b0),
        .s(sb[k]), .r(), .sout(bb[k])
      );
    end
  end

  assign a_drain = h_ctl[0] | up_ctl[0];
  assign b_fill  = h_ctl[0] | dn_ctl[0];
  assign b_go    = h_go[0] || dn_go[0];
  // what would move into B if the port at B did not hold it
  assign b_want  = !b_s && ((a_s && !a_hold) ||
                            ((HEIGHT > 0) && !a_s && sb[(HEIGHT > 0) ? 1 : 0]));
  assign b_sin   = h_go[0] ? ba[0] : bb[(HEIGHT > 0) ? 1 : 0];

  assign stretch_evt = up_ctl[0].newstate;
  assign descend_evt = dn_ctl[0].newstate;

  always_comb begin
    occupancy = '0;
    for (int k = 1; k <= HEIGHT; k++) begin
      occupancy = occupancy + OW'(sa[k]) + OW'(sb[k]);
    end
  end

endmodule
