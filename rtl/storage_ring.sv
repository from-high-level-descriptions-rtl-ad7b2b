// Storage-ring: a hardware problem-store.
//
// A problem-store is a multiset of words with N_PORTS independent ports.
// At a port a processor inserts a word ('out' of the processor, 'put' here)
// or asks for a word of certain categories and receives one ('in', 'get'
// here); any matching word may be returned, but none is lost or duplicated.
//
// The store is a ring of N_PORTS bit-serial registers x[0..N_PORTS-1], one
// per port. Register x[i] is joined to x[i+1 mod N_PORTS] by a rubber-wire of
// height HEIGHT, which adds 2*HEIGHT registers that fill up when the ring
// ahead is blocked. Words keep circulating, one register per frame, as long
// as there is an empty register ahead of them, until they pass a port whose
// pattern they match. Capacity: N_PORTS * (1 + 2*HEIGHT) words in the ring,
// plus an outreg and an inreg per port.
//
// All wires are bit-serial. transfer_ctrl divides time into frames of WW+1
// cycles: WW cycles in which every enabled transition shifts one bit, and one
// cycle in which full/empty flags change and processors may put or get.
//
// Interface: per port, put (valid/ready/data), pattern write, get
// (valid/ready/data) and status flags, packed into arrays indexed by port.
// 'stretch_evt'/'descend_evt' pulse when a rubber-wire lifts a word from, or
// returns one to, the ring; 'occupancy' counts the words held in each
// rubber-wire's upper registers.
//
// Ring, rubber-wires, ports and the bit-serial frame follow the original
// design; the word format, handshakes and priorities are described in the
// modules that make them.
module storage_ring
  import st_pkg::*;
#(
  parameter int unsigned N_PORTS = N_PORTS_DEF,
  parameter int unsigned WW      = WW_DEF,
  parameter int unsigned HEIGHT  = HEIGHT_DEF,
  parameter int unsigned NCAT    = NCAT_DEF,
  localparam int unsigned OW     = $clog2(2 * HEIGHT + 2)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // processor side of every port
  input  logic [N_PORTS-1:0]           put_valid,
  input  logic [N_PORTS-1:0][WW-1:0]   put_data,
  output logic [N_PORTS-1:0]           put_ready,
  input  logic [N_PORTS-1:0]           pat_we,
  input  logic [N_PORTS-1:0][NCAT-1:0] pat_data,
  output logic [N_PORTS-1:0]           get_valid,
  output logic [N_PORTS-1:0][WW-1:0]   get_data,
  input  logic [N_PORTS-1:0]           get_ready,
  output logic [N_PORTS-1:0]           outreg_full,
  output logic [N_PORTS-1:0]           inreg_full,
  output logic [N_PORTS-1:0]           pat_empty,
  // frame timing and observation
  output logic                         transfer,
  output logic                         frame_start,
  output logic [N_PORTS-1:0]           ring_full,
  output logic [N_PORTS-1:0]           stretch_evt,
  output logic [N_PORTS-1:0]           descend_evt,
  output logic [N_PORTS-1:0][OW-1:0]   occupancy
);

  logic          x_s    [N_PORTS];
  logic [WW-1:0] x_r    [N_PORTS];
  logic          x_bit  [N_PORTS];
  logic          take   [N_PORTS];
  xfer_t         rw_a   [N_PORTS];  // rubber-wire i, control of its A = x[i]
  xfer_t         rw_b   [N_PORTS];  // rubber-wire i, control of its B = x[i+1]
  logic          rw_sin [N_PORTS];
  logic          rw_go  [N_PORTS];
  logic          rw_want[N_PORTS];
  logic          pt_hold[N_PORTS];
  xfer_t         pt_drn [N_PORTS];
  xfer_t         pt_fil [N_PORTS];
  logic          pt_sin [N_PORTS];

  transfer_ctrl #(.WW(WW)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .transfer(transfer), .frame_start(frame_start)
  );

  for (genvar i = 0; i < N_PORTS; i++) begin : g_stage
    localparam int unsigned PREV = (i + N_PORTS - 1) % N_PORTS;
    localparam int unsigned NEXT = (i + 1) % N_PORTS;

    xfer_t x_fill, x_drain;
    assign x_fill  = rw_b[PREV] | pt_fil[i];
    assign x_drain = rw_a[i] | pt_drn[i];

    bs_register #(.WW(WW)) u_x (
      .clk(clk), .rst_n(rst_n),
      .fill(x_fill), .drain(x_drain),
      .sin(rw_go[PREV] ? rw_sin[PREV] : pt_sin[i]),
      .load(1'b0), .load_data('0), .clear(1'b0),
      .s(x_s[i]), .r(x_r[i]), .sout(x_bit[i])
    );

    port #(.WW(WW), .NCAT(NCAT)) u_port (
      .clk(clk), .rst_n(rst_n), .transfer(transfer), .frame_start(frame_start),
      .put_valid(put_valid[i]), .put_data(put_data[i]), .put_ready(put_ready[i]),
      .pat_we(pat_we[i]), .pat_data(pat_data[i]),
      .get_valid(get_valid[i]), .get_data(get_data[i]), .get_ready(get_ready[i]),
      .outreg_full(outreg_full[i]), .inreg_full(inreg_full[i]), .pat_empty(pat_empty[i]),
      .x_s(x_s[i]), .x_r(x_r[i]), .ring_want(rw_want[PREV]), .ring_hold(pt_hold[i]),
      .take(take[i]), .x_drain(pt_drn[i]), .x_fill(pt_fil[i]), .x_sin(pt_sin[i])
    );

    rubber_wire #(.WW(WW), .HEIGHT(HEIGHT)) u_rw (
      .clk(clk), .rst_n(rst_n), .transfer(transfer),
      .a_s(x_s[i]), .a_bit(x_bit[i]), .a_hold(take[i]), .a_drain(rw_a[i]),
      .b_s(x_s[NEXT]), .b_hold(pt_hold[NEXT]), .b_want(rw_want[i]), .b_fill(rw_b[i]), .b_sin(rw_sin[i]), .b_go(rw_go[i]),
      .stretch_evt(stretch_evt[i]), .descend_evt(descend_evt[i]),
      .occupancy(occupancy[i])
    );

    assign ring_full[i] = x_s[i];
  end

endmodule
