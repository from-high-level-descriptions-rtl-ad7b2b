// One port of the problem-store.
//
// A port joins a processor to one register x of the ring. It holds three
// registers: outreg (a word the processor inserts), pattern (the categories
// the processor asks for) and inreg (the word retrieved for it), each with a
// status the processor can read.
//   out transition: outreg -> x when outreg is full and x empty. When the
//     ring also has a word ready to move into x ('ring_want'), the two
//     transitions conflict and a priority bit decides: after the ring filled
//     x the port goes first, after the port filled x the ring goes first.
//     'ring_hold' tells the ring that the port won x for this frame.
//   in transition: x -> inreg when x is full, inreg empty and x matches the
//     pattern. The match is evaluated on the first transfer cycle of a frame,
//     before x starts to shift, and held for the rest of the frame. While it
//     holds, 'take' stops the ring from moving the word on.
// Both transitions move the word bit-serially over the transfer cycles, like
// every other wire.
//
// Processor side (valid/ready): a word is accepted into outreg, and a word
// is handed out of inreg, only in the cycle where 'transfer' is low, so that
// all full/empty flags change in that cycle alone. The pattern may be
// written in any cycle; it is sampled at frame start. Writing zero cancels a
// request.
//
// The three registers, their empty detection and the two transitions follow
// the original design, and so does the alternating priority bit, one of the
// ways the design resolves two transitions that write the same register. The
// handshakes, the priority of retrieval over moving on, the reset value of
// the priority bit (ring first) and the sampling point of the match are this
// implementation's choices.
module port
  import st_pkg::*;
#(
  parameter int unsigned WW   = WW_DEF,
  parameter int unsigned NCAT = NCAT_DEF
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            transfer,
  input  logic            frame_start,
  // processor side
  input  logic            put_valid,
  input  logic [WW-1:0]   put_data,
  output logic            put_ready,
  input  logic            pat_we,
  input  logic [NCAT-1:0] pat_data,
  output logic            get_valid,
  output logic [WW-1:0]   get_data,
  input  logic            get_ready,
  output logic            outreg_full,
  output logic            inreg_full,
  output logic            pat_empty,
  // ring side, register x
  input  logic            x_s,
  input  logic [WW-1:0]   x_r,
  input  logic            ring_want,
  output logic            ring_hold,
  output logic            take,
  output xfer_t           x_drain,
  output xfer_t           x_fill,
  output logic            x_sin
);

  logic            out_s, in_s, out_bit;
  logic [WW-1:0]   in_r;
  logic [NCAT-1:0] pat_q;
  logic            m_comb, m_q, m_now;
  logic            out_ok, ring_first;
  xfer_t           out_ctl, in_ctl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pat_q <= '0;
    else if (pat_we) pat_q <= pat_data;
  end

  pattern_match #(.WW(WW), .NCAT(NCAT)) u_match (
    .pat(pat_q), .elem(x_r), .match(m_comb)
  );

  // hold the frame-start decision while x shifts
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           m_q <= 1'b0;
    else if (frame_start) m_q <= m_comb;
  end
  assign m_now = frame_start ? m_comb : m_q;

  // in: x -> inreg
  bs_wire u_in (
    .from_s(x_s), .to_s(in_s), .guard(m_now),
    .transfer(transfer), .go(take), .ctl(in_ctl)
  );

  // out: outreg -> x; on a conflict with the ring, alternate
  assign out_ok    = !ring_want || !ring_first;
  assign ring_hold = out_s && !x_s && !ring_first;

  bs_wire u_out (
    .from_s(out_s), .to_s(x_s), .guard(out_ok),
    .transfer(transfer), .go(), .ctl(out_ctl)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                        ring_first <= 1'b1;
    else if (out_ctl.newstate)                         ring_first <= 1'b1;
    else if (!transfer && ring_want && !ring_hold)     ring_first <= 1'b0;
  end

  assign put_ready = !out_s && !transfer;
  assign get_valid = in_s && !transfer;
  assign get_data  = in_r;

  bs_register #(.WW(WW)) u_outreg (
    .clk(clk), .rst_n(rst_n),
    .fill('0), .drain(out_ctl), .sin(1'b0),
    .load(put_valid && put_ready), .load_data(put_data), .clear(1'b0),
    .s(out_s), .r(), .sout(out_bit)
  );

  bs_register #(.WW(WW)) u_inreg (
    .clk(clk), .rst_n(rst_n),
    .fill(in_ctl), .drain('0), .sin(x_r[0]),
    .load(1'b0), .load_data('0), .clear(get_valid && get_ready),
    .s(in_s), .r(in_r), .sout()
  );

  assign x_drain     = in_ctl;
  assign x_fill      = out_ctl;
  assign x_sin       = out_bit;
  assign outreg_full = out_s;
  assign inreg_full  = in_s;
  assign pat_empty   = (pat_q == '0);

  // processor access happens only while transfer is low
  a_put_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                    (put_valid && put_ready) |-> !transfer);

endmodule
