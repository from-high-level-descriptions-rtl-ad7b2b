// Bit-serial register of the storage-ring: a full/empty flag 's' and a WW-bit
// shift register 'r'.
//
// A word is copied between two registers over the WW transfer cycles of a
// frame. The target shifts right, taking the source's bit 0 into its top bit;
// the source shifts right too, keeping its top bit. After WW cycles the target
// holds the source's word. In the cycle where transfer is low the flags change:
// a target becomes full, a source empty. A register is never source and
// target of the same frame (a source is full, a target empty).
//
// Interface:
//   fill  : OR of the control bundles of the wires into this register
//   drain : OR of the control bundles of the wires out of this register
//   sin   : serial bit of the one source that is filling it
//   load/load_data : parallel write by a processor (outreg); sets s
//   clear : parallel read by a processor (inreg); clears s
//   sout  : r[0], the serial bit offered to a target
// load and clear are for the port registers; a processor may use them only
// when transfer is low and the register is empty (load) or full (clear).
//
// The copy and newstate behaviour follows the original design; the parallel
// processor access and the reset to empty are this implementation's choice.
module bs_register
  import st_pkg::*;
#(
  parameter int unsigned WW = WW_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  xfer_t         fill,
  input  xfer_t         drain,
  input  logic          sin,
  input  logic          load,
  input  logic [WW-1:0] load_data,
  input  logic          clear,
  output logic          s,
  output logic [WW-1:0] r,
  output logic          sout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= 1'b0;
    end else if (fill.newstate) begin
      s <= 1'b1;
    end else if (drain.newstate) begin
      s <= 1'b0;
    end else if (load) begin
      s <= 1'b1;
    end else if (clear) begin
      s <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else if (fill.copy || drain.copy) begin
      r <= {(fill.copy ? sin : r[WW-1]), r[WW-1:1]};
    end else if (load) begin
      r <= load_data;
    end
  end

  assign sout = r[0];

  // A register is either the source or the target of a frame, never both;
  // a target is empty and a source full.
  a_not_both: assert property (@(posedge clk) disable iff (!rst_n)
                               !((fill.copy || fill.newstate) && (drain.copy || drain.newstate)));
  a_fill_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                 (fill.copy || fill.newstate) |-> !s);
  a_drain_full: assert property (@(posedge clk) disable iff (!rst_n)
                                 (drain.copy || drain.newstate) |-> s);

endmodule
