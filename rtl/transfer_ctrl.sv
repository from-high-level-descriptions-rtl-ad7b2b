// Global frame sequencer of the bit-serial storage-ring.
//
// Every word moves between registers bit-serially. A frame is WW+1 clock
// cycles: 'transfer' is high for WW consecutive cycles, during which every
// enabled wire shifts one bit per cycle, and low for exactly one cycle, in
// which full/empty flags change. 'frame_start' marks the first transfer cycle
// of a frame, when the contents of all registers are still unshifted, so that
// decisions that look at the data (pattern matching) can be taken there.
//
// The WW-high/one-low shape of 'transfer' follows the original design; the
// counter that produces it and the reset state (start of a frame) are this
// implementation's choice.
module transfer_ctrl #(
  parameter int unsigned WW = st_pkg::WW_DEF
) (
  input  logic clk,
  input  logic rst_n,
  output logic transfer,
  output logic frame_start
);

  localparam int unsigned CW = $clog2(WW + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cnt <= '0;
    else if (cnt == CW'(WW))     cnt <= '0;
    else                         cnt <= cnt + 1'b1;
  end

  assign transfer    = (cnt != CW'(WW));
  assign frame_start = (cnt == '0);

endmodule
