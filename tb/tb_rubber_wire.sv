// Testbench for rubber_wire (HEIGHT = 2, 6-bit words).
//
// Registers A and B are placed around the rubber-wire as in the ring. The
// testbench feeds words into A whenever it is empty and drains B on a
// schedule: first B is kept full so that the wire must stretch, then B is
// drained every frame so that the stored words come back down.
// Checks:
//  - directed: with B full, a word in A is lifted within one frame (A empty,
//    one upper register full, stretch pulse);
//  - directed: with B full and A empty, nothing moves down;
//  - the upper registers never hold more than 2*HEIGHT words;
//  - every word put into A leaves through B exactly once (no loss, no
//    duplication), and 'occupancy' always equals words in flight;
//  - both stretch and descend happen.
module tb_rubber_wire;
  import st_pkg::*;
  localparam int unsigned WW = 6, HEIGHT = 2;
  localparam int unsigned OW = $clog2(2 * HEIGHT + 2);
  localparam int NWORDS = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic transfer, frame_start;
  logic a_s, a_bit, b_s, b_sin, b_go, a_hold, b_hold, b_want;
  logic [WW-1:0] a_r, b_r;
  xfer_t a_drain, b_fill, none;
  logic stretch_evt, descend_evt;
  logic [OW-1:0] occupancy;
  logic a_load, b_clear;
  logic [WW-1:0] a_data;
  int checks = 0, failures = 0;
  int n_stretch = 0, n_descend = 0;
  int seen[int];

  assign none = '0;
  assign a_hold = 1'b0;
  assign b_hold = 1'b0;

  transfer_ctrl #(.WW(WW)) u_ctrl (.clk, .rst_n, .transfer, .frame_start);

  bs_register #(.WW(WW)) u_a (
    .clk, .rst_n, .fill(none), .drain(a_drain), .sin(1'b0),
    .load(a_load), .load_data(a_data), .clear(1'b0),
    .s(a_s), .r(a_r), .sout(a_bit));
  bs_register #(.WW(WW)) u_b (
    .clk, .rst_n, .fill(b_fill), .drain(none), .sin(b_sin),
    .load(1'b0), .load_data('0), .clear(b_clear),
    .s(b_s), .r(b_r), .sout());

  rubber_wire #(.WW(WW), .HEIGHT(HEIGHT)) dut (
    .clk, .rst_n, .transfer,
    .a_s, .a_bit, .a_hold, .a_drain,
    .b_s, .b_hold, .b_want, .b_fill, .b_sin, .b_go,
    .stretch_evt, .descend_evt, .occupancy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // go to the state cycle (transfer low) of the current frame
  task automatic to_state_cycle();
    while (transfer) begin @(posedge clk); #1; end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (stretch_evt) n_stretch++;
    if (descend_evt) n_descend++;
  end

  initial begin
    int sent, got, frame;
    a_load = 0; b_clear = 0; a_data = '0;
    sent = 0; got = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // frame 0: put word 1 into A; it moves straight to B (B empty)
    to_state_cycle();
    a_load = 1; a_data = WW'(1); sent++;
    @(posedge clk); #1; a_load = 0;
    to_state_cycle(); @(posedge clk); #1;
    check(b_s && b_r == WW'(1) && !a_s, "plain wire move A->B");
    // B stays full from now on until the drain phase
    to_state_cycle();
    a_load = 1; a_data = WW'(2); sent++;
    @(posedge clk); #1; a_load = 0;
    // the next frame must lift it
    to_state_cycle();
    check(stretch_evt, "stretch pulse in newstate cycle");
    @(posedge clk); #1;
    check(!a_s && occupancy == 1, "word lifted into upper register");
    // A empty, B full: an upper word must not come down
    repeat (3) begin to_state_cycle(); @(posedge clk); #1; end
    check(b_s && b_r == WW'(1), "B untouched while full");
    check(occupancy == 1, "word stays up while B is full");
    // fill up: keep loading A while B stays full
    frame = 0;
    while (sent < 1 + 2 * HEIGHT + 1 && frame < 40) begin
      to_state_cycle();
      check(occupancy <= OW'(2 * HEIGHT), "upper capacity");
      if (!a_s) begin a_load = 1; a_data = WW'(sent + 1); sent++; end
      @(posedge clk); #1; a_load = 0;
      frame++;
    end
    repeat (4) begin to_state_cycle(); @(posedge clk); #1; end
    check(occupancy == OW'(2 * HEIGHT), "upper registers all full");
    check(a_s, "A blocked when rubber-wire is full");
    // drain phase: empty B every frame, keep feeding until NWORDS sent
    frame = 0;
    while ((got < NWORDS) && frame < 200) begin
      to_state_cycle();
      check(int'(occupancy) + int'(a_s) + int'(b_s) == sent - got, "word count conserved");
      if (b_s) begin
        int w;
        w = int'(b_r);
        check(!seen.exists(w) && w >= 1 && w <= sent, $sformatf("word %0d delivered once", w));
        seen[w] = 1;
        b_clear = 1; got++;
      end
      if (!a_s && sent < NWORDS) begin a_load = 1; a_data = WW'(sent + 1); sent++; end
      @(posedge clk); #1; a_load = 0; b_clear = 0;
      frame++;
    end
    check(got == NWORDS, "all words delivered");
    check(n_stretch > 0, "stretch happened");
    check(n_descend > 0, "descend happened");
    $display("stretch=%0d descend=%0d", n_stretch, n_descend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
