// Testbench for port (8-bit words, 2 category bits).
//
// The ring register x of the port is a bs_register in the testbench; the
// rest of the ring is represented by the 'ring_fill_go' input only. Checked:
//  - put is accepted only in the cycle where transfer is low, and the word
//    is in x exactly one frame later (out transition);
//  - a word whose categories miss the pattern stays in x;
//  - after a matching pattern is written, the word is in inreg one frame
//    later, 'take' is high for that whole frame, and get returns the word;
//  - a full inreg blocks a second retrieval;
//  - when the ring also wants x ('ring_want'), ring and port take turns:
//    after an out the ring wins one frame, then the port holds x and inserts.
module tb_port;
  import st_pkg::*;
  localparam int unsigned WW = 8, NCAT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic transfer, frame_start;
  logic put_valid, put_ready, pat_we, get_valid, get_ready;
  logic [WW-1:0] put_data, get_data;
  logic [NCAT-1:0] pat_data;
  logic outreg_full, inreg_full, pat_empty;
  logic x_s, ring_want, ring_hold, take, x_sin;
  logic [WW-1:0] x_r;
  xfer_t x_drain, x_fill;
  int checks = 0, failures = 0;

  transfer_ctrl #(.WW(WW)) u_ctrl (.clk, .rst_n, .transfer, .frame_start);

  bs_register #(.WW(WW)) u_x (
    .clk, .rst_n, .fill(x_fill), .drain(x_drain), .sin(x_sin),
    .load(1'b0), .load_data('0), .clear(1'b0),
    .s(x_s), .r(x_r), .sout());

  port #(.WW(WW), .NCAT(NCAT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic to_state_cycle();
    while (transfer) begin @(posedge clk); #1; end
  endtask

  task automatic next_frame();
    to_state_cycle(); @(posedge clk); #1;
  endtask

  task automatic put(input logic [WW-1:0] w);
    to_state_cycle();
    check(put_ready, "put_ready in state cycle");
    put_valid = 1; put_data = w;
    @(posedge clk); #1;
    put_valid = 0;
    check(outreg_full, "outreg full after put");
  endtask

  task automatic set_pat(input logic [NCAT-1:0] p);
    pat_we = 1; pat_data = p;
    @(posedge clk); #1;
    pat_we = 0;
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // take, once high in a frame, stays high until the state cycle
  logic take_seen;
  always @(posedge clk) if (rst_n) begin
    if (frame_start) take_seen <= take;
    else if (transfer && take_seen && !take) begin
      failures++; $display("FAIL take dropped inside a frame at %0t", $time);
    end
  end

  initial begin
    put_valid = 0; put_data = '0; pat_we = 0; pat_data = '0; get_ready = 0;
    ring_want = 0; take_seen = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(pat_empty && !outreg_full && !inreg_full, "empty after reset");
    // put_ready is low during transfer
    @(posedge clk); #1;
    check(transfer && !put_ready, "no put while transferring");
    // out: word with category bit 0
    put(8'h4A);
    to_state_cycle();
    check(!x_s, "x not yet full in the put frame");
    @(posedge clk); #1;
    check(x_s && x_r == 8'h4A && !outreg_full, "out: word in x one frame later");
    // non-matching pattern
    set_pat(2'b10);
    check(!pat_empty, "pattern not empty");
    repeat (3) next_frame();
    check(x_s && !inreg_full, "non-matching word stays in x");
    // matching pattern
    set_pat(2'b11);
    to_state_cycle(); @(posedge clk); #1;   // end of current frame
    check(frame_start && take, "take decided at frame start");
    to_state_cycle();
    check(!get_valid, "get not valid before newstate");
    @(posedge clk); #1;
    check(!x_s && inreg_full, "in: word moved to inreg");
    to_state_cycle();
    check(get_valid && get_data == 8'h4A, "get returns the word");
    // second matching word while inreg is still full
    put(8'h80);                              // category bit 1
    repeat (3) next_frame();
    check(x_s && x_r == 8'h80 && inreg_full, "full inreg blocks retrieval");
    to_state_cycle();
    get_ready = 1; @(posedge clk); #1; get_ready = 0;
    check(!inreg_full, "get empties inreg");
    next_frame();
    check(!x_s && inreg_full, "retrieval after inreg emptied");
    to_state_cycle();
    check(get_data == 8'h80, "second word retrieved");
    get_ready = 1; @(posedge clk); #1; get_ready = 0;
    // conflict with the ring: after an out the ring goes first, then the port
    set_pat(2'b00);
    next_frame();
    check(!x_s, "x empty before conflict test");
    put(8'hC3);
    ring_want = 1;
    @(posedge clk); #1;
    check(!ring_hold, "ring first after the last out");
    next_frame();
    check(outreg_full && !x_s, "out waits while the ring has priority");
    check(ring_hold, "port holds x on its turn");
    next_frame();
    check(!outreg_full && x_s && x_r == 8'hC3, "out on the port's turn despite ring_want");
    check(!ring_hold, "priority back to the ring");
    ring_want = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
