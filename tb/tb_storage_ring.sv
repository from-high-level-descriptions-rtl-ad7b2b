// End-to-end testbench for storage_ring at reduced size: 4 ports, 8-bit
// words with 2 category bits, rubber-wires of height 2.
//
// 1. Latency: one word put at port 0 and requested at port 3 must be
//    offered at port 3 exactly 6 frames after the put was accepted
//    (1 frame into the ring, 3 frames around it, 1 frame into inreg,
//    visible in the next state cycle).
// 2. Fill: processors put 40 words with random categories. Nobody retrieves
//    until all ring registers are full (rubber-wires stretch, puts are held
//    back); then port 0 retrieves any word and port 1 one category. (A ring
//    that is completely full moves nothing, so some port must accept what
//    is in front of it.)
// 3. Drain: every port asks for any category; all words must come out.
// Scoreboard: every word returned was put, is returned once, and shares a
// category with the port's pattern. Mechanisms counted (each must occur):
// put, get, stretch, descend, full ring, put held back by a full store.
module tb_storage_ring;
  localparam int unsigned N = 4, WW = 8, HEIGHT = 2, NCAT = 2;
  localparam int unsigned OW = $clog2(2 * HEIGHT + 2);
  localparam int NWORDS = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] put_valid, put_ready, pat_we, get_valid, get_ready;
  logic [N-1:0][WW-1:0] put_data, get_data;
  logic [N-1:0][NCAT-1:0] pat_data;
  logic [N-1:0] outreg_full, inreg_full, pat_empty;
  logic transfer, frame_start;
  logic [N-1:0] ring_full, stretch_evt, descend_evt;
  logic [N-1:0][OW-1:0] occupancy;

  int checks = 0, failures = 0;
  int n_put = 0, n_get = 0, n_stretch = 0, n_descend = 0, n_full = 0, n_held = 0;
  logic [NCAT-1:0] pat_now [N];
  logic [NCAT-1:0] pat_old [N];
  int cat_of [int];
  int got [int];

  storage_ring #(.N_PORTS(N), .WW(WW), .HEIGHT(HEIGHT), .NCAT(NCAT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic to_state_cycle();
    while (transfer) begin @(posedge clk); #1; end
  endtask

  task automatic set_pat(input int p, input logic [NCAT-1:0] v);
    pat_old[p] = pat_now[p];
    pat_now[p] = v;
    pat_data[p] = v;
    pat_we[p] = 1'b1;
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: put=%0d get=%0d", n_put, n_get);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_stretch += $countones(stretch_evt);
    n_descend += $countones(descend_evt);
    if (!transfer && &ring_full) n_full++;
  end

  // state-cycle processor actions: the scoreboard
  task automatic serve(input bit allow_put, inout int next_id);
    for (int p = 0; p < N; p++) begin
      put_valid[p] = 1'b0;
      get_ready[p] = 1'b0;
      if (get_valid[p]) begin
        int id, c;
        id = int'(get_data[p][WW-NCAT-1:0]);
        c  = int'(get_data[p][WW-1 -: NCAT]);
        check(cat_of.exists(id), $sformatf("port %0d returned unknown word %0d", p, id));
        check(!got.exists(id), $sformatf("word %0d returned twice", id));
        check(cat_of.exists(id) && c == cat_of[id], "word intact");
        check((c & int'(pat_now[p] | pat_old[p])) != 0, $sformatf("word %0d matches port %0d", id, p));
        got[id] = 1;
        get_ready[p] = 1'b1;
        n_get++;
      end
      if (allow_put && next_id <= NWORDS) begin
        if (outreg_full[p]) n_held++;
        else if (put_ready[p] && ($urandom % 4 != 0)) begin
          int c;
          c = 1 + int'($urandom % 3);
          put_valid[p] = 1'b1;
          put_data[p]  = {NCAT'(c), (WW - NCAT)'(next_id)};
          cat_of[next_id] = c;
          next_id++;
          n_put++;
        end
      end
    end
  endtask

  initial begin
    int t0, t1, next_id, frames;
    put_valid = '0; put_data = '0; pat_we = '0; pat_data = '0; get_ready = '0;
    for (int p = 0; p < N; p++) begin pat_now[p] = '0; pat_old[p] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. latency of a single word from port 0 to port 3
    set_pat(3, 2'b01);
    @(posedge clk); #1; pat_we = '0;
    to_state_cycle();
    put_valid[0] = 1'b1; put_data[0] = {2'b01, 6'd0};
    check(put_ready[0], "port 0 ready");
    t0 = 0;
    @(posedge clk); #1; put_valid = '0;
    frames = 0;
    while (!get_valid[3] && frames < 20) begin
      @(posedge clk); #1;
      if (!transfer) frames++;
    end
    check(frames == 6, $sformatf("latency port 0 -> port 3 is 6 frames, got %0d", frames));
    check(get_data[3] == {2'b01, 6'd0}, "latency word intact");
    get_ready[3] = 1'b1; @(posedge clk); #1; get_ready = '0;
    set_pat(3, 2'b00);
    @(posedge clk); #1; pat_we = '0;

    // 2. fill: nobody retrieves until the ring is full, then two ports do
    next_id = 1;
    frames = 0;
    while (next_id <= NWORDS && frames < 1500) begin
      to_state_cycle();
      if (n_full > 0 && pat_now[0] == '0) begin
        set_pat(0, 2'b11);
        set_pat(1, 2'b10);
      end
      serve(1'b1, next_id);
      @(posedge clk); #1;
      put_valid = '0; get_ready = '0; pat_we = '0;
      frames++;
    end
    check(next_id > NWORDS, "all words put");

    // 3. drain: every port takes any category
    for (int p = 0; p < N; p++) set_pat(p, 2'b11);
    @(posedge clk); #1; pat_we = '0;
    frames = 0;
    while (n_get < n_put && frames < 1500) begin
      to_state_cycle();
      serve(1'b0, next_id);
      @(posedge clk); #1;
      put_valid = '0; get_ready = '0;
      frames++;
    end
    check(n_get == NWORDS && n_put == NWORDS, $sformatf("all words back: put %0d got %0d", n_put, n_get));
    check(n_put > 0,     "mechanism put");
    check(n_get > 0,     "mechanism get");
    check(n_stretch > 0, "mechanism stretch");
    check(n_descend > 0, "mechanism descend");
    check(n_full > 0,    "mechanism full ring");
    check(n_held > 0,    "mechanism put held back");
    $display("put=%0d get=%0d stretch=%0d descend=%0d full=%0d held=%0d",
             n_put, n_get, n_stretch, n_descend, n_full, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
