// Testbench for the simple ring: storage_ring with HEIGHT = 0, where every
// link is a plain wire (4 ports, 8-bit words, 2 category bits).
//
// 1. Latency: a word put at port 0 and requested at port 3 is offered there
//    6 frames after the put, as with rubber-wires when nothing is blocked.
// 2. Capacity: with no requests, 8 words are offered. The ring holds one
//    word per port, the outregs one more each, and nothing more is accepted:
//    all ring registers and outregs full, no rubber-wire activity.
// 3. Drain: every port requests any category; all 8 words come back once.
module tb_simple_ring;
  localparam int unsigned N = 4, WW = 8, HEIGHT = 0, NCAT = 2;
  localparam int unsigned OW = $clog2(2 * HEIGHT + 2);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] put_valid, put_ready, pat_we, get_valid, get_ready;
  logic [N-1:0][WW-1:0] put_data, get_data;
  logic [N-1:0][NCAT-1:0] pat_data;
  logic [N-1:0] outreg_full, inreg_full, pat_empty;
  logic transfer, frame_start;
  logic [N-1:0] ring_full, stretch_evt, descend_evt;
  logic [N-1:0][OW-1:0] occupancy;
  int checks = 0, failures = 0, n_evt = 0;
  bit got [int];

  storage_ring #(.N_PORTS(N), .WW(WW), .HEIGHT(HEIGHT), .NCAT(NCAT)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) n_evt += $countones(stretch_evt | descend_evt);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic to_state_cycle();
    while (transfer) begin @(posedge clk); #1; end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int frames, n_put, n_got;
    put_valid = '0; put_data = '0; pat_we = '0; pat_data = '0; get_ready = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. latency
    pat_we[3] = 1'b1; pat_data[3] = 2'b01;
    @(posedge clk); #1; pat_we = '0;
    to_state_cycle();
    put_valid[0] = 1'b1; put_data[0] = 8'h41;
    @(posedge clk); #1; put_valid = '0;
    frames = 0;
    while (!get_valid[3] && frames < 20) begin
      @(posedge clk); #1;
      if (!transfer) frames++;
    end
    check(frames == 6, $sformatf("latency 6 frames, got %0d", frames));
    check(get_data[3] == 8'h41, "latency word intact");
    get_ready[3] = 1'b1; pat_we[3] = 1'b1; pat_data[3] = '0;
    @(posedge clk); #1; get_ready = '0; pat_we = '0;

    // 2. fill without requests
    n_put = 0;
    for (int f = 0; f < 20; f++) begin
      to_state_cycle();
      for (int p = 0; p < N; p++)
        if (put_ready[p] && n_put < 12) begin
          put_valid[p] = 1'b1;
          put_data[p]  = {2'b11, 6'(n_put + 1)};
          n_put++;
        end
      @(posedge clk); #1; put_valid = '0;
    end
    check(n_put == 2 * N, $sformatf("store accepts %0d words, took %0d", 2 * N, n_put));
    check(&ring_full && &outreg_full, "ring and outregs full");
    check(n_evt == 0, "a plain wire never stretches");

    // 3. drain
    pat_we = '1; pat_data = '1;
    @(posedge clk); #1; pat_we = '0;
    n_got = 0;
    for (int f = 0; f < 40 && n_got < n_put; f++) begin
      to_state_cycle();
      for (int p = 0; p < N; p++) begin
        get_ready[p] = 1'b0;
        if (get_valid[p]) begin
          int id;
          id = int'(get_data[p][5:0]);
          check(id >= 1 && id <= n_put && !got.exists(id), $sformatf("word %0d returned once", id));
          got[id] = 1'b1;
          get_ready[p] = 1'b1;
          n_got++;
        end
      end
      @(posedge clk); #1; get_ready = '0;
    end
    check(n_got == n_put, $sformatf("all words back: %0d of %0d", n_got, n_put));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
