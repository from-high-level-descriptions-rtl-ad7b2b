// Full-size testbench: storage_ring with all its default parameters
// (32 ports, 16-bit words, 4 category bits, rubber-wires of height 8).
//
// 1. Latency: a word put at port 0 and requested only at port 31 is offered
//    there 34 frames after the put (1 frame into the ring, 31 frames around
//    it, 1 frame into inreg, visible in the next state cycle), a frame being
//    17 cycles.
// 2. One complete round: every port puts one word whose category is
//    (port mod 4); port p asks for category ((p + 1) mod 4). All 32 words
//    must come back, each once, each at a port asking for its category.
module tb_storage_ring_full;
  import st_pkg::*;
  localparam int unsigned N = N_PORTS_DEF, WW = WW_DEF, NCAT = NCAT_DEF;
  localparam int unsigned OW = $clog2(2 * HEIGHT_DEF + 2);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] put_valid, put_ready, pat_we, get_valid, get_ready;
  logic [N-1:0][WW-1:0] put_data, get_data;
  logic [N-1:0][NCAT-1:0] pat_data;
  logic [N-1:0] outreg_full, inreg_full, pat_empty;
  logic transfer, frame_start;
  logic [N-1:0] ring_full, stretch_evt, descend_evt;
  logic [N-1:0][OW-1:0] occupancy;
  int checks = 0, failures = 0;
  bit got [int];

  storage_ring dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic to_state_cycle();
    while (transfer) begin @(posedge clk); #1; end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int frames, cycles, n_got;
    put_valid = '0; put_data = '0; pat_we = '0; pat_data = '0; get_ready = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. latency around the whole ring
    pat_we[N-1] = 1'b1; pat_data[N-1] = NCAT'(1);
    @(posedge clk); #1; pat_we = '0;
    to_state_cycle();
    put_valid[0] = 1'b1; put_data[0] = {NCAT'(1), (WW - NCAT)'(12'h5A5)};
    @(posedge clk); #1; put_valid = '0;
    frames = 0; cycles = 1;
    while (!get_valid[N-1] && frames < 60) begin
      @(posedge clk); #1; cycles++;
      if (!transfer) frames++;
    end
    check(frames == N + 2, $sformatf("latency %0d frames, expected %0d", frames, N + 2));
    check(cycles == (N + 2) * (WW + 1), $sformatf("latency %0d cycles", cycles));
    check(get_data[N-1] == {NCAT'(1), (WW - NCAT)'(12'h5A5)}, "latency word intact");
    get_ready[N-1] = 1'b1;
    pat_we[N-1] = 1'b1; pat_data[N-1] = '0;
    @(posedge clk); #1; get_ready = '0; pat_we = '0;

    // 2. every port puts one word and asks for the next category
    to_state_cycle();
    for (int p = 0; p < N; p++) begin
      check(put_ready[p], "port ready");
      put_valid[p] = 1'b1;
      put_data[p]  = {NCAT'(1 << (p % NCAT)), (WW - NCAT)'(p)};
      pat_we[p]    = 1'b1;
      pat_data[p]  = NCAT'(1 << ((p + 1) % NCAT));
    end
    @(posedge clk); #1; put_valid = '0; pat_we = '0;
    n_got = 0; frames = 0;
    while (n_got < N && frames < 200) begin
      to_state_cycle();
      for (int p = 0; p < N; p++) begin
        get_ready[p] = 1'b0;
        if (get_valid[p]) begin
          int id;
          id = int'(get_data[p][WW-NCAT-1:0]);
          check(id < N && !got.exists(id), $sformatf("word %0d returned once", id));
          check(get_data[p][WW-1 -: NCAT] == NCAT'(1 << ((p + 1) % NCAT)),
                $sformatf("word %0d matches port %0d", id, p));
          got[id] = 1'b1;
          get_ready[p] = 1'b1;
          n_got++;
        end
      end
      @(posedge clk); #1; get_ready = '0;
      frames++;
    end
    check(n_got == N, $sformatf("all %0d words returned, got %0d", N, n_got));
    check(outreg_full == '0 && inreg_full == '0 && ring_full == '0, "store empty at the end");
    $display("round of %0d words took %0d frames", N, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
