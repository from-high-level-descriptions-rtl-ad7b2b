// Batch driver for the storage-ring workload runs (testbench helper).
//
// Instantiates a 32-port storage_ring of the given HEIGHT and plays one
// processor per port. Each processor works through its own sequence of
// operations in order, doing the one at the front as soon as it can:
//   out : put a new word (unique id, random non-empty category set)
//   in  : request any category and wait until a word arrives.
// A port does at most one operation per frame. The batch holds TOTAL_OPS
// operations spread over the ports, as many outs as ins in total.
//   BIASED = 0 : outs and ins shuffled evenly through every sequence
//   BIASED = 1 : first half of every sequence 3 outs per in, second half
//                3 ins per out
// Reported: frames from start until the last operation is done, the lower
// bound of an ideal store on the same batch (every out immediately, an in
// whenever the store holds a word), and the scoreboard results (each word
// returned once, only words that were put). A run in which no operation
// completes for STALL_FRAMES frames ends with 'complete' low.
module batch_driver #(
  parameter int unsigned HEIGHT    = 8,
  parameter bit          BIASED    = 1'b0,
  parameter int unsigned SEED      = 1,
  parameter int          TOTAL_OPS = 1200,
  parameter int          STALL_FRAMES = 300
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   frames,
  output int   lower_bound,
  output int   checks,
  output int   failures,
  output int   n_stretch,
  output logic complete
);
  localparam int unsigned N = 32, WW = 16, NCAT = 4;
  localparam int unsigned OW = $clog2(2 * HEIGHT + 2);
  localparam int MAXL = (TOTAL_OPS + N - 1) / N;

  logic [N-1:0] put_valid, put_ready, pat_we, get_valid, get_ready;
  logic [N-1:0][WW-1:0] put_data, get_data;
  logic [N-1:0][NCAT-1:0] pat_data;
  logic [N-1:0] outreg_full, inreg_full, pat_empty;
  logic transfer, frame_start;
  logic [N-1:0] ring_full, stretch_evt, descend_evt;
  logic [N-1:0][OW-1:0] occupancy;

  storage_ring #(.N_PORTS(N), .WW(WW), .HEIGHT(HEIGHT), .NCAT(NCAT)) u_ring (.*);

  bit ops [N][MAXL];   // 1 = out, 0 = in
  int len [N];
  int idx [N];
  bit got [int];
  int next_id;

  always @(posedge clk) if (rst_n) n_stretch += $countones(stretch_evt);

  // build the batch
  function automatic void build();
    for (int p = 0; p < N; p++) begin
      len[p] = TOTAL_OPS / N + ((p < TOTAL_OPS % N) ? 1 : 0);
      idx[p] = 0;
    end
    for (int p = 0; p < N; p++) begin
      int half, nouts;
      if (!BIASED) begin
        // half outs; odd lengths alternate between one more out or in
        nouts = len[p] / 2 + ((len[p] % 2 == 1 && p % 2 == 0) ? 1 : 0);
        for (int k = 0; k < len[p]; k++) ops[p][k] = (k < nouts);
        shuffle(p, 0, len[p]);
      end else begin
        half = len[p] / 2;
        for (int k = 0; k < half; k++)      ops[p][k] = (k % 4 != 3);
        for (int k = half; k < len[p]; k++) ops[p][k] = ((k - half) % 4 == 3);
        shuffle(p, 0, half);
        shuffle(p, half, len[p]);
      end
    end
    balance();
  endfunction

  function automatic void shuffle(int p, int lo, int hi);
    for (int k = hi - 1; k > lo; k--) begin
      int j;
      bit t;
      j = lo + int'($urandom % (k - lo + 1));
      t = ops[p][k]; ops[p][k] = ops[p][j]; ops[p][j] = t;
    end
  endfunction

  // make total outs equal total ins by turning surplus outs into ins
  // (or the reverse), taken from the end of the longest sequences
  function automatic void balance();
    int outs, ins;
    outs = 0; ins = 0;
    for (int p = 0; p < N; p++)
      for (int k = 0; k < len[p]; k++) if (ops[p][k]) outs++; else ins++;
    for (int p = 0; p < N && outs != ins; p++)
      for (int k = len[p] - 1; k >= 0 && outs != ins; k--) begin
        if (outs > ins && ops[p][k])       begin ops[p][k] = 1'b0; outs--; ins++; end
        else if (ins > outs && !ops[p][k]) begin ops[p][k] = 1'b1; ins--; outs++; end
      end
  endfunction

  // ideal store: every out at once, an in whenever a word is stored
  function automatic int ideal_steps();
    int i [N];
    int store, steps, left, add;
    store = 0; steps = 0;
    for (int p = 0; p < N; p++) i[p] = 0;
    left = TOTAL_OPS;
    while (left > 0 && steps < 5000) begin
      add = 0;
      for (int p = 0; p < N; p++) if (i[p] < len[p]) begin
        if (ops[p][i[p]]) begin add++; i[p]++; left--; end
        else if (store > 0) begin store--; i[p]++; left--; end
      end
      store += add;
      steps++;
    end
    return steps;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL[d=%0d biased=%0d] %s at %0t", HEIGHT, BIASED, what, $time); end
  endtask

  initial begin
    int remaining, n_put, n_get, stall;
    done = 1'b0; complete = 1'b0; frames = 0; checks = 0; failures = 0; n_stretch = 0;
    put_valid = '0; put_data = '0; pat_we = '0; pat_data = '0; get_ready = '0;
    // a batch an ideal store cannot finish (every waiting in queued ahead of
    // the outs that would serve it) is drawn again
    void'($urandom(SEED));
    for (int tries = 0; tries < 100; tries++) begin
      build();
      lower_bound = ideal_steps();
      if (lower_bound < 5000) break;
    end
    next_id = 1; n_put = 0; n_get = 0; stall = 0;
    remaining = TOTAL_OPS;
    @(posedge rst_n);
    while (remaining > 0 && stall < STALL_FRAMES) begin
      int rem_prev;
      rem_prev = remaining;
      while (transfer) begin @(posedge clk); #1; end
      for (int p = 0; p < N; p++) begin
        if (idx[p] < len[p]) begin
          if (ops[p][idx[p]]) begin
            if (put_ready[p]) begin
              put_valid[p] = 1'b1;
              put_data[p]  = {NCAT'(1 + $urandom % 15), (WW - NCAT)'(next_id)};
              next_id++; n_put++; idx[p]++; remaining--;
            end
          end else if (get_valid[p]) begin
            int id;
            id = int'(get_data[p][WW-NCAT-1:0]);
            chk(id >= 1 && id < next_id, "returned word was put");
            chk(!got.exists(id), "returned word not seen before");
            got[id] = 1'b1;
            get_ready[p] = 1'b1;
            n_get++; idx[p]++; remaining--;
          end
        end
        // request any category exactly while the front operation is an in
        // that has not been served in this cycle
        pat_we[p]   = 1'b1;
        pat_data[p] = (idx[p] < len[p] && !ops[p][idx[p]]) ? '1 : '0;
      end
      @(posedge clk); #1;
      put_valid = '0; get_ready = '0; pat_we = '0;
      frames++;
      stall = (remaining == rem_prev) ? stall + 1 : 0;
    end
    // a batch may stall when the store is full and every port waits to put;
    // the caller decides whether that is expected
    complete = (remaining == 0);
    if (complete) chk(n_put == n_get, "as many words returned as put");
    else $display("[d=%0d biased=%0d] stalled with %0d operations left, %0d words stored",
                  HEIGHT, BIASED, remaining, n_put - n_get);
    done = 1'b1;
  end
endmodule
