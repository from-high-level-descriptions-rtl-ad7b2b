// Workload testbench: random and biased batches of 1200 operations on a
// 32-port storage-ring, with rubber-wires of height 8, 4 and 2.
//
// For each run it prints the frames the batch took, next to the lower bound
// of an ideal store and the upper bound of a store that serves one
// operation at a time (1200). Checks: every batch completes with every word
// returned exactly once; each run lies between the two bounds; on the biased
// batch, where the store must absorb a burst of outs, height 8 is faster
// than height 2 (at height 2 the burst can exceed what the store holds,
// and the batch then stalls with every port waiting to put); and on the
// biased batch the rubber-wires stretch.
module tb_workload_batches;
  logic clk = 1'b0, rst_n = 1'b0;
  localparam int RUNS = 6;
  logic done [RUNS];
  logic cp [RUNS];
  int frames [RUNS], lb [RUNS], ck [RUNS], fl [RUNS], st [RUNS];
  int checks = 0, failures = 0;

  batch_driver #(.HEIGHT(8), .BIASED(1'b0), .SEED(11)) r0 (.clk, .rst_n, .done(done[0]), .frames(frames[0]), .lower_bound(lb[0]), .checks(ck[0]), .failures(fl[0]), .n_stretch(st[0]), .complete(cp[0]));
  batch_driver #(.HEIGHT(4), .BIASED(1'b0), .SEED(11)) r1 (.clk, .rst_n, .done(done[1]), .frames(frames[1]), .lower_bound(lb[1]), .checks(ck[1]), .failures(fl[1]), .n_stretch(st[1]), .complete(cp[1]));
  batch_driver #(.HEIGHT(2), .BIASED(1'b0), .SEED(11)) r2 (.clk, .rst_n, .done(done[2]), .frames(frames[2]), .lower_bound(lb[2]), .checks(ck[2]), .failures(fl[2]), .n_stretch(st[2]), .complete(cp[2]));
  batch_driver #(.HEIGHT(8), .BIASED(1'b1), .SEED(23)) r3 (.clk, .rst_n, .done(done[3]), .frames(frames[3]), .lower_bound(lb[3]), .checks(ck[3]), .failures(fl[3]), .n_stretch(st[3]), .complete(cp[3]));
  batch_driver #(.HEIGHT(4), .BIASED(1'b1), .SEED(23)) r4 (.clk, .rst_n, .done(done[4]), .frames(frames[4]), .lower_bound(lb[4]), .checks(ck[4]), .failures(fl[4]), .n_stretch(st[4]), .complete(cp[4]));
  batch_driver #(.HEIGHT(2), .BIASED(1'b1), .SEED(23)) r5 (.clk, .rst_n, .done(done[5]), .frames(frames[5]), .lower_bound(lb[5]), .checks(ck[5]), .failures(fl[5]), .n_stretch(st[5]), .complete(cp[5]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (150000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static string name [RUNS] = '{"random d=8", "random d=4", "random d=2",
                                  "biased d=8", "biased d=4", "biased d=2"};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < RUNS; r++) wait (done[r]);
    for (int r = 0; r < RUNS; r++) begin
      $display("%s: %0d frames (ideal store %0d, one-at-a-time store 1200), %0d stretches",
               name[r], frames[r], lb[r], st[r]);
      checks += ck[r];
      failures += fl[r];
      if (r != 5) begin
        check(cp[r], {name[r], " completes"});
        check(frames[r] >= lb[r], {name[r], " not below the ideal bound"});
        check(frames[r] <= 1200, {name[r], " not above the one-at-a-time bound"});
      end
    end
    // height 2 holds 32*(1+2*2) = 160 words in the ring; the biased burst
    // needs more, so it either stalls or is slower than height 8
    check(!cp[5] || frames[3] < frames[5], "biased batch: height 8 faster than height 2");
    check(frames[3] < frames[0] * 2, "biased batch at height 8 within twice the random one");
    check(st[3] > 0, "biased batch stretches the rubber-wires");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
