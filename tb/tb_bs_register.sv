// Testbench for bs_register: two registers joined by a wire driven from the
// testbench. A word is loaded in parallel into the source, copied over WW
// shift cycles and a newstate cycle, and checked bit for bit in the target;
// the flags must change only in the newstate cycle. Then the target is read
// out with 'clear', and a register that is neither filled nor drained must
// keep its word while others shift.
module tb_bs_register;
  import st_pkg::*;
  localparam int unsigned WW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  xfer_t ctl, none;
  logic load, clear_t;
  logic [WW-1:0] load_data;
  logic sa, sb, sc, a_out, b_out, c_out;
  logic [WW-1:0] ra, rb, rc;
  int checks = 0, failures = 0;

  assign none = '0;

  bs_register #(.WW(WW)) u_a (
    .clk, .rst_n, .fill(none), .drain(ctl), .sin(1'b0),
    .load(load), .load_data(load_data), .clear(1'b0),
    .s(sa), .r(ra), .sout(a_out));
  bs_register #(.WW(WW)) u_b (
    .clk, .rst_n, .fill(ctl), .drain(none), .sin(a_out),
    .load(1'b0), .load_data('0), .clear(clear_t),
    .s(sb), .r(rb), .sout(b_out));
  // bystander: loaded once, never moved
  bs_register #(.WW(WW)) u_c (
    .clk, .rst_n, .fill(none), .drain(none), .sin(1'b1),
    .load(load), .load_data(~load_data), .clear(1'b0),
    .s(sc), .r(rc), .sout(c_out));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctl = '0; load = 0; clear_t = 0; load_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!sa && !sb, "empty after reset");
    for (int t = 0; t < 4; t++) begin
      logic [WW-1:0] w;
      w = WW'($urandom);
      load = 1; load_data = w;
      @(posedge clk); #1;
      load = 0;
      check(sa && ra == w, "parallel load");
      check(sc && rc == ~w, "bystander load");
      for (int c = 0; c < WW; c++) begin
        ctl = '{copy: 1'b1, newstate: 1'b0};
        @(posedge clk); #1;
        check(sa && !sb, "flags unchanged while shifting");
      end
      check(rb == w, $sformatf("target holds word %h got %h", w, rb));
      ctl = '{copy: 1'b0, newstate: 1'b1};
      @(posedge clk); #1;
      ctl = '0;
      check(!sa && sb, "newstate: source empty, target full");
      check(rb == w, "word kept after newstate");
      check(sc && rc == ~w, "bystander unchanged");
      clear_t = 1;
      @(posedge clk); #1;
      clear_t = 0;
      check(!sb, "clear empties target");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
