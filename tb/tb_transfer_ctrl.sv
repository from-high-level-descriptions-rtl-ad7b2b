// Testbench for transfer_ctrl: checks over several frames that 'transfer' is
// high for exactly WW consecutive cycles and low for exactly one, and that
// 'frame_start' marks the first high cycle, starting right after reset.
module tb_transfer_ctrl;
  localparam int unsigned WW = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic transfer, frame_start;
  int checks = 0, failures = 0;

  transfer_ctrl #(.WW(WW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 6; f++) begin
      for (int c = 0; c <= WW; c++) begin
        check(transfer == (c < WW), $sformatf("transfer frame %0d cycle %0d", f, c));
        check(frame_start == (c == 0), $sformatf("frame_start frame %0d cycle %0d", f, c));
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
