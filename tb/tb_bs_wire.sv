// Testbench for bs_wire: exhaustive check of the enable and of the copy and
// newstate controls against their definitions
//   go = from_s & ~to_s & guard, copy = go & transfer, newstate = go & ~transfer.
module tb_bs_wire;
  import st_pkg::*;
  logic from_s, to_s, guard, transfer, go;
  xfer_t ctl;
  int checks = 0, failures = 0;

  bs_wire dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      bit en;
      {from_s, to_s, guard, transfer} = 4'(v);
      #1;
      en = v[3] && !v[2] && v[1];
      checks += 3;
      if (go != en)                     begin failures++; $display("FAIL go v=%0d", v); end
      if (ctl.copy != (en && v[0]))     begin failures++; $display("FAIL copy v=%0d", v); end
      if (ctl.newstate != (en && !v[0])) begin failures++; $display("FAIL newstate v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
