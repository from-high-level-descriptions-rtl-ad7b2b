// Testbench for pattern_match: random words and patterns, compared with the
// rule 'the word's category bits (its top NCAT bits) and the pattern share a
// set bit', plus the corner cases of an empty pattern and an exact category.
module tb_pattern_match;
  localparam int unsigned WW = 12, NCAT = 3;
  logic [NCAT-1:0] pat;
  logic [WW-1:0]   elem;
  logic            match;
  int checks = 0, failures = 0;

  pattern_match #(.WW(WW), .NCAT(NCAT)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      bit exp;
      pat  = NCAT'($urandom);
      elem = WW'($urandom);
      #1;
      exp = 1'b0;
      for (int c = 0; c < NCAT; c++)
        if (pat[c] && elem[WW-NCAT+c]) exp = 1'b1;
      checks++;
      if (match != exp) begin
        failures++;
        $display("FAIL pat=%b elem=%h match=%b", pat, elem, match);
      end
    end
    // empty pattern never matches
    pat = '0; elem = '1; #1;
    checks++; if (match) failures++;
    // payload bits do not matter
    pat = 3'b010; elem = {3'b010, 9'h000}; #1;
    checks++; if (!match) failures++;
    pat = 3'b010; elem = {3'b101, 9'h1ff}; #1;
    checks++; if (match) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
