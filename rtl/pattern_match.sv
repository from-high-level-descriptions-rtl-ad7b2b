// Pattern match of the problem-store.
//
// Every stored word belongs to one or more categories; its top NCAT bits are
// a category set, one bit per category. A processor asks for a word by
// writing a pattern, a set of categories. A word matches when it shares at
// least one category with the pattern. A pattern of all zeros matches
// nothing, so it also serves as 'no request'.
//
// That a retrieved word must match a processor-supplied pattern follows the
// original design; the encoding of categories and patterns is this
// implementation's choice. Purely combinational; the payload bits below the
// category field take no part in the match.
module pattern_match #(
  parameter int unsigned WW   = st_pkg::WW_DEF,
  parameter int unsigned NCAT = st_pkg::NCAT_DEF
) (
  input  logic [NCAT-1:0] pat,
  input  logic [WW-1:0]   elem,
  output logic            match
);

  logic [NCAT-1:0] cats;

  always_comb begin
    cats  = elem[WW-1 -: NCAT];
    match = |(cats & pat);
  end

endmodule
