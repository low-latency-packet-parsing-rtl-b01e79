// branch_cond_eval: Branch Condition Evaluator.
//
// Extracts the programmer-specified field of the current segment with its
// built-in extraction engine and tests it against the instruction's reference
// value under the instruction's 3-bit condition: equal, not equal, less,
// greater, less-or-equal, greater-or-equal (unsigned), any masked bit set, no
// masked bit set. 'taken' goes to the APC in the same cycle. The 3-bit
// condition field follows the architecture; the list of conditions is this
// design's choice. Purely combinational.
module branch_cond_eval
  import parser_pkg::*;
(
  input  logic [SEG_W-1:0]   seg,
  input  ext_spec_t          spec,
  input  cond_e              cond,
  input  logic [FIELD_W-1:0] ref_val,
  output logic               taken
);
  logic [FIELD_W-1:0] f;

  extraction_engine u_ee (.seg(seg), .spec(spec), .field(f));

  always_comb begin
    unique case (cond)
      CC_EQ:   taken = (f == ref_val);
      CC_NE:   taken = (f != ref_val);
      CC_LT:   taken = (f <  ref_val);
      CC_GT:   taken = (f >  ref_val);
      CC_LE:   taken = (f <= ref_val);
      CC_GE:   taken = (f >= ref_val);
      CC_ANY:  taken = |(f & ref_val);
      CC_NONE: taken = ~|(f & ref_val);
      default: taken = 1'b0;
    endcase
  end
endmodule
