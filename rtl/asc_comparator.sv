// asc_comparator - associative-search comparator of a Parallel PE.
//
// Sits in the ID stage behind the Data Switch and compares its two outputs,
// typically local data against a key broadcast by the Control Unit or the
// Sequential PE. The single-bit result goes to the mask stack. The published
// text gives the comparator and its place; the four unsigned relations
// (equal, not equal, less than, greater or equal) are this design's choice.
module asc_comparator
  import asc_pkg::*;
(
  input  cmp_op_e op,
  input  data_t   a,
  input  data_t   b,
  output logic    match
);
  always_comb begin
    unique case (op)
      CMP_EQ:  match = (a == b);
      CMP_NE:  match = (a != b);
      CMP_LT:  match = (a <  b);
      CMP_GE:  match = (a >= b);
      default: match = 1'b0;
    endcase
  end
endmodule
