// asc_data_switch - Data Switch of a Parallel PE: the node of the
// reconfigurable linear PE network.
//
// Six inputs: the two register-file read ports (rf1 = "left" register input,
// rf2 = "right" register input), immediate data from the Control Unit,
// register data broadcast by the Sequential PE, and the data arriving from the
// left and right neighbours. Four outputs: operands A and B for the comparator
// and the ID/EX latch, and the data sent to the left and right neighbours.
//
// Modes, as published:
//   Computation  A = rf1, B = rf2
//   Broadcast    A = rf1, B = immediate (bsel=0) or SPE register (bsel=1)
//   Move Left    rf1 goes to the left neighbour, A = rf2, B = data from right
//   Move Right   rf2 goes to the right neighbour, A = rf1, B = data from left
//   Move Both    rf1 to the left, rf2 to the right, A = from left, B = from right
//   Bypass       (top of mask stack = 0) data from the left neighbour goes
//                straight to the right neighbour and vice versa, whatever the
//                instruction's mode.
// Which operand (A or B) each source lands on, and driving 0 to a neighbour
// that is not being sent anything, are this design's choices. Purely
// combinational: a bypassed chain of PEs is one combinational path, which is
// the frequency limit the published measurements report for large arrays.
module asc_data_switch
  import asc_pkg::*;
(
  input  dsw_mode_e mode,
  input  logic      bsel,
  input  logic      responder,   // top of mask stack
  input  data_t     rf1,
  input  data_t     rf2,
  input  data_t     imm,
  input  data_t     spe_data,
  input  data_t     from_left,
  input  data_t     from_right,
  output data_t     op_a,
  output data_t     op_b,
  output data_t     to_left,
  output data_t     to_right
);
  always_comb begin
    op_a     = rf1;
    op_b     = rf2;
    to_left  = '0;
    to_right = '0;
    if (!responder) begin
      // Bypass Mode
      to_right = from_left;
      to_left  = from_right;
    end else begin
      unique case (mode)
        DSW_COMP: begin
          op_a = rf1;
          op_b = rf2;
        end
        DSW_BCAST: begin
          op_a = rf1;
          op_b = bsel ? spe_data : imm;
        end
        DSW_LEFT: begin
          to_left = rf1;
          op_a    = rf2;
          op_b    = from_right;
        end
        DSW_RIGHT: begin
          to_right = rf2;
          op_a     = rf1;
          op_b     = from_left;
        end
        DSW_BOTH: begin
          to_left  = rf1;
          to_right = rf2;
          op_a     = from_left;
          op_b     = from_right;
        end
        default: begin
          op_a = rf1;
          op_b = rf2;
        end
      endcase
    end
  end
endmodule
