// asc_alu - 8-bit arithmetic and logic unit of the EX stage.
//
// Used unchanged by the Sequential PE and by every Parallel PE. It is purely
// combinational: the operands come from the ID/EX latch and the result is
// captured by the EX/MEM latch in the same cycle. The published text says only
// that the EX stage "performs arithmetic and logic operations" and gives an
// example of adding and of averaging neighbour data; the operation set below
// (add, subtract, and, or, xor, shift by one, average, pass B) is this
// design's choice. There is no multiplier, as in the published FPGA build.
module asc_alu
  import asc_pkg::*;
(
  input  alu_op_e op,
  input  data_t   a,
  input  data_t   b,
  output data_t   y
);
  logic [DATA_W:0] sum;

  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    unique case (op)
      ALU_ADD:   y = sum[DATA_W-1:0];
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SHL:   y = {a[DATA_W-2:0], 1'b0};
      ALU_SHR:   y = {1'b0, a[DATA_W-1:1]};
      ALU_AVG:   y = sum[DATA_W:1];
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
