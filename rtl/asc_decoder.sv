// asc_decoder - instruction decoder of the Control Unit.
//
// Turns the 32-bit instruction held in the IF/ID latch into the control word
// (ctrl_t) that the Control Unit broadcasts to the Sequential PE and to every
// Parallel PE during the ID stage, and puts the immediate field on the
// immediate-data bus. Combinational. A bubble (valid_in = 0) decodes to a
// control word with no side effects. The encoding is this design's own (see
// asc_pkg); the published text describes only the decoder's role.
module asc_decoder
  import asc_pkg::*;
(
  input  logic               valid_in,
  input  logic [INSTR_W-1:0] instr_bits,
  output ctrl_t              ctrl,
  output data_t              imm
);
  instr_t ins;

  always_comb begin
    ins  = instr_t'(instr_bits);
    imm  = ins.imm;
    ctrl = '0;
    ctrl.valid     = valid_in && (ins.op != OP_NOP);
    ctrl.par       = ins.par;
    ctrl.rd        = ins.rd;
    ctrl.rs1       = ins.rs1;
    ctrl.rs2       = ins.rs2;
    ctrl.dsw       = ins.dsw;
    ctrl.bsel      = ins.bsel;
    ctrl.alu_b_imm = ins.bsel;
    ctrl.alu_op    = ALU_ADD;
    ctrl.cmp_op    = CMP_EQ;
    if (ctrl.valid) begin
      unique case (ins.op)
        OP_ADD: begin ctrl.alu_op = ALU_ADD;   ctrl.reg_we = 1'b1; end
        OP_SUB: begin ctrl.alu_op = ALU_SUB;   ctrl.reg_we = 1'b1; end
        OP_AND: begin ctrl.alu_op = ALU_AND;   ctrl.reg_we = 1'b1; end
        OP_OR:  begin ctrl.alu_op = ALU_OR;    ctrl.reg_we = 1'b1; end
        OP_XOR: begin ctrl.alu_op = ALU_XOR;   ctrl.reg_we = 1'b1; end
        OP_SHL: begin ctrl.alu_op = ALU_SHL;   ctrl.reg_we = 1'b1; end
        OP_SHR: begin ctrl.alu_op = ALU_SHR;   ctrl.reg_we = 1'b1; end
        OP_AVG: begin ctrl.alu_op = ALU_AVG;   ctrl.reg_we = 1'b1; end
        OP_MOV: begin ctrl.alu_op = ALU_PASSB; ctrl.reg_we = 1'b1; end
        OP_LD:  begin ctrl.alu_op = ALU_ADD;   ctrl.reg_we = 1'b1; ctrl.mem_rd = 1'b1; end
        OP_ST:  begin ctrl.alu_op = ALU_ADD;   ctrl.mem_we = 1'b1; end
        OP_CEQ: begin ctrl.cmp = ins.par; ctrl.cmp_op = CMP_EQ; end
        OP_CNE: begin ctrl.cmp = ins.par; ctrl.cmp_op = CMP_NE; end
        OP_CLT: begin ctrl.cmp = ins.par; ctrl.cmp_op = CMP_LT; end
        OP_CGE: begin ctrl.cmp = ins.par; ctrl.cmp_op = CMP_GE; end
        OP_MAX: begin ctrl.maxmin = ins.par; end
        OP_MIN: begin ctrl.maxmin = ins.par; ctrl.find_min = 1'b1; end
        OP_POP: begin ctrl.pop = ins.par; end
        OP_BEQ: begin ctrl.branch = !ins.par; end
        OP_BNE: begin ctrl.branch = !ins.par; ctrl.br_ne = 1'b1; end
        OP_JMP: begin ctrl.jump = !ins.par; end
        OP_HALT: begin ctrl.halt = 1'b1; ctrl.par = 1'b0; end
        default: ctrl.valid = 1'b0;
      endcase
    end
  end
endmodule
