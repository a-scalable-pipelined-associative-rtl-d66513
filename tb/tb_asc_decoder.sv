// tb_asc_decoder - decodes one instruction of each opcode, with random
// register fields, and checks the control word against a table of expected
// control bits; also checks that a bubble decodes to no action.
module tb_asc_decoder;
  import asc_pkg::*;
  import asc_asm_pkg::*;
  logic valid_in;
  logic [31:0] instr_bits;
  ctrl_t ctrl;
  data_t imm;
  int checks = 0, failures = 0;

  asc_decoder dut (.valid_in(valid_in), .instr_bits(instr_bits), .ctrl(ctrl), .imm(imm));

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 400; k++) begin
      int o, rd, r1, r2;
      logic par;
      // expected: {reg_we, mem_rd, mem_we, cmp, maxmin, find_min, pop, branch, br_ne, jump, halt}
      logic [10:0] e;
      o = k % 23; rd = $urandom % 16; r1 = $urandom % 16; r2 = $urandom % 16;
      par = (o >= 13 && o <= 19) ? 1'b1 : (o >= 20 ? 1'b0 : 1'($urandom));
      valid_in   = 1'b1;
      instr_bits = p(opcode_e'(o), rd, r1, r2, dsw_mode_e'(k % 5), 1'($urandom), k);
      instr_bits[26] = par;
      #1;
      case (o)
        0:  e = 11'b000_0000_0000;
        1:  e = 11'b000_0000_0001;
        2, 3, 4, 5, 6, 7, 8, 9, 10: e = 11'b100_0000_0000;
        11: e = 11'b110_0000_0000;
        12: e = 11'b001_0000_0000;
        13, 14, 15, 16: e = 11'b000_1000_0000;
        17: e = 11'b000_0100_0000;
        18: e = 11'b000_0110_0000;
        19: e = 11'b000_0001_0000;
        20: e = 11'b000_0000_1000;
        21: e = 11'b000_0000_1100;
        default: e = 11'b000_0000_0010;
      endcase
      chk(32'({ctrl.reg_we, ctrl.mem_rd, ctrl.mem_we, ctrl.cmp, ctrl.maxmin,
               ctrl.find_min, ctrl.pop, ctrl.branch, ctrl.br_ne, ctrl.jump, ctrl.halt}),
          32'(e), $sformatf("op %0d control bits", o));
      chk(32'(ctrl.valid), 32'(o != 0), "valid");
      chk(32'({ctrl.rd, ctrl.rs1, ctrl.rs2}), 32'({4'(rd), 4'(r1), 4'(r2)}), "register fields");
      chk(32'(imm), 32'(k % 256), "immediate");
      if (o >= 2 && o <= 10)
        chk(32'(ctrl.alu_op), (o == 10) ? 32'(ALU_PASSB) : 32'(o - 2), "alu op");
      if (o >= 13 && o <= 16)
        chk(32'(ctrl.cmp_op), 32'(o - 13), "compare op");
      valid_in = 1'b0;
      #1;
      chk(32'({ctrl.valid, ctrl.reg_we, ctrl.mem_we, ctrl.cmp, ctrl.maxmin, ctrl.pop,
               ctrl.branch, ctrl.jump, ctrl.halt}), 32'd0, "bubble");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
