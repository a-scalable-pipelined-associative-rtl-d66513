// tb_asc_spe - runs a scalar program through the Sequential PE (the
// instruction words are decoded by the decoder, one per cycle, as the Control
// Unit would issue them) and checks: ALU results and loads/stores through the
// data memory (read back over the host port), the branch comparator's
// redirect in ID, the broadcast-register bus, that parallel instructions do
// not touch SPE state, and that HALT reaches WB three cycles after ID.
module tb_asc_spe;
  import asc_pkg::*;
  import asc_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid_in = 0;
  logic [31:0] instr_bits = 0;
  ctrl_t ctrl;
  data_t imm, bcast_data, target, host_wdata, host_rdata;
  logic redirect, halt_wb, host_en, host_we;
  logic [7:0] host_addr;
  int checks = 0, failures = 0;
  int cyc = 0, halt_issue = -1, halt_seen = -1;

  asc_decoder u_dec (.valid_in(valid_in), .instr_bits(instr_bits), .ctrl(ctrl), .imm(imm));
  asc_spe dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .imm(imm), .bcast_data(bcast_data),
               .redirect(redirect), .target(target), .halt_wb(halt_wb),
               .host_en(host_en), .host_we(host_we), .host_addr(host_addr),
               .host_wdata(host_wdata), .host_rdata(host_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (halt_wb) halt_seen <= cyc;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // present one instruction in ID for one cycle
  task automatic issue(word_t w);
    @(negedge clk);
    valid_in = 1'b1; instr_bits = w;
  endtask

  initial begin
    host_en = 1; host_we = 0; host_addr = 0; host_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; host_en = 0;
    issue(s_ri(OP_MOV, 1, 0, 5));
    issue(s_ri(OP_MOV, 2, 0, 7));
    issue(nop()); issue(nop());
    issue(s_rr(OP_ADD, 3, 1, 2));
    issue(s_rr(OP_SUB, 4, 2, 1));
    issue(p(OP_ADD, 3, 1, 1, DSW_COMP, 1'b0, 0));   // parallel: SPE must ignore
    issue(nop());
    issue(s_st(3, 0, 10));
    issue(s_st(4, 1, 20));                          // address 5 + 20
    issue(s_ld(5, 0, 10));
    issue(nop()); issue(nop());
    issue(s_br(OP_BEQ, 5, 3, 77));
    #1; chk(int'(redirect), 1, "BEQ taken"); chk(int'(target), 77, "branch target");
    issue(s_br(OP_BNE, 5, 3, 78));
    #1; chk(int'(redirect), 0, "BNE not taken");
    issue(s_br(OP_BNE, 5, 4, 79));
    #1; chk(int'(redirect), 1, "BNE taken");
    issue(s_br(OP_JMP, 0, 0, 80));
    #1; chk(int'(redirect), 1, "JMP");
    issue(p_s(OP_CEQ, 0, 0, 4));
    #1; chk(int'(bcast_data), 2, "broadcast register R4");
        chk(int'(redirect), 0, "parallel instruction does not branch");
    issue(s_rr(OP_AVG, 6, 1, 2));
    issue(s_rr(OP_SHL, 7, 2, 0));
    issue(s_ri(OP_XOR, 8, 2, 8'hF0));
    issue(nop());
    issue(s_st(6, 0, 30));
    issue(s_st(7, 0, 31));
    issue(s_st(8, 0, 32));
    issue(s_st(3, 0, 33));
    issue(halt());
    halt_issue = cyc;
    @(negedge clk);
    valid_in = 1'b0;
    repeat (6) @(negedge clk);
    chk(halt_seen - halt_issue, 3, "HALT reaches WB three cycles after ID");
    host_en = 1;
    host_addr = 10; #1 chk(int'(host_rdata), 12, "mem[10] = 5 + 7");
    host_addr = 25; #1 chk(int'(host_rdata), 2,  "mem[25] = 7 - 5");
    host_addr = 30; #1 chk(int'(host_rdata), 6,  "mem[30] = avg(5,7)");
    host_addr = 31; #1 chk(int'(host_rdata), 14, "mem[31] = 7 << 1");
    host_addr = 32; #1 chk(int'(host_rdata), 8'h07 ^ 8'hF0, "mem[32] = 7 ^ F0");
    host_addr = 33; #1 chk(int'(host_rdata), 12, "R3 untouched by parallel ADD");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
