// tb_asc_ppe - one Parallel PE driven by decoded instructions, with the
// testbench playing both neighbours and the max/min unit. Checks loads,
// ALU work and stores (read back over the host port), broadcast of the
// immediate and of SPE data, each Data Movement mode, the mask stack gating
// the ID/EX latch (a masked instruction leaves no trace), Bypass when not a responder, pop, and max/min flagging.
module tb_asc_ppe;
  import asc_pkg::*;
  import asc_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid_in = 0;
  logic [31:0] instr_bits = 0;
  ctrl_t ctrl;
  data_t imm, spe_data, from_left, from_right, to_left, to_right;
  data_t mm_value, mm_extreme, host_wdata, host_rdata;
  logic responder, host_en, host_we;
  logic [7:0] host_addr;
  int checks = 0, failures = 0;

  asc_decoder u_dec (.valid_in(valid_in), .instr_bits(instr_bits), .ctrl(ctrl), .imm(imm));
  asc_ppe dut (.*);

  always #5 clk = ~clk;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic issue(word_t w);
    @(negedge clk);
    valid_in = 1'b1; instr_bits = w;
  endtask

  task automatic gap(int n);
    repeat (n) issue(nop());
  endtask

  task automatic mem_expect(int a, int v, string what);
    host_addr = 8'(a); #1;
    chk(int'(host_rdata), v, what);
  endtask

  initial begin
    spe_data = 8'd42; from_left = 8'd91; from_right = 8'd57; mm_extreme = 8'd0;
    host_en = 1; host_we = 0; host_addr = 0; host_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // host clears the first 64 bytes and loads the operands
    for (int a = 2; a < 64; a++) begin
      @(negedge clk); host_we = 1; host_addr = 8'(a); host_wdata = 8'd0;
    end
    @(negedge clk); host_we = 1; host_addr = 0; host_wdata = 8'd20;
    @(negedge clk); host_addr = 1; host_wdata = 8'd3;
    @(negedge clk); host_we = 0; host_en = 0;
    chk(int'(responder), 1, "responder after reset");
    issue(p(OP_LD, 1, 0, 0, DSW_COMP, 1'b0, 0));       // R1 = 20
    issue(p(OP_LD, 2, 0, 0, DSW_COMP, 1'b0, 1));       // R2 = 3
    gap(2);
    issue(p(OP_ADD, 3, 1, 2, DSW_COMP, 1'b0, 0));      // R3 = 23
    issue(p_i(OP_SUB, 4, 1, 5));                       // R4 = 15
    issue(p_s(OP_ADD, 5, 2, 0));                       // R5 = 3 + 42
    // Data Movement Right: R6 = data from left; R2 goes right
    issue(p(OP_MOV, 6, 1, 2, DSW_RIGHT, 1'b0, 0));
    #1 chk(int'(to_right), 3, "move right sends rf2"); chk(int'(to_left), 0, "move right: nothing left");
    // Data Movement Left: R7 = data from right; R1 goes left
    issue(p(OP_MOV, 7, 1, 2, DSW_LEFT, 1'b0, 0));
    #1 chk(int'(to_left), 20, "move left sends rf1");
    // Data Movement Both: R8 = avg(left, right)
    issue(p(OP_AVG, 8, 1, 2, DSW_BOTH, 1'b0, 0));
    #1 chk(int'(to_left), 20, "both sends rf1 left"); chk(int'(to_right), 3, "both sends rf2 right");
    // associative search: R1 == 20 -> responder stays 1
    issue(p_i(OP_CEQ, 0, 1, 20));
    issue(p_i(OP_CLT, 0, 1, 20));                      // 20 < 20 false -> not responder
    #1 chk(int'(responder), 1, "still responder during the pushing compare");
    issue(p_i(OP_MOV, 9, 0, 99));                      // masked: must not write R9
    #1 chk(int'(responder), 0, "not a responder after CLT");
    // Bypass while not a responder, whatever the mode
    chk(int'(to_right), 91, "bypass left->right"); chk(int'(to_left), 57, "bypass right->left");
    issue(p(OP_MOV, 9, 1, 2, DSW_BOTH, 1'b0, 0));     // masked
    #1 chk(int'(to_right), 91, "bypass in move-both instruction");
    issue(p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0));
    issue(nop());
    #1 chk(int'(responder), 1, "responder after pop");
    // max/min: this PE holds 23 in R3; extreme 23 -> flagged, then 50 -> not
    mm_extreme = 8'd23;
    issue(p(OP_MAX, 0, 3, 0, DSW_COMP, 1'b0, 0));
    #1 chk(int'(mm_value), 23, "max/min value is operand A");
    issue(nop());
    #1 chk(int'(responder), 1, "flagged by MAX when holding the extreme");
    mm_extreme = 8'd50;
    issue(p(OP_MIN, 0, 3, 0, DSW_COMP, 1'b0, 0));
    issue(nop());
    #1 chk(int'(responder), 0, "not flagged when not holding the extreme");
    issue(p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0));
    issue(p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0));
    issue(nop());
    // store everything
    for (int r = 3; r <= 9; r++) issue(p(OP_ST, 0, 0, r, DSW_COMP, 1'b0, 8'(16 + r)));
    // store the broadcast immediate: mem[R2 + 7] = 7
    issue(p(OP_ST, 0, 2, 0, DSW_BCAST, 1'b0, 7));
    // masked store must not happen
    issue(p_i(OP_CNE, 0, 1, 20));
    issue(p(OP_ST, 0, 0, 1, DSW_COMP, 1'b0, 50));
    issue(p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0));
    gap(4);
    valid_in = 0;
    @(negedge clk);
    host_en = 1;
    mem_expect(19, 23, "R3 = 20 + 3");
    mem_expect(20, 15, "R4 = 20 - 5");
    mem_expect(21, 45, "R5 = 3 + SPE 42");
    mem_expect(22, 91, "R6 = from left");
    mem_expect(23, 57, "R7 = from right");
    mem_expect(24, 74, "R8 = avg(91, 57)");
    mem_expect(25, 0,  "R9 untouched by masked instructions");
    mem_expect(10, 7,  "broadcast immediate stored at R2 + imm");
    mem_expect(50, 0,  "masked store suppressed");
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
