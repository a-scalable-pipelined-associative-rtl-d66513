// tb_asc_control_unit - loads a short program, starts the Control Unit and
// checks the sequence of immediates it broadcasts: one instruction per cycle,
// the first one cycle after start, a taken branch costing one bubble, and
// fetching stopping at HALT.
module tb_asc_control_unit;
  import asc_pkg::*;
  import asc_asm_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, running, redirect, host_we;
  data_t target, imm;
  ctrl_t ctrl;
  logic [7:0] pc, host_addr;
  logic [31:0] host_wdata;
  int checks = 0, failures = 0;
  int seen [$];

  asc_control_unit dut (.*);

  always #5 clk = ~clk;

  // The testbench plays the Sequential PE: JMP redirects to its immediate.
  assign redirect = ctrl.valid && ctrl.jump;
  assign target   = imm;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    word_t prog [10];
    int exp_seq [$];
    int cyc, first;
    // addresses 0..9; each ADD carries its address as immediate
    prog[0] = s_ri(OP_ADD, 1, 0, 100);
    prog[1] = s_ri(OP_ADD, 1, 0, 101);
    prog[2] = s_br(OP_JMP, 0, 0, 6);
    prog[3] = s_ri(OP_ADD, 1, 0, 103);
    prog[4] = s_ri(OP_ADD, 1, 0, 104);
    prog[5] = s_ri(OP_ADD, 1, 0, 105);
    prog[6] = s_ri(OP_ADD, 1, 0, 106);
    prog[7] = s_ri(OP_ADD, 1, 0, 107);
    prog[8] = halt();
    prog[9] = s_ri(OP_ADD, 1, 0, 109);
    host_we = 0; host_addr = 0; host_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = 8'(i); host_wdata = prog[i];
    end
    @(negedge clk);
    host_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    // record (cycle, imm) of every valid control word
    cyc = 0; first = -1;
    while (cyc < 40) begin
      if (ctrl.valid) begin
        if (first < 0) first = cyc;
        seen.push_back(int'(imm) + 1000 * (cyc - first));
      end
      @(negedge clk);
      cyc++;
    end
    chk(first, 1, "first instruction reaches ID one cycle after start");
    // imm + 1000*cycle: 100@0 101@1 jmp(6)@2, bubble @3, 106@4 107@5 halt@6
    exp_seq = '{100, 1101, 2006, 4106, 5107, 6000};
    chk(seen.size(), exp_seq.size(), "number of instructions issued");
    for (int i = 0; i < exp_seq.size() && i < seen.size(); i++)
      chk(seen[i], exp_seq[i], $sformatf("issue %0d (imm + 1000*cycle)", i));
    chk(int'(running), 0, "fetch stopped after HALT");
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
