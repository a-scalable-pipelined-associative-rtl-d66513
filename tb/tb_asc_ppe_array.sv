// tb_asc_ppe_array - an 8-PE array driven by decoded instructions. Random
// values are loaded into every PE; an associative search selects a random
// responder subset; Data Movement Right and Left then make each responder
// receive the value of the nearest responder on that side, bypassing the
// non-responders between them (0 at the ends of the array). Also checks the
// responder vector, a MAX search over all PEs and a nested MIN search.
// Expected values come from a loop over a copy of the loaded data.
module tb_asc_ppe_array;
  import asc_pkg::*;
  import asc_asm_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic valid_in = 0;
  logic [31:0] instr_bits = 0;
  ctrl_t ctrl;
  data_t imm, spe_data, host_wdata, host_rdata;
  logic [N-1:0] responders;
  logic host_en, host_we;
  logic [2:0] host_pe;
  logic [7:0] host_addr;
  int checks = 0, failures = 0;
  int bypass_hops = 0;

  asc_decoder u_dec (.valid_in(valid_in), .instr_bits(instr_bits), .ctrl(ctrl), .imm(imm));
  asc_ppe_array #(.NUM_PE(N)) dut (.*);

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

  initial begin
    int val [N];
    logic [N-1:0] resp;
    int thr, exp_r [N], exp_l [N], mx, mn;
    spe_data = 8'd0;
    host_en = 1; host_we = 0; host_addr = 0; host_wdata = 0; host_pe = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      thr = 128;
      for (int i = 0; i < N; i++) begin
        val[i] = (round == 0 && i == 0) ? 200 : int'($urandom % 256);
        if (round == 0 && i == 1) val[i] = 10;
        host_en = 1;
        for (int a = 0; a < 8; a++) begin
          @(negedge clk);
          host_we = 1; host_pe = 3'(i); host_addr = 8'(a);
          host_wdata = (a == 0) ? data_t'(val[i]) : 8'd0;
        end
      end
      @(negedge clk);
      host_we = 0; host_en = 0;
      // the test wants some responders and some non-responders
      spe_data = data_t'(thr);
      issue(p(OP_LD, 1, 0, 0, DSW_COMP, 1'b0, 0));
      issue(p_i(OP_MOV, 2, 0, 0));
      issue(p_i(OP_MOV, 3, 0, 0));
      issue(p_i(OP_MOV, 4, 0, 0));
      issue(p_s(OP_CGE, 0, 1, 0));                  // R1 >= SPE value (thr)
      issue(nop());
      #1;
      for (int i = 0; i < N; i++) resp[i] = (val[i] >= thr);
      chk(int'(responders), int'(resp), "responder vector after search");
      issue(p(OP_MOV, 2, 0, 1, DSW_RIGHT, 1'b0, 0)); // R2 = R1 of nearest responder to the left
      issue(p(OP_MOV, 3, 1, 0, DSW_LEFT, 1'b0, 0));  // R3 = R1 of nearest responder to the right
      issue(p(OP_MIN, 0, 1, 0, DSW_COMP, 1'b0, 0));  // nested: smallest among responders
      issue(p_i(OP_MOV, 4, 0, 1));
      issue(p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0));
      issue(p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0));
      issue(p(OP_MAX, 0, 1, 0, DSW_COMP, 1'b0, 0));  // largest over all PEs
      issue(p(OP_ADD, 4, 4, 0, DSW_BCAST, 1'b0, 2)); // R4 += 2 in the maximum
      issue(p(OP_POP, 0, 0, 0, DSW_COMP, 1'b0, 0));
      issue(nop()); issue(nop());
      issue(p(OP_ST, 0, 0, 2, DSW_COMP, 1'b0, 2));
      issue(p(OP_ST, 0, 0, 3, DSW_COMP, 1'b0, 3));
      issue(p(OP_ST, 0, 0, 4, DSW_COMP, 1'b0, 4));
      repeat (4) issue(nop());
      @(negedge clk); valid_in = 0;
      // reference
      mx = 0; mn = 256;
      for (int i = 0; i < N; i++) begin
        if (val[i] > mx) mx = val[i];
        if (resp[i] && val[i] < mn) mn = val[i];
      end
      for (int i = 0; i < N; i++) begin
        exp_r[i] = 0; exp_l[i] = 0;
        if (resp[i]) begin
          for (int j = i - 1; j >= 0; j--) if (resp[j]) begin exp_r[i] = val[j]; break; end
          for (int j = i + 1; j < N; j++)  if (resp[j]) begin exp_l[i] = val[j]; break; end
          for (int j = i - 1; j >= 0 && !resp[j]; j--) bypass_hops++;
        end
      end
      host_en = 1;
      for (int i = 0; i < N; i++) begin
        int e4;
        e4 = ((resp[i] && val[i] == mn) ? 1 : 0) + ((val[i] == mx) ? 2 : 0);
        host_pe = 3'(i);
        host_addr = 2; #1 chk(int'(host_rdata), exp_r[i], $sformatf("round %0d PE%0d from left", round, i));
        host_addr = 3; #1 chk(int'(host_rdata), exp_l[i], $sformatf("round %0d PE%0d from right", round, i));
        host_addr = 4; #1 chk(int'(host_rdata), e4, $sformatf("round %0d PE%0d min/max flags", round, i));
      end
    end
    checks++;
    if (bypass_hops == 0) begin
      failures++;
      $display("no transfer crossed a bypassed PE");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
