// tb_asc_processor - end-to-end test of the whole processor (8 Parallel PEs).
//
// Runs the string-matching program of asc_vldc_prog_pkg: first on the
// worked example of the algorithm (text "ABAA" after a sentinel, pattern
// "AB"), then on random texts and patterns over a two-letter alphabet. The
// results in the data memories are compared with a direct software model of
// the same algorithm, and the run time with the pipeline's timing: one
// instruction per cycle, one bubble per taken branch, four cycles to drain.
// Probes count how often each mechanism occurred (branch flush, masked
// instruction, Bypass, each Data Switch mode, both broadcast sources, mask
// push/pop, max search, loads/stores); one that never occurs is a failure.
module tb_asc_processor;
  import asc_pkg::*;
  import asc_asm_pkg::*;
  import asc_vldc_prog_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [N-1:0] responders;
  logic imem_we = 0, sdm_we = 0, pdm_we = 0;
  logic [7:0] imem_addr = 0, sdm_addr = 0, pdm_addr = 0;
  logic [31:0] imem_wdata = 0;
  data_t sdm_wdata = 0, sdm_rdata, pdm_wdata = 0, pdm_rdata;
  logic [2:0] pdm_pe = 0;
  int checks = 0, failures = 0;

  asc_processor #(.NUM_PE(N)) dut (.*);

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_BRANCH, M_MASKED, M_BYPASS, M_COMP, M_BCAST_IMM, M_BCAST_SPE, M_LEFT, M_RIGHT,
    M_BOTH, M_PUSH, M_POP, M_MAX, M_SPE_LD, M_SPE_ST, M_PPE_LD, M_PPE_ST, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"branch flush", "masked instruction", "bypass",
    "computation mode", "broadcast immediate", "broadcast SPE register",
    "move left", "move right", "move both", "mask push", "mask pop", "max/min search",
    "SPE load", "SPE store", "PPE load", "PPE store"};

  always @(posedge clk) if (busy) begin
    ctrl_t c;
    c = dut.ctrl;
    if (dut.redirect) mech[M_BRANCH]++;
    if (c.valid && c.par) begin
      if ((c.reg_we || c.mem_we) && responders != '1) mech[M_MASKED]++;
      if (c.dsw inside {DSW_LEFT, DSW_RIGHT, DSW_BOTH} && (c.reg_we || c.mem_we)) begin
        // a bypass matters when a non-responder sits between two responders
        for (int i = 1; i < N - 1; i++)
          if (!responders[i] && |(responders & ((N'(1) << i) - 1)) && |(responders >> (i + 1)))
          begin mech[M_BYPASS]++; break; end
      end
      if (c.reg_we || c.mem_we || c.cmp) case (c.dsw)
        DSW_COMP:  mech[M_COMP]++;
        DSW_BCAST: if (c.bsel) mech[M_BCAST_SPE]++; else mech[M_BCAST_IMM]++;
        DSW_LEFT:  mech[M_LEFT]++;
        DSW_RIGHT: mech[M_RIGHT]++;
        DSW_BOTH:  mech[M_BOTH]++;
        default: ;
      endcase
      if (c.cmp || c.maxmin) mech[M_PUSH]++;
      if (c.maxmin) mech[M_MAX]++;
      if (c.pop) mech[M_POP]++;
      if (c.mem_rd) mech[M_PPE_LD]++;
      if (c.mem_we) mech[M_PPE_ST]++;
    end
    if (c.valid && !c.par && c.mem_rd) mech[M_SPE_LD]++;
    if (c.valid && !c.par && c.mem_we) mech[M_SPE_ST]++;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- one run ----------------
  task automatic run_case(int text [N], int patt [$], string tag);
    int L, cyc, cnt [N], pc, resp [N], newc [N], mx, prevA;
    L = patt.size();
    // host loads the data
    for (int i = 0; i < N; i++)
      for (int a = 0; a < 6; a++) begin
        @(negedge clk);
        pdm_we = 1; pdm_pe = 3'(i); pdm_addr = 8'(a);
        pdm_wdata = (a == 0) ? data_t'(text[i]) : 8'd0;
      end
    @(negedge clk); pdm_we = 0;
    sdm_we = 1; sdm_addr = 0; sdm_wdata = data_t'(L);
    for (int j = 1; j <= L; j++) begin
      @(negedge clk); sdm_addr = 8'(j); sdm_wdata = data_t'(patt[j-1]);
    end
    @(negedge clk); sdm_we = 0;
    // run
    start = 1;
    @(negedge clk); start = 0;
    cyc = 0;   // clock edges after the one that sampled start
    while (busy && cyc < 5000) begin @(negedge clk); cyc++; end
    chk(cyc, issued(L, prog_len) + (L - 1) + 4, {tag, ": cycles from start to idle"});
    // software model of the algorithm
    foreach (cnt[i]) cnt[i] = 0;
    pc = 0;
    for (int j = L; j >= 1; j--) begin
      for (int i = 0; i < N; i++) resp[i] = (text[i] == patt[j-1] && cnt[i] == pc);
      for (int i = 0; i < N; i++) newc[i] = (i + 1 < N && resp[i+1]) ? cnt[i+1] + 1 : cnt[i];
      cnt = newc;
      pc++;
    end
    mx = 0;
    foreach (text[i]) if (text[i] > mx) mx = text[i];
    prevA = 0;
    sdm_addr = 100; #1 chk(int'(sdm_rdata), L, {tag, ": patt_counter"});
    for (int i = 0; i < N; i++) begin
      int m, direct, av;
      m = (i >= 1 && cnt[i-1] == L);
      // direct definition of an occurrence starting at PE i
      direct = (i >= 1 && i + L <= N);
      for (int k = 0; k < L && direct; k++) if (text[i+k] != patt[k]) direct = 0;
      chk(m, direct, {tag, $sformatf(": model agrees with direct search at PE%0d", i)});
      av = (((i > 0) ? text[i-1] : 0) + ((i < N - 1) ? text[i+1] : 0)) / 2;
      pdm_pe = 3'(i);
      pdm_addr = 1; #1 chk(int'(pdm_rdata), cnt[i], {tag, $sformatf(": counter$ PE%0d", i)});
      pdm_addr = 2; #1 chk(int'(pdm_rdata), direct, {tag, $sformatf(": match$ PE%0d", i)});
      pdm_addr = 3; #1 chk(int'(pdm_rdata), av, {tag, $sformatf(": neighbour average PE%0d", i)});
      pdm_addr = 4; #1 chk(int'(pdm_rdata), int'(text[i] == mx), {tag, $sformatf(": max flag PE%0d", i)});
      pdm_addr = 5; #1 chk(int'(pdm_rdata), (text[i] == 8'h41) ? prevA : 0,
                          {tag, $sformatf(": previous 'A' PE%0d", i)});
      if (text[i] == 8'h41) prevA = text[i];
    end
  endtask

  word_t prog [256];
  int prog_len;

  initial begin
    int text [N];
    int patt [$];
    foreach (mech[i]) mech[i] = 0;
    prog_len = build(prog);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      imem_we = 1; imem_addr = 8'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    // worked example: sentinel '@', text "ABAA", pattern "AB", padding '#'
    text = '{8'h40, 8'h41, 8'h42, 8'h41, 8'h41, 8'h23, 8'h23, 8'h23};
    patt = '{8'h41, 8'h42};
    run_case(text, patt, "example");
    pdm_pe = 0; pdm_addr = 1; #1 chk(int'(pdm_rdata), 2, "example: counter$ of PE0 is 2");
    pdm_pe = 1; pdm_addr = 2; #1 chk(int'(pdm_rdata), 1, "example: match$ at PE1");
    for (int r = 0; r < 8; r++) begin
      text[0] = 8'h40;
      for (int i = 1; i < N; i++) text[i] = 8'h41 + int'($urandom % 2);
      patt.delete();
      for (int k = 0; k < 1 + int'($urandom % 3); k++) patt.push_back(8'h41 + int'($urandom % 2));
      run_case(text, patt, $sformatf("random %0d", r));
    end
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-24s %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("mechanism %s never occurred", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
