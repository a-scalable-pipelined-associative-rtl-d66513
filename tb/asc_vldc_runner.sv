// asc_vldc_runner - testbench helper: a processor with NUM_PE Parallel PEs
// that runs the string-matching program of asc_vldc_prog_pkg RUNS times on
// random texts (sentinel '@' in PE 0, then letters A/B) and random patterns
// of 1 to 4 letters, checking match$ against a direct search, counter$
// against a software model of the algorithm, and the run time against
// one instruction per cycle plus one bubble per taken branch plus four
// cycles of pipeline drain. It raises done when finished.
module asc_vldc_runner
  import asc_pkg::*;
  import asc_asm_pkg::*;
  import asc_vldc_prog_pkg::*;
#(
  parameter int NUM_PE = 50,
  parameter int RUNS   = 4
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int PE_W = (NUM_PE > 1) ? $clog2(NUM_PE) : 1;
  logic rst_n = 0, start = 0, busy;
  logic [NUM_PE-1:0] responders;
  logic imem_we = 0, sdm_we = 0, pdm_we = 0;
  logic [7:0] imem_addr = 0, sdm_addr = 0, pdm_addr = 0;
  logic [31:0] imem_wdata = 0;
  data_t sdm_wdata = 0, sdm_rdata, pdm_wdata = 0, pdm_rdata;
  logic [PE_W-1:0] pdm_pe = 0;
  word_t prog [256];
  int prog_len;

  asc_processor #(.NUM_PE(NUM_PE)) dut (.*);

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0d PEs, %s: got %0d expected %0d", NUM_PE, what, got, exp);
    end
  endtask

  initial begin
    int text [NUM_PE], cnt [NUM_PE], resp [NUM_PE], newc [NUM_PE];
    int patt [$];
    int L, cyc, pc;
    done = 0; checks = 0; failures = 0;
    prog_len = build(prog);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      imem_we = 1; imem_addr = 8'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    for (int r = 0; r < RUNS; r++) begin
      text[0] = 8'h40;
      for (int i = 1; i < NUM_PE; i++) text[i] = 8'h41 + int'($urandom % 2);
      patt.delete();
      L = 1 + int'($urandom % 4);
      for (int k = 0; k < L; k++) patt.push_back(8'h41 + int'($urandom % 2));
      for (int i = 0; i < NUM_PE; i++)
        for (int a = 0; a < 6; a++) begin
          @(negedge clk);
          pdm_we = 1; pdm_pe = PE_W'(i); pdm_addr = 8'(a);
          pdm_wdata = (a == 0) ? data_t'(text[i]) : 8'd0;
        end
      @(negedge clk); pdm_we = 0;
      sdm_we = 1; sdm_addr = 0; sdm_wdata = data_t'(L);
      for (int j = 1; j <= L; j++) begin
        @(negedge clk); sdm_addr = 8'(j); sdm_wdata = data_t'(patt[j-1]);
      end
      @(negedge clk); sdm_we = 0;
      start = 1;
      @(negedge clk); start = 0;
      cyc = 0;
      while (busy && cyc < 5000) begin @(negedge clk); cyc++; end
      chk(cyc, issued(L, prog_len) + (L - 1) + 4, $sformatf("run %0d cycles", r));
      foreach (cnt[i]) cnt[i] = 0;
      pc = 0;
      for (int j = L; j >= 1; j--) begin
        for (int i = 0; i < NUM_PE; i++) resp[i] = (text[i] == patt[j-1] && cnt[i] == pc);
        for (int i = 0; i < NUM_PE; i++) newc[i] = (i + 1 < NUM_PE && resp[i+1]) ? cnt[i+1] + 1 : cnt[i];
        cnt = newc;
        pc++;
      end
      for (int i = 0; i < NUM_PE; i++) begin
        int direct;
        direct = (i >= 1 && i + L <= NUM_PE);
        for (int k = 0; k < L && direct; k++) if (text[i+k] != patt[k]) direct = 0;
        pdm_pe = PE_W'(i);
        pdm_addr = 1; #1 chk(int'(pdm_rdata), cnt[i], $sformatf("run %0d counter$ PE%0d", r, i));
        pdm_addr = 2; #1 chk(int'(pdm_rdata), direct, $sformatf("run %0d match$ PE%0d", r, i));
      end
    end
    done = 1;
  end
endmodule
