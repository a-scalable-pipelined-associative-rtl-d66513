// tb_asc_instr_mem - load the instruction memory through the host port and
// read every word back at the program-counter port.
module tb_asc_instr_mem;
  import asc_pkg::*;
  logic clk = 0, host_we;
  logic [7:0] pc, host_addr;
  logic [31:0] instr, host_wdata;
  int checks = 0, failures = 0;

  asc_instr_mem dut (.clk(clk), .pc(pc), .instr(instr), .host_we(host_we),
                     .host_addr(host_addr), .host_wdata(host_wdata));

  always #5 clk = ~clk;

  function automatic logic [31:0] pattern(int i);
    return 32'(i) * 32'h9E3779B1 ^ 32'h5A5A0000;
  endfunction

  initial begin
    pc = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = 8'(i); host_wdata = pattern(i);
    end
    @(negedge clk);
    host_we = 0;
    for (int i = 255; i >= 0; i--) begin
      pc = 8'(i);
      #1;
      checks++;
      if (instr !== pattern(i)) begin
        failures++;
        $display("imem[%0d] = %h expected %h", i, instr, pattern(i));
      end
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
