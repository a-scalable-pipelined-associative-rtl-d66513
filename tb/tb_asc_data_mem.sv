// tb_asc_data_mem - pipeline-port and host-port writes and reads of the
// 256 x 8 data memory against a shadow array; the host port has priority.
module tb_asc_data_mem;
  import asc_pkg::*;
  logic clk = 0;
  logic [7:0] addr, host_addr;
  logic we, host_en, host_we;
  data_t wdata, rdata, host_wdata, host_rdata;
  data_t shadow [256];
  int checks = 0, failures = 0;

  asc_data_mem dut (.clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata),
                    .host_en(host_en), .host_we(host_we), .host_addr(host_addr),
                    .host_wdata(host_wdata), .host_rdata(host_rdata));

  always #5 clk = ~clk;

  task automatic check(data_t got, data_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    we = 0; host_en = 1; host_we = 1; addr = 0; wdata = 0;
    // initialise through the host port
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      host_addr = 8'(i); host_wdata = data_t'(i * 7 + 3); shadow[i] = data_t'(i * 7 + 3);
    end
    @(negedge clk);
    host_we = 0; host_en = 0;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      host_en    = (k % 7 == 0);
      host_we    = host_en && ($urandom % 2 == 1);
      host_addr  = 8'($urandom);
      host_wdata = data_t'($urandom);
      we    = ($urandom % 2) == 1;
      addr  = 8'($urandom);
      wdata = data_t'($urandom);
      #1;
      check(rdata, shadow[addr], "rdata");
      check(host_rdata, shadow[host_addr], "host_rdata");
      @(posedge clk);
      if (host_en) begin
        if (host_we) shadow[host_addr] = host_wdata;
      end else if (we) shadow[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
