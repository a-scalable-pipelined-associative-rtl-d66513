// tb_asc_regfile - random writes and reads of the 16 x 8 register file
// against a shadow array, including same-cycle write-through reads.
module tb_asc_regfile;
  import asc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] ra1, ra2, wa;
  data_t rd1, rd2, wd;
  logic we;
  data_t shadow [16];
  int checks = 0, failures = 0;

  asc_regfile dut (.clk(clk), .rst_n(rst_n), .ra1(ra1), .ra2(ra2), .rd1(rd1),
                   .rd2(rd2), .we(we), .wa(wa), .wd(wd));

  always #5 clk = ~clk;

  task automatic check(data_t got, data_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    foreach (shadow[i]) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      we  = ($urandom % 2) == 1;
      wa  = 4'($urandom);
      wd  = data_t'($urandom);
      ra1 = 4'($urandom);
      ra2 = (k % 5 == 0) ? wa : 4'($urandom);
      #1;
      check(rd1, (we && wa == ra1) ? wd : shadow[ra1], "rd1");
      check(rd2, (we && wa == ra2) ? wd : shadow[ra2], "rd2");
      @(posedge clk);
      if (we) shadow[wa] = wd;
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
