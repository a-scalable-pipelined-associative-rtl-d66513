// tb_asc_processor_scaled - string matching on the two larger arrays the
// published results mention: 50 Parallel PEs (the size at which the
// bypass chain was measured) and 70 (the estimated capacity of the FPGA
// used). Each array runs random texts and patterns (asc_vldc_runner).
module tb_asc_processor_scaled;
  logic clk = 0;
  logic done50, done70;
  int c50, f50, c70, f70;
  int checks, failures;

  asc_vldc_runner #(.NUM_PE(50), .RUNS(4)) u50 (.clk(clk), .done(done50), .checks(c50), .failures(f50));
  asc_vldc_runner #(.NUM_PE(70), .RUNS(4)) u70 (.clk(clk), .done(done70), .checks(c70), .failures(f70));

  always #5 clk = ~clk;

  initial begin
    wait (done50 && done70);
    checks = c50 + c70; failures = f50 + f70;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    checks = c50 + c70; failures = f50 + f70 + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
