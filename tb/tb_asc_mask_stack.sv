// tb_asc_mask_stack - random pushes and pops of the 8 x 1 mask stack against
// a queue model (push ANDs with the top; all ones after reset).
module tb_asc_mask_stack;
  logic clk = 0, rst_n = 0, push, push_bit, pop, top;
  logic model [8];
  int checks = 0, failures = 0;

  asc_mask_stack dut (.clk(clk), .rst_n(rst_n), .push(push), .push_bit(push_bit),
                      .pop(pop), .top(top));

  always #5 clk = ~clk;

  initial begin
    push = 0; pop = 0; push_bit = 0;
    foreach (model[i]) model[i] = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 800; k++) begin
      @(negedge clk);
      checks++;
      if (top !== model[0]) begin
        failures++;
        $display("cycle %0d: top %b expected %b", k, top, model[0]);
      end
      push     = ($urandom % 3) == 0;
      pop      = !push && (($urandom % 2) == 0);
      push_bit = ($urandom % 4) != 0;
      @(posedge clk);
      if (push) begin
        for (int i = 7; i > 0; i--) model[i] = model[i-1];
        model[0] = push_bit & model[1];
      end else if (pop) begin
        for (int i = 0; i < 7; i++) model[i] = model[i+1];
        model[7] = 1'b1;
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
