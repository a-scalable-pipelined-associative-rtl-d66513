// tb_asc_maxmin - random values and responder sets; the extreme is checked
// against a loop over the responders.
module tb_asc_maxmin;
  import asc_pkg::*;
  localparam int N = 6;
  logic find_min;
  data_t value [N];
  logic [N-1:0] responder;
  data_t extreme;
  int checks = 0, failures = 0;

  asc_maxmin #(.NUM_PE(N)) dut (.find_min(find_min), .value(value),
                                .responder(responder), .extreme(extreme));

  initial begin
    for (int k = 0; k < 1000; k++) begin
      int e;
      find_min  = k[0];
      responder = N'($urandom);
      foreach (value[i]) value[i] = data_t'($urandom % 64);
      e = find_min ? 255 : 0;
      for (int i = 0; i < N; i++)
        if (responder[i]) e = find_min ? ((int'(value[i]) < e) ? int'(value[i]) : e)
                                       : ((int'(value[i]) > e) ? int'(value[i]) : e);
      #1;
      checks++;
      if (int'(extreme) != e) begin
        failures++;
        $display("maxmin min=%b resp=%b got %0d expected %0d", find_min, responder, extreme, e);
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
