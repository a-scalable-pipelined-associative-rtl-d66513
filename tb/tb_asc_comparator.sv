// tb_asc_comparator - random check of the four unsigned relations.
module tb_asc_comparator;
  import asc_pkg::*;
  cmp_op_e op;
  data_t a, b;
  logic match, exp;
  int checks = 0, failures = 0;

  asc_comparator dut (.op(op), .a(a), .b(b), .match(match));

  initial begin
    for (int k = 0; k < 1000; k++) begin
      op = cmp_op_e'(k % 4);
      a  = data_t'($urandom % 8);
      b  = data_t'($urandom % 8);
      #1;
      case (k % 4)
        0: exp = (int'(a) == int'(b));
        1: exp = (int'(a) != int'(b));
        2: exp = (int'(a) <  int'(b));
        default: exp = (int'(a) >= int'(b));
      endcase
      checks++;
      if (match !== exp) begin
        failures++;
        $display("CMP mismatch op=%0d a=%0d b=%0d got %b", op, a, b, match);
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
