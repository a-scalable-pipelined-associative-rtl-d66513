// tb_asc_alu - exhaustive-ish random check of the 8-bit ALU against a
// reference model written with plain integer arithmetic.
module tb_asc_alu;
  import asc_pkg::*;
  alu_op_e op;
  data_t a, b, y;
  int checks = 0, failures = 0;

  asc_alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic int ref_y(alu_op_e o, int x, int z);
    case (o)
      ALU_ADD:   return (x + z) % 256;
      ALU_SUB:   return (x - z + 256) % 256;
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_XOR:   return x ^ z;
      ALU_SHL:   return (x * 2) % 256;
      ALU_SHR:   return x / 2;
      ALU_AVG:   return (x + z) / 2;
      ALU_PASSB: return z;
      default:   return 0;
    endcase
  endfunction

  initial begin
    for (int k = 0; k < 2000; k++) begin
      op = alu_op_e'(k % 9);
      a  = data_t'($urandom);
      b  = data_t'($urandom);
      if (k < 9) begin a = 8'hFF; b = 8'hFF; end
      #1;
      checks++;
      if (int'(y) != ref_y(op, int'(a), int'(b))) begin
        failures++;
        $display("ALU mismatch op=%0d a=%0d b=%0d y=%0d", op, a, b, y);
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
