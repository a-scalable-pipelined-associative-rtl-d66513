// tb_asc_data_switch - every mode of the Data Switch, plus Bypass, with
// distinct values on all six inputs so each routing is identified.
module tb_asc_data_switch;
  import asc_pkg::*;
  dsw_mode_e mode;
  logic bsel, responder;
  data_t rf1, rf2, imm, spe_data, from_left, from_right;
  data_t op_a, op_b, to_left, to_right;
  int checks = 0, failures = 0;

  asc_data_switch dut (.*);

  task automatic expect4(data_t ea, data_t eb, data_t el, data_t er, string what);
    #1;
    checks++;
    if ({op_a, op_b, to_left, to_right} !== {ea, eb, el, er}) begin
      failures++;
      $display("%s: got a=%0d b=%0d l=%0d r=%0d expected a=%0d b=%0d l=%0d r=%0d",
               what, op_a, op_b, to_left, to_right, ea, eb, el, er);
    end
  endtask

  initial begin
    for (int k = 0; k < 50; k++) begin
      rf1 = data_t'(8'h10 + k); rf2 = data_t'(8'h40 + k); imm = data_t'(8'h70 + k);
      spe_data = data_t'(8'hA0 + k); from_left = data_t'(8'hC0 + k);
      from_right = data_t'(8'hE0 + k);
      responder = 1'b1; bsel = 1'b0;
      mode = DSW_COMP;  expect4(rf1, rf2, 0, 0, "computation");
      mode = DSW_BCAST; expect4(rf1, imm, 0, 0, "broadcast imm");
      bsel = 1'b1;      expect4(rf1, spe_data, 0, 0, "broadcast spe");
      bsel = 1'b0;
      mode = DSW_LEFT;  expect4(rf2, from_right, rf1, 0, "move left");
      mode = DSW_RIGHT; expect4(rf1, from_left, 0, rf2, "move right");
      mode = DSW_BOTH;  expect4(from_left, from_right, rf1, rf2, "move both");
      responder = 1'b0;
      for (int m = 0; m < 5; m++) begin
        mode = dsw_mode_e'(m);
        #1;
        checks++;
        if (to_right !== from_left || to_left !== from_right) begin
          failures++;
          $display("bypass mode %0d: l=%0d r=%0d", m, to_left, to_right);
        end
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
