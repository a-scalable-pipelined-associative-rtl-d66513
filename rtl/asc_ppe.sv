// asc_ppe - one Parallel PE of the SIMD array.
//
// It takes its instruction (a decoded control word and immediate data) from
// the Control Unit, as every PE does in lock-step, and has four stages:
//   ID  16 x 8 register file -> Data Switch -> comparator; the 8 x 1 mask
//       stack. A compare or max/min search pushes its result onto the mask
//       stack (ANDed with the current top); POP restores the previous set.
//   ID/EX latch, enabled by the top of the mask stack: in a non-responder
//       the instruction becomes a bubble and its operands are not latched,
//       while instructions already past ID still finish.
//   EX  ALU (loads/stores add the immediate to operand A)
//   MEM 256 x 8 data memory
//   WB  multiplexer: memory data or ALU result (which carries network data
//       for a MOV) back to the register file.
// The neighbour ports connect through the Data Switch, which bypasses the PE
// when it is not a responder. mm_value (operand A) and mm_extreme connect to
// the array's max/min unit. Structure and stage contents follow the published
// PE; the operand routing and encodings are this design's choices.
module asc_ppe
  import asc_pkg::*;
#(
  parameter int unsigned DMEM_DEPTH = 256,
  parameter int unsigned MASK_DEPTH = 8,
  parameter int unsigned DMEM_AW    = $clog2(DMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ctrl_t              ctrl,
  input  data_t              imm,
  input  data_t              spe_data,
  // reconfigurable linear network
  input  data_t              from_left,
  input  data_t              from_right,
  output data_t              to_left,
  output data_t              to_right,
  // max/min search
  output data_t              mm_value,
  input  data_t              mm_extreme,
  output logic               responder,
  // host access to the data memory (while stopped)
  input  logic               host_en,
  input  logic               host_we,
  input  logic [DMEM_AW-1:0] host_addr,
  input  data_t              host_wdata,
  output data_t              host_rdata
);
  // ---------------- ID ----------------
  data_t rf1, rf2, op_a, op_b;
  logic  wb_we;
  reg_addr_t wb_rd;
  data_t wb_data;
  logic  par, match, push, push_bit, pop;

  assign par = ctrl.valid && ctrl.par;

  asc_regfile #(.NUM_REGS(NREGS)) u_rf (
    .clk(clk), .rst_n(rst_n),
    .ra1(ctrl.rs1), .ra2(ctrl.rs2), .rd1(rf1), .rd2(rf2),
    .we(wb_we), .wa(wb_rd), .wd(wb_data)
  );

  asc_data_switch u_dsw (
    .mode(ctrl.dsw), .bsel(ctrl.bsel), .responder(responder),
    .rf1(rf1), .rf2(rf2), .imm(imm), .spe_data(spe_data),
    .from_left(from_left), .from_right(from_right),
    .op_a(op_a), .op_b(op_b), .to_left(to_left), .to_right(to_right)
  );

  asc_comparator u_cmp (.op(ctrl.cmp_op), .a(op_a), .b(op_b), .match(match));

  assign mm_value = op_a;
  assign push     = par && (ctrl.cmp || ctrl.maxmin);
  assign push_bit = ctrl.maxmin ? (op_a == mm_extreme) : match;
  assign pop      = par && ctrl.pop;

  asc_mask_stack #(.DEPTH(MASK_DEPTH)) u_mask (
    .clk(clk), .rst_n(rst_n), .push(push), .push_bit(push_bit), .pop(pop),
    .top(responder)
  );

  // ---------------- ID/EX (masked) ----------------
  logic        id_ex_en;
  stage_ctrl_t ex_c;
  alu_op_e     ex_alu_op;
  data_t       ex_a, ex_b, ex_imm;

  assign id_ex_en = par && responder && (ctrl.reg_we || ctrl.mem_we);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_c      <= '0;
      ex_alu_op <= ALU_ADD;
      ex_a      <= '0;
      ex_b      <= '0;
      ex_imm    <= '0;
    end else begin
      ex_c.valid <= id_ex_en;
      if (id_ex_en) begin
        ex_c.rd     <= ctrl.rd;
        ex_c.reg_we <= ctrl.reg_we;
        ex_c.mem_rd <= ctrl.mem_rd;
        ex_c.mem_we <= ctrl.mem_we;
        ex_c.halt   <= 1'b0;
        ex_alu_op   <= ctrl.alu_op;
        ex_a        <= op_a;
        ex_b        <= op_b;
        ex_imm      <= imm;
      end
    end
  end

  // ---------------- EX ----------------
  data_t alu_b, alu_y;
  assign alu_b = (ex_c.mem_rd || ex_c.mem_we) ? ex_imm : ex_b;

  asc_alu u_alu (.op(ex_alu_op), .a(ex_a), .b(alu_b), .y(alu_y));

  // ---------------- EX/MEM ----------------
  stage_ctrl_t mem_c;
  data_t       mem_res, mem_sd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_c   <= '0;
      mem_res <= '0;
      mem_sd  <= '0;
    end else begin
      mem_c   <= ex_c;
      mem_res <= alu_y;
      mem_sd  <= ex_b;
    end
  end

  // ---------------- MEM ----------------
  data_t mem_rdata;

  asc_data_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk(clk),
    .addr(DMEM_AW'(mem_res)), .we(mem_c.valid && mem_c.mem_we),
    .wdata(mem_sd), .rdata(mem_rdata),
    .host_en(host_en), .host_we(host_we), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata)
  );

  // ---------------- MEM/WB ----------------
  stage_ctrl_t wb_c;
  data_t       wb_res, wb_mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_c   <= '0;
      wb_res <= '0;
      wb_mem <= '0;
    end else begin
      wb_c   <= mem_c;
      wb_res <= mem_res;
      wb_mem <= mem_rdata;
    end
  end

  // ---------------- WB ----------------
  assign wb_we   = wb_c.valid && wb_c.reg_we;
  assign wb_rd   = wb_c.rd;
  assign wb_data = wb_c.mem_rd ? wb_mem : wb_res;
endmodule
