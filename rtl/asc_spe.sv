// asc_spe - Sequential PE: the scalar datapath below the Control Unit.
//
// Four pipeline stages follow the Control Unit's IF and decode:
//   ID  register file read; branch comparator; for a parallel instruction the
//       register named by rs2 is driven onto the broadcast-register bus
//   EX  ALU (operand B is rs2 or the immediate; loads and stores add the
//       immediate offset to rs1)
//   MEM 256 x 8 data memory
//   WB  memory data or ALU result written back to the register file
// Only valid scalar ALU/memory instructions (and HALT, to mark the end of a
// program) enter the ID/EX latch; parallel instructions leave bubbles.
// Branches (BEQ/BNE rs1, rs2, target) and JMP are resolved in ID and sent to
// the Control Unit as redirect/target. halt_wb pulses when HALT reaches WB,
// by which time every older instruction, scalar or parallel, has retired.
// The stage contents follow the published pipeline; operand routing, the
// branch forms and the host memory port are this design's choices.
module asc_spe
  import asc_pkg::*;
#(
  parameter int unsigned DMEM_DEPTH = 256,
  parameter int unsigned DMEM_AW    = $clog2(DMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ctrl_t              ctrl,
  input  data_t              imm,
  output data_t              bcast_data,
  output logic               redirect,
  output data_t              target,
  output logic               halt_wb,
  // host access to the data memory (while stopped)
  input  logic               host_en,
  input  logic               host_we,
  input  logic [DMEM_AW-1:0] host_addr,
  input  data_t              host_wdata,
  output data_t              host_rdata
);
  // ---------------- ID ----------------
  data_t rd1, rd2;
  logic  wb_we;
  reg_addr_t wb_rd;
  data_t wb_data;

  asc_regfile #(.NUM_REGS(NREGS)) u_rf (
    .clk(clk), .rst_n(rst_n),
    .ra1(ctrl.rs1), .ra2(ctrl.rs2), .rd1(rd1), .rd2(rd2),
    .we(wb_we), .wa(wb_rd), .wd(wb_data)
  );

  logic scalar;
  assign scalar     = ctrl.valid && !ctrl.par;
  assign bcast_data = rd2;
  assign target     = imm;
  assign redirect   = scalar && (ctrl.jump ||
                                 (ctrl.branch && ((rd1 == rd2) != ctrl.br_ne)));

  // ---------------- ID/EX ----------------
  stage_ctrl_t ex_c;
  alu_op_e     ex_alu_op;
  data_t       ex_a, ex_b, ex_sd, ex_imm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_c      <= '0;
      ex_alu_op <= ALU_ADD;
      ex_a      <= '0;
      ex_b      <= '0;
      ex_sd     <= '0;
      ex_imm    <= '0;
    end else begin
      ex_c.valid  <= scalar && (ctrl.reg_we || ctrl.mem_we || ctrl.halt);
      ex_c.rd     <= ctrl.rd;
      ex_c.reg_we <= ctrl.reg_we;
      ex_c.mem_rd <= ctrl.mem_rd;
      ex_c.mem_we <= ctrl.mem_we;
      ex_c.halt   <= ctrl.halt;
      ex_alu_op   <= ctrl.alu_op;
      ex_a        <= rd1;
      ex_b        <= ctrl.alu_b_imm ? imm : rd2;
      ex_sd       <= rd2;
      ex_imm      <= imm;
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
      mem_sd  <= ex_sd;
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
  assign halt_wb = wb_c.valid && wb_c.halt;
endmodule
