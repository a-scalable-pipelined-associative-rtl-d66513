// asc_pkg - shared types and constants of the pipelined associative SIMD
// processor (one Control Unit, one Sequential PE, an array of Parallel PEs).
//
// The processor is an 8-bit machine with a five-stage pipeline
// (IF, ID, EX, MEM, WB). The word size, the 16-entry register file, the
// 256-entry data memory and the 8-deep mask stack are the published sizes.
// The instruction word, its encoding and the opcode list are this design's
// own choice: the architecture is described only at block level.
//
// Instruction word (32 bits):
//   [31:27] op    opcode (opcode_e)
//   [26]    par   1 = parallel instruction (executed by the PPE array),
//                 0 = scalar instruction (executed by the Sequential PE)
//   [25:22] rd    destination register
//   [21:18] rs1   first source register (Data Switch "left" register input)
//   [17:14] rs2   second source register (Data Switch "right" register input);
//                 for a parallel instruction in Broadcast mode with bsel=1
//                 it names the Sequential PE register that is broadcast
//   [13:11] dsw   Data Switch mode (dsw_mode_e), parallel instructions only
//   [10]    bsel  parallel: broadcast source, 0 = CU immediate, 1 = SPE register
//                 scalar:   1 = operand B is the immediate instead of rs2
//   [9:8]   -     unused, write as 0
//   [7:0]   imm   immediate data / memory offset / branch target
package asc_pkg;

  localparam int unsigned DATA_W   = 8;
  localparam int unsigned INSTR_W  = 32;
  localparam int unsigned NREGS    = 16;
  localparam int unsigned REG_AW   = 4;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [REG_AW-1:0] reg_addr_t;

  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    OP_HALT = 5'd1,
    OP_ADD  = 5'd2,   // rd = A + B
    OP_SUB  = 5'd3,   // rd = A - B
    OP_AND  = 5'd4,
    OP_OR   = 5'd5,
    OP_XOR  = 5'd6,
    OP_SHL  = 5'd7,   // rd = A << 1
    OP_SHR  = 5'd8,   // rd = A >> 1
    OP_AVG  = 5'd9,   // rd = (A + B) >> 1, 9-bit intermediate
    OP_MOV  = 5'd10,  // rd = B
    OP_LD   = 5'd11,  // rd = mem[A + imm]
    OP_ST   = 5'd12,  // mem[A + imm] = B
    OP_CEQ  = 5'd13,  // parallel: push (A == B) & top
    OP_CNE  = 5'd14,  // parallel: push (A != B) & top
    OP_CLT  = 5'd15,  // parallel: push (A <  B) & top   (unsigned)
    OP_CGE  = 5'd16,  // parallel: push (A >= B) & top   (unsigned)
    OP_MAX  = 5'd17,  // parallel: push responders whose A is the largest A
    OP_MIN  = 5'd18,  // parallel: push responders whose A is the smallest A
    OP_POP  = 5'd19,  // parallel: pop the mask stack
    OP_BEQ  = 5'd20,  // scalar: if R[rs1] == R[rs2] then PC = imm
    OP_BNE  = 5'd21,  // scalar: if R[rs1] != R[rs2] then PC = imm
    OP_JMP  = 5'd22   // scalar: PC = imm
  } opcode_e;

  typedef enum logic [2:0] {
    DSW_COMP  = 3'd0,  // Computation: A = rf1, B = rf2
    DSW_BCAST = 3'd1,  // Broadcast:   A = rf1, B = immediate or SPE register
    DSW_LEFT  = 3'd2,  // Data Movement Left:  rf1 -> left,  A = rf2, B = from right
    DSW_RIGHT = 3'd3,  // Data Movement Right: rf2 -> right, A = rf1, B = from left
    DSW_BOTH  = 3'd4   // Data Movement Both:  rf1 -> left, rf2 -> right,
                       //                      A = from left, B = from right
  } dsw_mode_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
    ALU_SHL, ALU_SHR, ALU_AVG, ALU_PASSB
  } alu_op_e;

  typedef enum logic [1:0] {
    CMP_EQ, CMP_NE, CMP_LT, CMP_GE
  } cmp_op_e;

  typedef struct packed {
    opcode_e   op;
    logic      par;
    reg_addr_t rd;
    reg_addr_t rs1;
    reg_addr_t rs2;
    dsw_mode_e dsw;
    logic      bsel;
    logic [1:0] unused;
    data_t     imm;
  } instr_t;

  // Control word broadcast by the Control Unit decoder during ID.
  typedef struct packed {
    logic      valid;     // a real instruction (not a bubble)
    logic      par;       // parallel (PPE array) vs scalar (SPE)
    reg_addr_t rd;
    reg_addr_t rs1;
    reg_addr_t rs2;
    dsw_mode_e dsw;
    logic      bsel;
    alu_op_e   alu_op;
    logic      alu_b_imm; // scalar: operand B is the immediate
    logic      reg_we;    // WB writes rd
    logic      mem_rd;    // LD
    logic      mem_we;    // ST
    logic      cmp;       // parallel compare, pushes the mask stack
    cmp_op_e   cmp_op;
    logic      maxmin;    // parallel max/min search, pushes the mask stack
    logic      find_min;  // 1 = minimum, 0 = maximum
    logic      pop;       // parallel mask-stack pop
    logic      branch;    // scalar conditional branch
    logic      br_ne;     // branch on not-equal (else on equal)
    logic      jump;      // scalar unconditional jump
    logic      halt;
  } ctrl_t;

  // Fields that travel from ID/EX to the later stages of a PE.
  typedef struct packed {
    logic      valid;
    reg_addr_t rd;
    logic      reg_we;
    logic      mem_rd;
    logic      mem_we;
    logic      halt;
  } stage_ctrl_t;

  function automatic instr_t make_instr(opcode_e op, logic par, reg_addr_t rd,
                                        reg_addr_t rs1, reg_addr_t rs2,
                                        dsw_mode_e dsw, logic bsel, data_t imm);
    instr_t i;
    i.op = op; i.par = par; i.rd = rd; i.rs1 = rs1; i.rs2 = rs2;
    i.dsw = dsw; i.bsel = bsel; i.unused = 2'b00; i.imm = imm;
    return i;
  endfunction

endpackage
