// asc_control_unit - Control Unit: IF stage and the decode part of ID.
//
// IF: the program counter addresses the instruction memory and the word is
// captured by the IF/ID latch. ID: the decoder turns the latched word into the
// control word and immediate data that are broadcast, in the same cycle, to the
// Sequential PE and to every Parallel PE (which do the rest of ID).
//
// Control flow: a branch or jump is resolved by the Sequential PE's comparator
// in ID and returned here as redirect/target in the same cycle; the PC is
// loaded with the target and the instruction fetched behind the branch is
// squashed (one bubble), the conventional treatment of a control hazard.
// HALT in ID stops fetching and squashes the instruction behind it. A start
// pulse clears the PC and begins fetching at address 0. Data hazards are not
// detected: programs place independent instructions or NOPs between a
// producer and its consumer, as the published design does.
//
// The stage split follows the published pipeline; start/halt, the 8-bit PC
// and the one-bubble branch are this design's choices.
module asc_control_unit
  import asc_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned PC_W       = $clog2(IMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               running,
  // from the Sequential PE branch comparator (ID stage)
  input  logic               redirect,
  input  data_t              target,
  // broadcast in ID
  output ctrl_t              ctrl,
  output data_t              imm,
  output logic [PC_W-1:0]    pc,
  // host program load (while stopped)
  input  logic               host_we,
  input  logic [PC_W-1:0]    host_addr,
  input  logic [INSTR_W-1:0] host_wdata
);
  logic [INSTR_W-1:0] fetched;
  logic [INSTR_W-1:0] ifid_instr;
  logic               ifid_valid;

  asc_instr_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk       (clk),
    .pc        (pc),
    .instr     (fetched),
    .host_we   (host_we && !running),
    .host_addr (host_addr),
    .host_wdata(host_wdata)
  );

  asc_decoder u_dec (
    .valid_in  (ifid_valid),
    .instr_bits(ifid_instr),
    .ctrl      (ctrl),
    .imm       (imm)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc         <= '0;
      running    <= 1'b0;
      ifid_valid <= 1'b0;
      ifid_instr <= '0;
    end else if (start) begin
      pc         <= '0;
      running    <= 1'b1;
      ifid_valid <= 1'b0;
    end else if (running) begin
      if (ctrl.halt) begin
        running    <= 1'b0;
        ifid_valid <= 1'b0;
      end else if (redirect) begin
        pc         <= PC_W'(target);
        ifid_valid <= 1'b0;
      end else begin
        pc         <= pc + 1'b1;
        ifid_instr <= fetched;
        ifid_valid <= 1'b1;
      end
    end else begin
      ifid_valid <= 1'b0;
    end
  end
endmodule
