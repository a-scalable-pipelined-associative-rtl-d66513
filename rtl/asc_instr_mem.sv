// asc_instr_mem - instruction memory of the Control Unit.
//
// Read combinationally in the IF stage at the program counter; the word is
// captured by the IF/ID latch. A host write port loads the program while the
// processor is stopped. The memory is named but not sized in the published
// description; 256 words, matching an 8-bit program counter and 8-bit branch
// targets, is this design's choice.
module asc_instr_mem
  import asc_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic [AW-1:0]      pc,
  output logic [INSTR_W-1:0] instr,
  input  logic               host_we,
  input  logic [AW-1:0]      host_addr,
  input  logic [INSTR_W-1:0] host_wdata
);
  logic [INSTR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
  end

  assign instr = mem[pc];
endmodule
