// asc_regfile - register file of a processing element (16 x 8 bit).
//
// Two combinational read ports feed the Data Switch (Parallel PE) or the
// ID/EX latch (Sequential PE) in the ID stage; one synchronous write port is
// driven by the WB stage. A read of the register being written in the same
// cycle returns the new value (write-through), so an instruction in ID sees the
// result of the instruction in WB; with no other forwarding, a consumer must
// follow its producer by three instructions. The 16 x 8 size is the published
// one for the Parallel PE; the write-through read and the reset to zero are
// this design's choices.
module asc_regfile
  import asc_pkg::*;
#(
  parameter int unsigned NUM_REGS = 16,
  parameter int unsigned AW       = $clog2(NUM_REGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  output data_t         rd1,
  output data_t         rd2,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  data_t         wd
);
  data_t regs [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (we && wa == ra1) ? wd : regs[ra1];
  assign rd2 = (we && wa == ra2) ? wd : regs[ra2];
endmodule
