// asc_data_mem - MEM-stage data memory of a processing element (256 x 8 bit).
//
// The pipeline reads combinationally at the EX/MEM address (the value is
// captured by the MEM/WB latch) and writes on the clock edge. A second port,
// used only while the processor is stopped, lets a host load operands and read
// results; when host_en is high it takes the memory over. The 256 x 8 size is
// the published size of the Sequential PE's memory and is used here for each
// Parallel PE as well; the host port is this design's addition, since loading
// the per-PE data is not described.
module asc_data_mem
  import asc_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // pipeline port
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  data_t         wdata,
  output data_t         rdata,
  // host port
  input  logic          host_en,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  data_t         host_wdata,
  output data_t         host_rdata
);
  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_en) begin
      if (host_we) mem[host_addr] <= host_wdata;
    end else if (we) begin
      mem[addr] <= wdata;
    end
  end

  assign rdata      = mem[addr];
  assign host_rdata = mem[host_addr];
endmodule
