// asc_ppe_array - the Parallel PE array and its reconfigurable linear network.
//
// NUM_PE Parallel PEs receive the same control word, immediate data and
// broadcast-register data each cycle. Their Data Switches are chained into a
// linear array: PE i sends to_right to PE i+1 and to_left to PE i-1. The ends
// receive 0 (no wrap-around). A PE that is not a responder bypasses, so
// responders exchange data with the nearest responder on each side however
// many non-responders lie between; the bypass chain is combinational. The
// max/min unit reduces operand A over the responders for MAX/MIN searches.
// The host port reaches PE host_pe's data memory while the processor is
// stopped. The default of 4 PEs is the published 4-PE build (the size drawn
// in the architecture figure); the published text also reports 50 PEs and
// estimates about 70 for the FPGA used.
module asc_ppe_array
  import asc_pkg::*;
#(
  parameter int unsigned NUM_PE     = 4,
  parameter int unsigned DMEM_DEPTH = 256,
  parameter int unsigned MASK_DEPTH = 8,
  parameter int unsigned PE_W       = (NUM_PE > 1) ? $clog2(NUM_PE) : 1,
  parameter int unsigned DMEM_AW    = $clog2(DMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ctrl_t              ctrl,
  input  data_t              imm,
  input  data_t              spe_data,
  output logic [NUM_PE-1:0]  responders,
  // host access to one PE's data memory (while stopped)
  input  logic               host_en,
  input  logic               host_we,
  input  logic [PE_W-1:0]    host_pe,
  input  logic [DMEM_AW-1:0] host_addr,
  input  data_t              host_wdata,
  output data_t              host_rdata
);
  data_t right_bus [NUM_PE+1];   // right_bus[i] enters PE i from the left
  data_t left_bus  [NUM_PE+1];   // left_bus[i+1] enters PE i from the right
  data_t mm_value  [NUM_PE];
  data_t host_rd   [NUM_PE];
  data_t extreme;

  assign right_bus[0]     = '0;
  assign left_bus[NUM_PE] = '0;

  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    asc_ppe #(.DMEM_DEPTH(DMEM_DEPTH), .MASK_DEPTH(MASK_DEPTH)) u_pe (
      .clk(clk), .rst_n(rst_n),
      .ctrl(ctrl), .imm(imm), .spe_data(spe_data),
      .from_left(right_bus[i]), .from_right(left_bus[i+1]),
      .to_left(left_bus[i]), .to_right(right_bus[i+1]),
      .mm_value(mm_value[i]), .mm_extreme(extreme), .responder(responders[i]),
      .host_en(host_en), .host_we(host_we && (host_pe == PE_W'(i))),
      .host_addr(host_addr), .host_wdata(host_wdata), .host_rdata(host_rd[i])
    );
  end

  asc_maxmin #(.NUM_PE(NUM_PE)) u_maxmin (
    .find_min(ctrl.find_min), .value(mm_value), .responder(responders),
    .extreme(extreme)
  );

  assign host_rdata = host_rd[host_pe];
endmodule
