// asc_processor - pipelined associative SIMD processor (top level).
//
// One Control Unit fetches and decodes a single instruction stream. Scalar
// instructions run on the Sequential PE; parallel instructions run in
// lock-step on NUM_PE Parallel PEs, limited to the responders selected by
// associative searches. Three buses leave the ID stage: the control word,
// immediate data from the Control Unit, and register data broadcast by the
// Sequential PE. Pipeline: IF (Control Unit), ID (Control Unit decode plus
// the PEs' register files, Data Switch, comparator and mask stack), EX, MEM,
// WB, one cycle each.
//
// Operation: while stopped (after reset, or once a HALT has retired) the host
// may write the program and read or write every data memory. A one-cycle
// start pulse begins execution at address 0; busy stays high until the HALT
// instruction leaves WB. An assertion flags host writes made while busy
// (they are ignored). The host ports and start/busy handshake are this
// design's choices; the published text does not describe program loading.
module asc_processor
  import asc_pkg::*;
#(
  parameter int unsigned NUM_PE     = 4,
  parameter int unsigned DMEM_DEPTH = 256,
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned MASK_DEPTH = 8,
  parameter int unsigned PE_W       = (NUM_PE > 1) ? $clog2(NUM_PE) : 1,
  parameter int unsigned DMEM_AW    = $clog2(DMEM_DEPTH),
  parameter int unsigned PC_W       = $clog2(IMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic [NUM_PE-1:0]  responders,
  // program load
  input  logic               imem_we,
  input  logic [PC_W-1:0]    imem_addr,
  input  logic [INSTR_W-1:0] imem_wdata,
  // Sequential PE data memory
  input  logic               sdm_we,
  input  logic [DMEM_AW-1:0] sdm_addr,
  input  data_t              sdm_wdata,
  output data_t              sdm_rdata,
  // Parallel PE data memories
  input  logic               pdm_we,
  input  logic [PE_W-1:0]    pdm_pe,
  input  logic [DMEM_AW-1:0] pdm_addr,
  input  data_t              pdm_wdata,
  output data_t              pdm_rdata
);
  ctrl_t            ctrl;
  data_t            imm, bcast, target;
  logic             redirect, halt_wb, running;
  logic [PC_W-1:0]  pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       busy <= 1'b0;
    else if (start)   busy <= 1'b1;
    else if (halt_wb) busy <= 1'b0;
  end

  // Host accesses are only honoured while the processor is stopped.
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                busy |-> !(imem_we || sdm_we || pdm_we))
    else $error("host port written while the processor is busy");

  asc_control_unit #(.IMEM_DEPTH(IMEM_DEPTH)) u_cu (
    .clk(clk), .rst_n(rst_n), .start(start && !busy), .running(running),
    .redirect(redirect), .target(target),
    .ctrl(ctrl), .imm(imm), .pc(pc),
    .host_we(imem_we && !busy), .host_addr(imem_addr), .host_wdata(imem_wdata)
  );

  asc_spe #(.DMEM_DEPTH(DMEM_DEPTH)) u_spe (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl), .imm(imm),
    .bcast_data(bcast), .redirect(redirect), .target(target), .halt_wb(halt_wb),
    .host_en(!busy), .host_we(sdm_we), .host_addr(sdm_addr),
    .host_wdata(sdm_wdata), .host_rdata(sdm_rdata)
  );

  asc_ppe_array #(.NUM_PE(NUM_PE), .DMEM_DEPTH(DMEM_DEPTH),
                  .MASK_DEPTH(MASK_DEPTH)) u_array (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl), .imm(imm), .spe_data(bcast),
    .responders(responders),
    .host_en(!busy), .host_we(pdm_we), .host_pe(pdm_pe), .host_addr(pdm_addr),
    .host_wdata(pdm_wdata), .host_rdata(pdm_rdata)
  );
endmodule
