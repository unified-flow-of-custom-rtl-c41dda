// nisc_processor: a custom processor generated for one C program.
//
// The processor keeps the familiar fetch-and-execute style of a CPU, but it has
// no instruction set: its data path (registers, functional units, multiplexers,
// connections) is derived from the program's scheduled basic blocks, and the
// schedule itself becomes the contents of the control memory. Three parts, as
// in every generated processor:
//   ctrl_unit      fixed controller: steps through the control memory, one
//                  word per state, branching on the data path's status bit
//   nisc_datapath  the application-specific data path (all of its shape is
//                  set by the parameters below)
//   dmem_wrap      the data memory and its wrapper
// The defaults build the data path of the worked example
// g = ((a*b) + (c*d)) / (e*f) (two functional units, four registers) joined to
// the base logic; another program's data path is obtained by setting FU_OPS and
// the connection masks as described in nisc_datapath.
//
// Use: load the control words through prog_* and the input data through the
// host port h_*, pulse start, wait for done, read the results through h_*.
// cycles gives the number of states executed, the processor's cycle count.
// Timing: one state per clock cycle; everything synchronous to clk, synchronous
// active-high reset. The host port, start/done and the widths are this design's
// choices.
module nisc_processor
  import nisc_pkg::*;
#(
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned NREG       = 4,
  parameter int unsigned NFU        = 2,
  parameter int unsigned AW         = 8,
  parameter int unsigned CONST_W    = 16,
  parameter int unsigned DMEM_DEPTH = 1024,
  parameter logic [NFU-1:0][N_OPS-1:0] FU_OPS    = {M_MUL | M_DIV, M_ADD | M_MUL},
  parameter logic [NFU-1:0][NREG:0]    FU_A_CONN = {5'b00111, 5'b01001},
  parameter logic [NFU-1:0][NREG:0]    FU_B_CONN = {5'b01110, 5'b00110},
  parameter logic [NREG-1:0][NFU+1:0]  REG_CONN  = {4'b0110, 4'b0111, 4'b0101, 4'b0110},
  parameter logic [NREG:0]             MEM_ADDR_CONN = 5'b10000,
  parameter logic [NREG:0]             MEM_DATA_CONN = 5'b00001,
  parameter int unsigned               STATUS_FU     = 0,
  localparam int unsigned CW_W   = cw_width(AW, CONST_W, NREG, NFU),
  localparam int unsigned DMEM_AW = $clog2(DMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  // run control
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic [31:0]        cycles,
  output logic [AW-1:0]      pc,
  // control-memory programming
  input  logic               prog_we,
  input  logic [AW-1:0]      prog_addr,
  input  logic [CW_W-1:0]    prog_data,
  // host port of the data memory
  input  logic [DMEM_AW-1:0] h_addr,
  input  logic [DATA_W-1:0]  h_wdata,
  input  logic               h_we,
  output logic [DATA_W-1:0]  h_rdata,
  // observation of the data-path registers
  output logic [DATA_W-1:0]  reg_q [NREG]
);

  logic [CW_W-1:0]   cw;
  logic              status;
  logic [DATA_W-1:0] mem_addr, mem_wdata, mem_rdata;
  logic              mem_we;

  ctrl_unit #(.AW(AW), .CW_W(CW_W)) u_ctrl (
    .clk(clk), .rst(rst), .start(start), .status(status),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .cw(cw), .active(busy), .pc(pc), .done(done), .cycles(cycles));

  nisc_datapath #(
    .DATA_W(DATA_W), .NREG(NREG), .NFU(NFU), .AW(AW), .CONST_W(CONST_W),
    .FU_OPS(FU_OPS), .FU_A_CONN(FU_A_CONN), .FU_B_CONN(FU_B_CONN),
    .REG_CONN(REG_CONN), .MEM_ADDR_CONN(MEM_ADDR_CONN),
    .MEM_DATA_CONN(MEM_DATA_CONN), .STATUS_FU(STATUS_FU)
  ) u_dp (
    .clk(clk), .rst(rst), .cw(cw), .active(busy), .status(status),
    .mem_addr(mem_addr), .mem_wdata(mem_wdata), .mem_we(mem_we),
    .mem_rdata(mem_rdata), .reg_q(reg_q));

  dmem_wrap #(.DATA_W(DATA_W), .DEPTH(DMEM_DEPTH)) u_dmem (
    .clk(clk), .addr(mem_addr), .wdata(mem_wdata), .we(mem_we), .rdata(mem_rdata),
    .h_addr(h_addr), .h_wdata(h_wdata), .h_we(h_we), .h_rdata(h_rdata));

endmodule
