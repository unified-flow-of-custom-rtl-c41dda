// dmem_wrap: data memory and the wrapper that joins it to the data path.
//
// Every generated processor starts from the same base logic: the control unit
// and this data-memory wrapper. The program's arrays and scalars that live in
// memory are read into data-path registers and written back from them through
// the processor port. A second, independent port lets a host load the input
// data before a run and read the results afterwards (on an FPGA this is the
// second port of a block RAM).
//
// Processor port: addr (word address, from a register or the control word's
// constant), wdata, we, rdata. Host port: h_addr, h_wdata, h_we, h_rdata.
// Timing: writes on the rising clock edge; reads are combinational, so a load
// completes within one state of the schedule (distributed-RAM style). When both
// ports write the same word in one cycle the processor port wins. Addresses
// wrap modulo DEPTH. Depth, read timing and the host port are this design's
// choices: the document names the wrapper and the memory core but describes
// neither.
module dmem_wrap #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 1024,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  // processor port
  input  logic [DATA_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              we,
  output logic [DATA_W-1:0] rdata,
  // host port
  input  logic [AW-1:0]     h_addr,
  input  logic [DATA_W-1:0] h_wdata,
  input  logic              h_we,
  output logic [DATA_W-1:0] h_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     a;

  assign a = addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (h_we) mem[h_addr] <= h_wdata;
    if (we)   mem[a]      <= wdata;
  end

  assign rdata   = mem[a];
  assign h_rdata = mem[h_addr];

endmodule
