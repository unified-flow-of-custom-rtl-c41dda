// reg_file: register file of the data path.
//
// The register allocation merges operands whose lifetimes do not overlap into one
// storage element: in the worked example one register holds, one after another,
// the operands c and e and the result res. A register file of DEPTH words
// generalises that element; DEPTH = 1 is the plain register of the example.
//
// Interface: one write port (we, waddr, wdata) and one read port (raddr, rdata).
// Timing: the write happens on the rising clock edge; the read is combinational,
// so a value written at the end of one state is read in the next. Reset clears
// every word (synchronous, active-high rst). Port counts, read timing and reset
// are this design's choices; the document gives none.
module reg_file #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 1,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we && int'(waddr) < DEPTH) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = (int'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
