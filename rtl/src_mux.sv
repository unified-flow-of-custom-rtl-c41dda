// src_mux: multiplexer in front of an input port of the data path.
//
// Where more than one connection reaches a port of a register, a functional unit
// or the data memory, the data path builder places a multiplexer there. This
// module is that multiplexer with its set of connections fixed by a parameter:
// the source space is an array of N candidate signals, CONN marks which of them
// are actually wired to this port, and only those become inputs of the built
// multiplexer. A select naming an unconnected source gives 0.
//
// Interface: src[N] candidate sources, sel (index into src), y. Combinational.
// Counting the connected inputs gives the multiplexer's size; a port with a
// single connection reduces to a wire. The source-space indexing and the
// zero output are this design's choices.
module src_mux
  import nisc_pkg::*;
#(
  parameter int unsigned   DATA_W = 32,
  parameter int unsigned   N      = 4,
  parameter logic [N-1:0]  CONN   = '1
) (
  input  logic [DATA_W-1:0] src [N],
  input  logic [SEL_W-1:0]  sel,
  output logic [DATA_W-1:0] y
);

  always_comb begin
    y = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (CONN[i] && sel == SEL_W'(i)) y = src[i];
    end
  end

endmodule
