// ctrl_unit: the fixed control unit of the custom processor.
//
// The processor has no instruction set and no decoder. The schedule of every
// basic block is turned into a sequence of control words, one per state, held in
// the control memory. Each cycle this unit reads the word at the current address
// and hands it to the data path unchanged; the data path takes its multiplexer
// selects, write enables, operations and the constant from it. The unit itself
// interprets only the low next-address field: go to the next word, jump, branch
// on the status bit that the data path returns (the result of a comparison in
// the same state), or halt. That is how the control flow between basic blocks
// (conditional branches and loops) is carried out.
//
// Interface: start begins a run at address 0; active is high while a run is in
// progress (the data path writes nothing otherwise); done rises with the halting
// word and stays high until the next start; cycles counts the states of the
// last run. The control memory is loaded through the prog_* port while idle.
// Timing: one state per clock. The word at pc is read combinationally (a
// distributed-RAM control memory) and the next pc is registered.
// The split into a fixed controller and a generated control memory follows the
// document; the word layout, the next-address modes, start/done and the
// programming port are this design's own.
module ctrl_unit
  import nisc_pkg::*;
#(
  parameter int unsigned AW   = 8,
  parameter int unsigned CW_W = 64,
  localparam int unsigned DEPTH = 1 << AW
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic            status,
  // control-memory programming port
  input  logic            prog_we,
  input  logic [AW-1:0]   prog_addr,
  input  logic [CW_W-1:0] prog_data,
  // to the data path
  output logic [CW_W-1:0] cw,
  output logic            active,
  // run state
  output logic [AW-1:0]   pc,
  output logic            done,
  output logic [31:0]     cycles
);

  logic [CW_W-1:0] cmem [DEPTH];
  nxt_e            nxt;
  logic [AW-1:0]   target;
  logic [AW-1:0]   pc_next;

  always_ff @(posedge clk) begin
    if (prog_we && !active) cmem[prog_addr] <= prog_data;
  end

  assign cw     = cmem[pc];
  assign nxt    = nxt_e'(cw[NXT_W-1:0]);
  assign target = cw[NXT_W +: AW];

  always_comb begin
    unique case (nxt)
      NXT_JUMP: pc_next = target;
      NXT_BRT:  pc_next = status ? target : pc + 1'b1;
      NXT_BRF:  pc_next = status ? pc + 1'b1 : target;
      default:  pc_next = pc + 1'b1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= '0;
      active <= 1'b0;
      done   <= 1'b0;
      cycles <= '0;
    end else if (!active) begin
      if (start) begin
        pc     <= '0;
        active <= 1'b1;
        done   <= 1'b0;
        cycles <= '0;
      end
    end else begin
      cycles <= cycles + 1;
      if (nxt == NXT_HALT) begin
        active <= 1'b0;
        done   <= 1'b1;
      end else begin
        pc <= pc_next;
      end
    end
  end

  // The memory may only be reprogrammed between runs.
  assert property (@(posedge clk) disable iff (rst) !(prog_we && active))
    else $error("ctrl_unit: control memory written during a run");

endmodule
