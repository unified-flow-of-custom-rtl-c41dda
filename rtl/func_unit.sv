// func_unit: one functional unit of the custom data path.
//
// Every unit has two input ports and one output port, which is the shape of a
// three-address statement (y = a op b). A unit may implement a combination of
// operations that the resource sharing gave it, for example ADD/MUL or MUL/DIV;
// the parameter OPS is the bit mask of the operations it contains (see nisc_pkg),
// and only those are built. The control word selects the operation each cycle.
//
// Timing: purely combinational. A state of the schedule reads the registers,
// passes the operands through the unit and writes the result into a register at
// the end of the same clock cycle, so each unit has a latency of one state.
//
// Arithmetic follows C on 32-bit int: MUL keeps the low word, DIV truncates
// toward zero (signed). Comparisons (LT signed, EQ) return 1 or 0, and that value
// is the status the control unit branches on. The document names the operation
// types but not their exact semantics; these are this design's choices, as are:
// SHR is a logical shift (the hashing code works on unsigned words), the shift
// amount is the low five bits of B, NOT inverts A, division by zero gives all
// ones, the overflowing quotient of the most negative value by -1 is that
// value, and an operation outside OPS gives 0.
module func_unit
  import nisc_pkg::*;
#(
  parameter int unsigned      DATA_W = 32,
  parameter logic [N_OPS-1:0] OPS    = M_ALL
) (
  input  op_e               op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y
);

  localparam int unsigned      SH_W    = $clog2(DATA_W);
  localparam logic [DATA_W-1:0] MIN_NEG = {1'b1, {(DATA_W-1){1'b0}}};

  logic signed [DATA_W-1:0] sa, sb;
  assign sa = a;
  assign sb = b;

  always_comb begin
    y = '0;
    if (OPS[op]) begin
      unique case (op)
        OP_ASSIGN: y = a;
        OP_ADD:    y = a + b;
        OP_SUB:    y = a - b;
        OP_MUL:    y = a * b;
        OP_DIV:    y = (b == '0)                    ? '1 :
                       (sb == -1 && a == MIN_NEG) ? a  : DATA_W'(sa / sb);
        OP_SHL:    y = a << b[SH_W-1:0];
        OP_SHR:    y = a >> b[SH_W-1:0];
        OP_AND:    y = a & b;
        OP_OR:     y = a | b;
        OP_XOR:    y = a ^ b;
        OP_NOT:    y = ~a;
        OP_LT:     y = DATA_W'(sa < sb);
        OP_EQ:     y = DATA_W'(a == b);
        default:   y = '0;
      endcase
    end
  end

endmodule
