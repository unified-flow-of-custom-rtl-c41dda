// nisc_pkg: types and constants shared by the blocks of the no-instruction-set
// (NISC style) custom processor.
//
// The processor has no instruction set. Every clock cycle the control unit reads
// one wide control word from its control memory; the word directly drives every
// multiplexer select, register write enable and functional-unit operation of the
// application-specific data path, carries one constant, and says how the next
// address is formed. This package fixes the operation codes of the functional
// units, the widths of the select fields, and the bit layout of a control word,
// so that the control unit, the data path and anyone generating control-memory
// contents agree on it.
//
// Control word layout (LSB first) for a data path with NFU functional units,
// NREG registers and a control memory addressed by AW bits:
//   [2:0]                       next-address mode (nxt_e)
//   [3 +: AW]                   branch / jump target
//   [3+AW +: CONST_W]           constant brought to the data path
//   then the data-memory field  {data_sel, addr_sel, we}      (MEM_FIELD_W bits)
//   then NREG register fields   {sel, we}                     (REG_FIELD_W bits each)
//   then NFU unit fields        {sel_b, sel_a, op}            (FU_FIELD_W bits each)
// The operation list follows the operation types named for the test programs
// (add, subtract, multiply, divide, shifts, AND, OR, XOR, NOT, comparison,
// assignment). The encodings, the widths and the layout are this design's own.
package nisc_pkg;

  // Functional-unit operations. OP_ASSIGN copies input A.
  typedef enum logic [3:0] {
    OP_ASSIGN = 4'd0,
    OP_ADD    = 4'd1,
    OP_SUB    = 4'd2,
    OP_MUL    = 4'd3,
    OP_DIV    = 4'd4,
    OP_SHL    = 4'd5,
    OP_SHR    = 4'd6,
    OP_AND    = 4'd7,
    OP_OR     = 4'd8,
    OP_XOR    = 4'd9,
    OP_NOT    = 4'd10,
    OP_LT     = 4'd11,
    OP_EQ     = 4'd12
  } op_e;

  localparam int unsigned N_OPS = 13;
  localparam int unsigned OP_W  = 4;

  // Bit masks naming the operation set a functional unit implements.
  localparam logic [N_OPS-1:0] M_ASSIGN = 13'd1 << OP_ASSIGN;
  localparam logic [N_OPS-1:0] M_ADD    = 13'd1 << OP_ADD;
  localparam logic [N_OPS-1:0] M_SUB    = 13'd1 << OP_SUB;
  localparam logic [N_OPS-1:0] M_MUL    = 13'd1 << OP_MUL;
  localparam logic [N_OPS-1:0] M_DIV    = 13'd1 << OP_DIV;
  localparam logic [N_OPS-1:0] M_SHIFT  = (13'd1 << OP_SHL) | (13'd1 << OP_SHR);
  localparam logic [N_OPS-1:0] M_AND    = 13'd1 << OP_AND;
  localparam logic [N_OPS-1:0] M_OR     = 13'd1 << OP_OR;
  localparam logic [N_OPS-1:0] M_XOR    = 13'd1 << OP_XOR;
  localparam logic [N_OPS-1:0] M_NOT    = 13'd1 << OP_NOT;
  localparam logic [N_OPS-1:0] M_COMP   = (13'd1 << OP_LT) | (13'd1 << OP_EQ);
  localparam logic [N_OPS-1:0] M_ALL    = {N_OPS{1'b1}};

  // Width of every multiplexer select field: up to 32 sources per input.
  localparam int unsigned SEL_W = 5;

  // Next-address modes of the control unit.
  typedef enum logic [2:0] {
    NXT_SEQ   = 3'd0,  // address + 1
    NXT_JUMP  = 3'd1,  // unconditional jump to target
    NXT_BRT   = 3'd2,  // jump to target when status is 1
    NXT_BRF   = 3'd3,  // jump to target when status is 0
    NXT_HALT  = 3'd4   // finish the run after this word
  } nxt_e;

  localparam int unsigned NXT_W       = 3;
  localparam int unsigned FU_FIELD_W  = OP_W + 2 * SEL_W;
  localparam int unsigned REG_FIELD_W = 1 + SEL_W;
  localparam int unsigned MEM_FIELD_W = 1 + 2 * SEL_W;

  // Offsets of the control-word fields.
  function automatic int unsigned cw_const_lsb(int unsigned aw);
    return NXT_W + aw;
  endfunction

  function automatic int unsigned cw_mem_lsb(int unsigned aw, int unsigned const_w);
    return NXT_W + aw + const_w;
  endfunction

  function automatic int unsigned cw_reg_lsb(int unsigned aw, int unsigned const_w,
                                             int unsigned r);
    return NXT_W + aw + const_w + MEM_FIELD_W + r * REG_FIELD_W;
  endfunction

  function automatic int unsigned cw_fu_lsb(int unsigned aw, int unsigned const_w,
                                            int unsigned nreg, int unsigned f);
    return NXT_W + aw + const_w + MEM_FIELD_W + nreg * REG_FIELD_W + f * FU_FIELD_W;
  endfunction

  function automatic int unsigned cw_width(int unsigned aw, int unsigned const_w,
                                           int unsigned nreg, int unsigned nfu);
    return NXT_W + aw + const_w + MEM_FIELD_W + nreg * REG_FIELD_W + nfu * FU_FIELD_W;
  endfunction

endpackage
