// nisc_tb_pkg: control-word assembly and reference programs for the testbenches.
//
// cw_builder packs one control word field by field, using the layout defined in
// nisc_pkg, for a data path of a given shape (control-memory address width,
// constant width, number of registers). Programs provided:
//   expr1_program  g = ((a*b) + (c*d)) / (e*f) on the default data path:
//                  load a..d, the three schedule states S1..S3 (with e and f
//                  loaded alongside), store g, halt
//   proc1_program, proc2_program, loop_program
//                  the three procedures of the profiling example, for the loop
//                  data path (LOOP_* below): straight-line code, a counted
//                  loop, and a counted loop around an if/else,
//                  "for (i = 0; i < n; i++) if (x[i] < t) s1 += x[i];
//                  else s2 -= x[i];"
// The procedure programs also return, per control-memory address, the basic
// block it belongs to, so that a testbench can profile a run block by block.
package nisc_tb_pkg;
  import nisc_pkg::*;

  typedef logic [255:0] word_t;

  class cw_builder;
    int unsigned aw, const_w, nreg;
    word_t       w;

    function new(int unsigned aw_i, int unsigned const_w_i, int unsigned nreg_i);
      aw = aw_i; const_w = const_w_i; nreg = nreg_i; w = '0;
    endfunction

    function void clear();
      w = '0;
    endfunction

    function void put(int unsigned lsb, int unsigned width, longint unsigned v);
      for (int unsigned i = 0; i < width; i++) w[lsb + i] = v[i];
    endfunction

    function void nxt(nxt_e m, int unsigned target = 0);
      put(0, NXT_W, m);
      put(NXT_W, aw, target);
    endfunction

    function void konst(int v);
      put(cw_const_lsb(aw), const_w, longint'(v));
    endfunction

    // data-memory access: we, address source, data source
    function void mem(bit we, int unsigned asel, int unsigned dsel = 0);
      int unsigned l = cw_mem_lsb(aw, const_w);
      put(l, 1, we);
      put(l + 1, SEL_W, asel);
      put(l + 1 + SEL_W, SEL_W, dsel);
    endfunction

    // write register r from source sel
    function void wreg(int unsigned r, int unsigned sel);
      int unsigned l = cw_reg_lsb(aw, const_w, r);
      put(l, 1, 1);
      put(l + 1, SEL_W, sel);
    endfunction

    // functional unit f: operation and input selects
    function void fu(int unsigned f, op_e op, int unsigned sa, int unsigned sb);
      int unsigned l = cw_fu_lsb(aw, const_w, nreg, f);
      put(l, OP_W, op);
      put(l + OP_W, SEL_W, sa);
      put(l + OP_W + SEL_W, SEL_W, sb);
    endfunction
  endclass

  // ---------------------------------------------------------------------------
  // Expression (1) on the default data path.
  // Registers R_1..R_4 are indices 0..3; operand sources 0..3 = registers,
  // 4 = constant; register-input sources 0 = FU_1, 1 = FU_2, 2 = memory,
  // 3 = constant. a..f are at base+0..base+5, g is stored at base+6.
  localparam int unsigned EXPR1_WORDS   = 9;
  localparam int unsigned EXPR1_CYCLES  = 9;   // states of one run
  localparam int unsigned EXPR1_S1      = 4;   // address of schedule state S1

  function automatic void expr1_program(int unsigned aw, int unsigned const_w, int base,
                                        output word_t prog [$]);
    cw_builder b = new(aw, const_w, 4);
    prog.delete();
    // load a -> R_3, b -> R_4, c -> R_1, d -> R_2
    b.clear(); b.konst(base + 0); b.mem(0, 4); b.wreg(2, 2); prog.push_back(b.w);
    b.clear(); b.konst(base + 1); b.mem(0, 4); b.wreg(3, 2); prog.push_back(b.w);
    b.clear(); b.konst(base + 2); b.mem(0, 4); b.wreg(0, 2); prog.push_back(b.w);
    b.clear(); b.konst(base + 3); b.mem(0, 4); b.wreg(1, 2); prog.push_back(b.w);
    // S1: T4 = c*d on FU_1 -> R_3, T5 = a*b on FU_2 -> R_4; load e -> R_1
    b.clear(); b.fu(0, OP_MUL, 0, 1); b.fu(1, OP_MUL, 2, 3);
    b.wreg(2, 0); b.wreg(3, 1);
    b.konst(base + 4); b.mem(0, 4); b.wreg(0, 2); prog.push_back(b.w);
    // load f -> R_2
    b.clear(); b.konst(base + 5); b.mem(0, 4); b.wreg(1, 2); prog.push_back(b.w);
    // S2: T6 = T5 + T4 on FU_1 -> R_2, T3 = e*f on FU_2 -> R_3
    b.clear(); b.fu(0, OP_ADD, 3, 2); b.fu(1, OP_MUL, 0, 1);
    b.wreg(1, 0); b.wreg(2, 1); prog.push_back(b.w);
    // S3: res = T6 / T3 on FU_2 -> R_1
    b.clear(); b.fu(1, OP_DIV, 1, 2); b.wreg(0, 1); prog.push_back(b.w);
    // store res, halt
    b.clear(); b.konst(base + 6); b.mem(1, 4, 0); b.nxt(NXT_HALT); prog.push_back(b.w);
  endfunction

  // ---------------------------------------------------------------------------
  // Loop data path: R0 = i, R1 = s1, R2 = s2, R3 = x; FU0 = ADD/SUB, FU1 = COMP.
  localparam logic [1:0][N_OPS-1:0] LOOP_FU_OPS    = {M_COMP, M_ADD | M_SUB};
  localparam logic [1:0][4:0]       LOOP_FU_A_CONN = {5'b01001, 5'b00111};
  localparam logic [1:0][4:0]       LOOP_FU_B_CONN = {5'b10000, 5'b11000};
  localparam logic [3:0][3:0]       LOOP_REG_CONN  = {4'b0100, 4'b1001, 4'b1001, 4'b1001};
  localparam logic [4:0]            LOOP_MEM_ADDR_CONN = 5'b10001;
  localparam logic [4:0]            LOOP_MEM_DATA_CONN = 5'b00110;
  localparam int unsigned           LOOP_STATUS_FU     = 1;

  // basic blocks of the profiling example: proc1 = BB0, proc2 = BB1..BB4,
  // proc3 = BB5..BB10; BB_END marks the stores and halt that end a call
  typedef enum int {BB_P1 = 0, BB_P2_INIT = 1, BB_P2_COND = 2, BB_P2_BODY = 3,
                    BB_P2_INCR = 4, BB_INIT = 5, BB_COND = 6, BB_TEST = 7, BB_IF = 8,
                    BB_ELSE = 9, BB_INCR = 10, BB_END = 11} bb_e;

  // x[0..n-1] at address 0, s1 stored at out, s2 at out+1
  function automatic void loop_program(int unsigned aw, int unsigned const_w, int n, int t,
                                       int out, output word_t prog [$],
                                       output bb_e bb [$]);
    cw_builder b = new(aw, const_w, 4);
    prog.delete(); bb.delete();
    // 0 init: i = s1 = s2 = 0 (constant into three registers)
    b.clear(); b.konst(0); b.wreg(0, 3); b.wreg(1, 3); b.wreg(2, 3);
    prog.push_back(b.w); bb.push_back(BB_INIT);
    // 1 loop condition: i < n, leave the loop when false
    b.clear(); b.konst(n); b.fu(1, OP_LT, 0, 4); b.nxt(NXT_BRF, 7);
    prog.push_back(b.w); bb.push_back(BB_COND);
    // 2 load x[i] (address from register i)
    b.clear(); b.mem(0, 0); b.wreg(3, 2);
    prog.push_back(b.w); bb.push_back(BB_TEST);
    // 3 branch condition: x < t, go to the else body when false
    b.clear(); b.konst(t); b.fu(1, OP_LT, 3, 4); b.nxt(NXT_BRF, 5);
    prog.push_back(b.w); bb.push_back(BB_TEST);
    // 4 if body: s1 += x, then skip the else body
    b.clear(); b.fu(0, OP_ADD, 1, 3); b.wreg(1, 0); b.nxt(NXT_JUMP, 6);
    prog.push_back(b.w); bb.push_back(BB_IF);
    // 5 else body: s2 -= x (a subtraction, to exercise SUB)
    b.clear(); b.fu(0, OP_SUB, 2, 3); b.wreg(2, 0);
    prog.push_back(b.w); bb.push_back(BB_ELSE);
    // 6 increment: i = i + 1, back to the condition
    b.clear(); b.konst(1); b.fu(0, OP_ADD, 0, 4); b.wreg(0, 0); b.nxt(NXT_JUMP, 1);
    prog.push_back(b.w); bb.push_back(BB_INCR);
    // 7, 8 store s1 and s2, halt
    b.clear(); b.konst(out); b.mem(1, 4, 1);
    prog.push_back(b.w); bb.push_back(BB_END);
    b.clear(); b.konst(out + 1); b.mem(1, 4, 2); b.nxt(NXT_HALT);
    prog.push_back(b.w); bb.push_back(BB_END);
  endfunction

  // proc1 of the profiling example, straight-line code: y = x[0] + x[1] - x[2],
  // stored at out
  function automatic void proc1_program(int unsigned aw, int unsigned const_w, int out,
                                        output word_t prog [$], output bb_e bb [$]);
    cw_builder b = new(aw, const_w, 4);
    prog.delete(); bb.delete();
    b.clear(); b.konst(0); b.mem(0, 4); b.wreg(3, 2); b.wreg(1, 3);
    prog.push_back(b.w); bb.push_back(BB_P1);
    b.clear(); b.konst(1); b.mem(0, 4); b.wreg(3, 2); b.fu(0, OP_ADD, 1, 3); b.wreg(1, 0);
    prog.push_back(b.w); bb.push_back(BB_P1);
    b.clear(); b.konst(2); b.mem(0, 4); b.wreg(3, 2); b.fu(0, OP_ADD, 1, 3); b.wreg(1, 0);
    prog.push_back(b.w); bb.push_back(BB_P1);
    b.clear(); b.fu(0, OP_SUB, 1, 3); b.wreg(1, 0);
    prog.push_back(b.w); bb.push_back(BB_P1);
    b.clear(); b.konst(out); b.mem(1, 4, 1); b.nxt(NXT_HALT);
    prog.push_back(b.w); bb.push_back(BB_END);
  endfunction

  localparam int unsigned PROC1_CYCLES = 5;

  // proc2 of the profiling example: for (i = 0; i < n; i++) s += x[i]; s stored
  // at out
  function automatic void proc2_program(int unsigned aw, int unsigned const_w, int n,
                                        int out, output word_t prog [$],
                                        output bb_e bb [$]);
    cw_builder b = new(aw, const_w, 4);
    prog.delete(); bb.delete();
    b.clear(); b.konst(0); b.wreg(0, 3); b.wreg(1, 3);
    prog.push_back(b.w); bb.push_back(BB_P2_INIT);
    b.clear(); b.konst(n); b.fu(1, OP_LT, 0, 4); b.nxt(NXT_BRF, 5);
    prog.push_back(b.w); bb.push_back(BB_P2_COND);
    b.clear(); b.mem(0, 0); b.wreg(3, 2);
    prog.push_back(b.w); bb.push_back(BB_P2_BODY);
    b.clear(); b.fu(0, OP_ADD, 1, 3); b.wreg(1, 0);
    prog.push_back(b.w); bb.push_back(BB_P2_BODY);
    b.clear(); b.konst(1); b.fu(0, OP_ADD, 0, 4); b.wreg(0, 0); b.nxt(NXT_JUMP, 1);
    prog.push_back(b.w); bb.push_back(BB_P2_INCR);
    b.clear(); b.konst(out); b.mem(1, 4, 1); b.nxt(NXT_HALT);
    prog.push_back(b.w); bb.push_back(BB_END);
  endfunction

  function automatic int proc2_cycles(int n);
    return 1 + (n + 1) + 3 * n + 1;
  endfunction

  // states of one loop run: init, n+1 condition tests, 4 per iteration, 2 stores
  function automatic int loop_cycles(int n);
    return 1 + (n + 1) + 4 * n + 2;
  endfunction

endpackage
