// tb_nisc_processor: end-to-end test of the custom processor.
//
// Two processors are built side by side. u_expr has every parameter at its
// default, the data path of g = ((a*b) + (c*d)) / (e*f); it runs that program
// on random operand sets (plus a division by zero) and each result is checked
// against the same expression evaluated here, as is the cycle count of every
// run (9 states: 4 loads, S1, the load of f, S2, S3, the store).
// u_loop is configured as the data path of a counted loop around an if/else
// (see nisc_tb_pkg) and runs it three times on 20 elements of which 8 take the
// if branch, the profiling example's 40 % / 60 % split. The testbench profiles
// the runs per basic block and checks the block counts, the sums and the cycle
// count. It also counts how often each mechanism of the processor occurred
// (memory load and store, constant operand, register-input multiplexer
// switching, unit operation switching, branch taken and not taken, jump, halt)
// and fails for any that never did.
module tb_nisc_processor;
  import nisc_pkg::*;
  import nisc_tb_pkg::*;

  localparam int unsigned AW = 8, CONST_W = 16, NREG = 4, NFU = 2;
  localparam int unsigned CW_W = cw_width(AW, CONST_W, NREG, NFU);

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ expression DUT
  logic              e_start = 0, e_busy, e_done, e_prog_we = 0, e_h_we = 0;
  logic [31:0]       e_cycles, e_h_wdata = 0, e_h_rdata;
  logic [AW-1:0]     e_pc, e_prog_addr = 0;
  logic [CW_W-1:0]   e_prog_data = 0;
  logic [9:0]        e_h_addr = 0;
  logic [31:0]       e_reg [NREG];

  nisc_processor u_expr (
    .clk(clk), .rst(rst), .start(e_start), .busy(e_busy), .done(e_done),
    .cycles(e_cycles), .pc(e_pc), .prog_we(e_prog_we), .prog_addr(e_prog_addr),
    .prog_data(e_prog_data), .h_addr(e_h_addr), .h_wdata(e_h_wdata), .h_we(e_h_we),
    .h_rdata(e_h_rdata), .reg_q(e_reg));

  // ------------------------------------------------------------------ loop DUT
  logic              l_start = 0, l_busy, l_done, l_prog_we = 0, l_h_we = 0;
  logic [31:0]       l_cycles, l_h_wdata = 0, l_h_rdata;
  logic [AW-1:0]     l_pc, l_prog_addr = 0;
  logic [CW_W-1:0]   l_prog_data = 0;
  logic [9:0]        l_h_addr = 0;
  logic [31:0]       l_reg [NREG];

  nisc_processor #(
    .FU_OPS(LOOP_FU_OPS), .FU_A_CONN(LOOP_FU_A_CONN), .FU_B_CONN(LOOP_FU_B_CONN),
    .REG_CONN(LOOP_REG_CONN), .MEM_ADDR_CONN(LOOP_MEM_ADDR_CONN),
    .MEM_DATA_CONN(LOOP_MEM_DATA_CONN), .STATUS_FU(LOOP_STATUS_FU)
  ) u_loop (
    .clk(clk), .rst(rst), .start(l_start), .busy(l_busy), .done(l_done),
    .cycles(l_cycles), .pc(l_pc), .prog_we(l_prog_we), .prog_addr(l_prog_addr),
    .prog_data(l_prog_data), .h_addr(l_h_addr), .h_wdata(l_h_wdata), .h_we(l_h_we),
    .h_rdata(l_h_rdata), .reg_q(l_reg));

  // ------------------------------------------------- mechanism and BB counters
  int n_load, n_store, n_const, n_r3_fu1, n_r3_fu2, n_fu2_mul, n_fu2_div;
  int n_br_taken, n_br_not, n_jump, n_halt;
  int bb_count [int];
  bb_e loop_bb [$];

  function automatic int fld(logic [CW_W-1:0] w, int unsigned lsb, int unsigned width);
    int v = 0;
    for (int unsigned i = 0; i < width; i++) v[i] = w[lsb + i];
    return v;
  endfunction

  always @(posedge clk) if (!rst) begin
    if (u_expr.busy) begin
      automatic logic [CW_W-1:0] w = u_expr.cw;
      automatic int unsigned r3 = cw_reg_lsb(AW, CONST_W, 2);
      automatic int unsigned f2 = cw_fu_lsb(AW, CONST_W, NREG, 1);
      for (int r = 0; r < NREG; r++)
        if (w[cw_reg_lsb(AW, CONST_W, r)] && fld(w, cw_reg_lsb(AW, CONST_W, r) + 1, SEL_W) == 2)
          n_load++;
      if (w[cw_mem_lsb(AW, CONST_W)]) n_store++;
      if (w[r3] && fld(w, r3 + 1, SEL_W) == 0) n_r3_fu1++;
      if (w[r3] && fld(w, r3 + 1, SEL_W) == 1) n_r3_fu2++;
      if (w[cw_reg_lsb(AW, CONST_W, 0)] && fld(w, f2, OP_W) == OP_DIV) n_fu2_div++;
      if (w[cw_reg_lsb(AW, CONST_W, 3)] && fld(w, f2, OP_W) == OP_MUL) n_fu2_mul++;
      if (fld(w, 0, NXT_W) == NXT_HALT) n_halt++;
    end
    if (u_loop.busy) begin
      automatic logic [CW_W-1:0] w = u_loop.cw;
      automatic int m = fld(w, 0, NXT_W);
      automatic int tgt = fld(w, NXT_W, AW);
      bb_count[int'(loop_bb[l_pc])]++;
      if (m == NXT_BRF || m == NXT_BRT) begin
        if (u_loop.u_ctrl.pc_next == AW'(tgt)) n_br_taken++; else n_br_not++;
      end
      if (m == NXT_JUMP) n_jump++;
      if (m == NXT_HALT) n_halt++;
      for (int r = 0; r < 3; r++)
        if (w[cw_reg_lsb(AW, CONST_W, r)] && fld(w, cw_reg_lsb(AW, CONST_W, r) + 1, SEL_W) == 3)
          n_const++;
    end
  end

  // ----------------------------------------------------------------- helpers
  task automatic run_expr(int a, int b, int c, int d, int e, int f);
    int vals [6] = '{a, b, c, d, e, f};
    int t5, t4, t3, t6, g;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); e_h_we = 1; e_h_addr = 10'(16 + i); e_h_wdata = vals[i];
    end
    @(negedge clk); e_h_we = 0; e_start = 1;
    @(negedge clk); e_start = 0;
    wait (e_done);
    @(negedge clk); e_h_addr = 10'(16 + 6);
    #1;
    t5 = a * b; t4 = c * d; t3 = e * f; t6 = t5 + t4;
    g  = (t3 == 0) ? -1 : t6 / t3;
    check(e_h_rdata == g, $sformatf("expr g=%0d expected %0d", $signed(e_h_rdata), g));
    check(e_cycles == EXPR1_CYCLES, $sformatf("expr cycles %0d expected %0d", e_cycles, EXPR1_CYCLES));
  endtask

  task automatic run_loop(int n, int t, int x [$]);
    int s1 = 0, s2 = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk); l_h_we = 1; l_h_addr = 10'(i); l_h_wdata = x[i];
      if (x[i] < t) s1 += x[i]; else s2 -= x[i];
    end
    @(negedge clk); l_h_we = 0; l_start = 1;
    @(negedge clk); l_start = 0;
    wait (l_done);
    @(negedge clk); l_h_addr = 10'd100; #1;
    check(l_h_rdata == s1, $sformatf("loop s1=%0d expected %0d", $signed(l_h_rdata), s1));
    @(negedge clk); l_h_addr = 10'd101; #1;
    check(l_h_rdata == s2, $sformatf("loop s2=%0d expected %0d", $signed(l_h_rdata), s2));
    check(l_cycles == loop_cycles(n), $sformatf("loop cycles %0d expected %0d", l_cycles, loop_cycles(n)));
  endtask

  // --------------------------------------------------------------- stimulus
  initial begin
    word_t prog [$];
    int x [$];
    repeat (3) @(negedge clk);
    rst = 0;

    expr1_program(AW, CONST_W, 16, prog);
    foreach (prog[i]) begin
      @(negedge clk); e_prog_we = 1; e_prog_addr = AW'(i); e_prog_data = prog[i][CW_W-1:0];
    end
    @(negedge clk); e_prog_we = 0;

    loop_program(AW, CONST_W, 20, 50, 100, prog, loop_bb);
    foreach (prog[i]) begin
      @(negedge clk); l_prog_we = 1; l_prog_addr = AW'(i); l_prog_data = prog[i][CW_W-1:0];
    end
    @(negedge clk); l_prog_we = 0;

    // expression (1)
    run_expr(3, 4, 5, 6, 1, 2);                 // (12 + 30) / 2 = 21
    run_expr(-7, 9, 11, 13, -2, 3);             // (-63 + 143) / -6 = -13
    run_expr(1, 1, 1, 1, 0, 5);                 // division by zero
    repeat (20)
      run_expr($urandom_range(2000) - 1000, $urandom_range(2000) - 1000,
               $urandom_range(2000) - 1000, $urandom_range(2000) - 1000,
               $urandom_range(200) - 100,  $urandom_range(200) - 100);

    // loop, three calls, 8 of 20 elements below the threshold
    for (int call = 0; call < 3; call++) begin
      x.delete();
      for (int i = 0; i < 20; i++)
        x.push_back(((i * 7 + call) % 20) < 8 ? $urandom_range(49) : 50 + $urandom_range(200));
      run_loop(20, 50, x);
    end

    // block profile of the three calls (states executed per basic block)
    check(bb_count[BB_INIT] == 3,       $sformatf("BB init %0d", bb_count[BB_INIT]));
    check(bb_count[BB_COND] == 3 * 21,  $sformatf("BB cond %0d", bb_count[BB_COND]));
    check(bb_count[BB_TEST] == 3 * 20 * 2, $sformatf("BB test %0d", bb_count[BB_TEST]));
    check(bb_count[BB_IF]   == 3 * 8,   $sformatf("BB if %0d", bb_count[BB_IF]));
    check(bb_count[BB_ELSE] == 3 * 12,  $sformatf("BB else %0d", bb_count[BB_ELSE]));
    check(bb_count[BB_INCR] == 3 * 20,  $sformatf("BB incr %0d", bb_count[BB_INCR]));

    // every mechanism must have occurred
    $display("mechanisms: load=%0d store=%0d const=%0d r3<-fu1=%0d r3<-fu2=%0d fu2 mul=%0d div=%0d",
             n_load, n_store, n_const, n_r3_fu1, n_r3_fu2, n_fu2_mul, n_fu2_div);
    $display("            branch taken=%0d not taken=%0d jump=%0d halt=%0d",
             n_br_taken, n_br_not, n_jump, n_halt);
    check(n_load > 0, "no memory load");
    check(n_store > 0, "no memory store");
    check(n_const > 0, "no constant written");
    check(n_r3_fu1 > 0 && n_r3_fu2 > 0, "R_3 input multiplexer did not switch");
    check(n_fu2_mul > 0 && n_fu2_div > 0, "FU_2 did not switch between MUL and DIV");
    check(n_br_taken > 0, "no branch taken");
    check(n_br_not > 0, "no branch not taken");
    check(n_jump > 0, "no jump");
    check(n_halt == 23 + 3, $sformatf("halts %0d", n_halt));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
