// tb_profile_example: the two-level profiling example run on the processor.
//
// Three procedures are called as in the example: proc1 (straight-line code)
// 5 times, proc2 (a 10-iteration loop) 4 times and proc3 (a 20-iteration loop
// around an if/else taken in 40 % of the iterations) 3 times. Each call is one
// run of the processor, configured as the loop data path (two units, ADD/SUB
// and a comparator whose result is the branch status, four registers), with the
// procedure's control words loaded before the call. The testbench counts the
// entries into each basic block and checks them against the block iteration
// totals of the example: BB0 5, BB1 4, BB3 40, BB4 40, BB5 3, BB7 60, BB8 24,
// BB9 36, BB10 60. A loop condition test is evaluated once more than the loop
// body per call (the final, failing test), so BB2 and BB6 are checked as
// 4 x 11 = 44 and 3 x 21 = 63 where the example counts 40 and 60. Results and
// the cycle count of every call are checked too.
module tb_profile_example;
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

  logic              start = 0, busy, done, prog_we = 0, h_we = 0;
  logic [31:0]       cycles, h_wdata = 0, h_rdata;
  logic [AW-1:0]     pc, prog_addr = 0;
  logic [CW_W-1:0]   prog_data = 0;
  logic [9:0]        h_addr = 0;
  logic [31:0]       reg_q [NREG];

  nisc_processor #(
    .FU_OPS(LOOP_FU_OPS), .FU_A_CONN(LOOP_FU_A_CONN), .FU_B_CONN(LOOP_FU_B_CONN),
    .REG_CONN(LOOP_REG_CONN), .MEM_ADDR_CONN(LOOP_MEM_ADDR_CONN),
    .MEM_DATA_CONN(LOOP_MEM_DATA_CONN), .STATUS_FU(LOOP_STATUS_FU)
  ) dut (
    .clk(clk), .rst(rst), .start(start), .busy(busy), .done(done),
    .cycles(cycles), .pc(pc), .prog_we(prog_we), .prog_addr(prog_addr),
    .prog_data(prog_data), .h_addr(h_addr), .h_wdata(h_wdata), .h_we(h_we),
    .h_rdata(h_rdata), .reg_q(reg_q));

  // block entries: a state of block B whose predecessor state was not in B, or
  // the first state of a run
  bb_e cur_bb [$];
  int  entries [int];
  int  prev_bb = -1;

  always @(posedge clk) if (!rst) begin
    if (busy) begin
      automatic int b = int'(cur_bb[pc]);
      if (b != prev_bb) entries[b]++;
      prev_bb = b;
    end else begin
      prev_bb = -1;
    end
  end

  task automatic load_prog(word_t prog [$]);
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = AW'(i); prog_data = prog[i][CW_W-1:0];
    end
    @(negedge clk); prog_we = 0;
  endtask

  task automatic write_data(int x [$]);
    foreach (x[i]) begin
      @(negedge clk); h_we = 1; h_addr = 10'(i); h_wdata = x[i];
    end
    @(negedge clk); h_we = 0;
  endtask

  task automatic call();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
  endtask

  task automatic expect_mem(int addr, int value, string what);
    h_addr = 10'(addr); #1;
    check(h_rdata == value, $sformatf("%s = %0d expected %0d", what, $signed(h_rdata), value));
    @(negedge clk);
  endtask

  initial begin
    word_t prog [$];
    int x [$];
    int total_cycles = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // proc1, 5 calls
    proc1_program(AW, CONST_W, 100, prog, cur_bb);
    load_prog(prog);
    for (int c = 0; c < 5; c++) begin
      x.delete();
      for (int i = 0; i < 3; i++) x.push_back($urandom_range(1000));
      write_data(x);
      call();
      total_cycles += cycles;
      check(cycles == PROC1_CYCLES, $sformatf("proc1 cycles %0d", cycles));
      expect_mem(100, x[0] + x[1] - x[2], "proc1 y");
    end

    // proc2, 4 calls
    proc2_program(AW, CONST_W, 10, 100, prog, cur_bb);
    load_prog(prog);
    for (int c = 0; c < 4; c++) begin
      int s;
      x.delete(); s = 0;
      for (int i = 0; i < 10; i++) begin
        x.push_back($urandom_range(1000) - 500);
        s += x[i];
      end
      write_data(x);
      call();
      total_cycles += cycles;
      check(cycles == proc2_cycles(10), $sformatf("proc2 cycles %0d", cycles));
      expect_mem(100, s, "proc2 s");
    end

    // proc3, 3 calls, 8 of 20 iterations take the if body
    loop_program(AW, CONST_W, 20, 50, 100, prog, cur_bb);
    load_prog(prog);
    for (int c = 0; c < 3; c++) begin
      int s1, s2;
      x.delete(); s1 = 0; s2 = 0;
      for (int i = 0; i < 20; i++) begin
        x.push_back(((i * 3 + c) % 20) < 8 ? $urandom_range(49) : 50 + $urandom_range(500));
        if (x[i] < 50) s1 += x[i]; else s2 -= x[i];
      end
      write_data(x);
      call();
      total_cycles += cycles;
      check(cycles == loop_cycles(20), $sformatf("proc3 cycles %0d", cycles));
      expect_mem(100, s1, "proc3 s1");
      expect_mem(101, s2, "proc3 s2");
    end

    // block iteration totals
    check(entries[BB_P1] == 5,       $sformatf("BB0 %0d", entries[BB_P1]));
    check(entries[BB_P2_INIT] == 4,  $sformatf("BB1 %0d", entries[BB_P2_INIT]));
    check(entries[BB_P2_COND] == 44, $sformatf("BB2 %0d", entries[BB_P2_COND]));
    check(entries[BB_P2_BODY] == 40, $sformatf("BB3 %0d", entries[BB_P2_BODY]));
    check(entries[BB_P2_INCR] == 40, $sformatf("BB4 %0d", entries[BB_P2_INCR]));
    check(entries[BB_INIT] == 3,     $sformatf("BB5 %0d", entries[BB_INIT]));
    check(entries[BB_COND] == 63,    $sformatf("BB6 %0d", entries[BB_COND]));
    check(entries[BB_TEST] == 60,    $sformatf("BB7 %0d", entries[BB_TEST]));
    check(entries[BB_IF] == 24,      $sformatf("BB8 %0d", entries[BB_IF]));
    check(entries[BB_ELSE] == 36,    $sformatf("BB9 %0d", entries[BB_ELSE]));
    check(entries[BB_INCR] == 60,    $sformatf("BB10 %0d", entries[BB_INCR]));
    check(total_cycles == 5 * PROC1_CYCLES + 4 * proc2_cycles(10) + 3 * loop_cycles(20),
          $sformatf("total cycles %0d", total_cycles));
    $display("profile: BB0..BB10 = %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d, %0d cycles",
             entries[0], entries[1], entries[2], entries[3], entries[4], entries[5],
             entries[6], entries[7], entries[8], entries[9], entries[10], total_cycles);

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
