// tb_nisc_datapath: the default data path (the worked example's two units and
// four registers) driven directly with the control words of the program for
// g = ((a*b) + (c*d)) / (e*f). The testbench plays the data memory. After every
// state the register contents are compared with the operand-to-register
// assignment of the schedule (R_1 = {c, e, res}, R_2 = {d, f, T6},
// R_3 = {a, T4, T3}, R_4 = {b, T5}); the store of g must present g on the
// memory write port at the right address with write enable. Writes must be
// suppressed while active is low.
module tb_nisc_datapath;
  import nisc_pkg::*;
  import nisc_tb_pkg::*;

  localparam int unsigned AW = 8, CONST_W = 16, NREG = 4, NFU = 2;
  localparam int unsigned CW_W = cw_width(AW, CONST_W, NREG, NFU);

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [CW_W-1:0] cw = 0;
  logic            active = 0, status, mem_we;
  logic [31:0]     mem_addr, mem_wdata, mem_rdata;
  logic [31:0]     reg_q [NREG];
  logic [31:0]     mem [64];

  nisc_datapath dut (.clk(clk), .rst(rst), .cw(cw), .active(active), .status(status),
    .mem_addr(mem_addr), .mem_wdata(mem_wdata), .mem_we(mem_we), .mem_rdata(mem_rdata),
    .reg_q(reg_q));

  assign mem_rdata = mem[mem_addr[5:0]];

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %0d expected %0d", what, $signed(got), $signed(exp));
    end
  endtask

  initial begin
    word_t prog [$];
    repeat (2) @(negedge clk);
    rst = 0;
    expr1_program(AW, CONST_W, 8, prog);
    for (int t = 0; t < 100; t++) begin
      int a, b, c, d, e, f, t4, t5, t3, t6, g;
      a = $urandom_range(2000) - 1000; b = $urandom_range(2000) - 1000;
      c = $urandom_range(2000) - 1000; d = $urandom_range(2000) - 1000;
      e = $urandom_range(200) - 100;   f = $urandom_range(200) - 100;
      if (t == 0) e = 0;
      mem[8] = a; mem[9] = b; mem[10] = c; mem[11] = d; mem[12] = e; mem[13] = f;
      t5 = a * b; t4 = c * d; t3 = e * f; t6 = t5 + t4;
      g = (t3 == 0) ? -1 : t6 / t3;
      // inactive: a full program word must change nothing
      active = 0; cw = prog[4][CW_W-1:0];
      begin
        logic [31:0] prev_q [NREG];
        prev_q = reg_q;
        #1 chk(32'(mem_we), 0, "no store while inactive");
        @(negedge clk);
        for (int r = 0; r < NREG; r++) chk(reg_q[r], prev_q[r], "register kept while inactive");
      end
      active = 1;
      foreach (prog[i]) begin
        cw = prog[i][CW_W-1:0];
        #1;
        if (i == 8) begin
          chk(32'(mem_we), 1, "store enable");
          chk(mem_addr, 14, "store address");
          chk(mem_wdata, g, "stored g");
        end else begin
          chk(32'(mem_we), 0, "no store");
        end
        @(negedge clk);
        case (i)
          0: chk(reg_q[2], a, "R_3 = a");
          1: chk(reg_q[3], b, "R_4 = b");
          2: chk(reg_q[0], c, "R_1 = c");
          3: chk(reg_q[1], d, "R_2 = d");
          4: begin chk(reg_q[2], t4, "R_3 = T4"); chk(reg_q[3], t5, "R_4 = T5");
                   chk(reg_q[0], e, "R_1 = e"); end
          5: chk(reg_q[1], f, "R_2 = f");
          6: begin chk(reg_q[1], t6, "R_2 = T6"); chk(reg_q[2], t3, "R_3 = T3"); end
          7: chk(reg_q[0], g, "R_1 = res");
          default: ;
        endcase
      end
      active = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
