// tb_nisc_processor_full: the processor with every parameter at its default
// (the data path of g = ((a*b) + (c*d)) / (e*f), 1024-word data memory,
// 256-word control memory) taken through complete runs of that program.
// The control memory is loaded with the nine-word program, a..f are written to
// the data memory through the host port, the run is started, and g and the
// cycle count (9 states) are checked against values computed here. Several
// operand sets are used, including negative operands and a zero divisor.
module tb_nisc_processor_full;
  import nisc_pkg::*;
  import nisc_tb_pkg::*;

  localparam int unsigned AW = 8, CONST_W = 16, NREG = 4, NFU = 2;
  localparam int unsigned CW_W = cw_width(AW, CONST_W, NREG, NFU);
  localparam int BASE = 512;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              start = 0, busy, done, prog_we = 0, h_we = 0;
  logic [31:0]       cycles, h_wdata = 0, h_rdata;
  logic [AW-1:0]     pc, prog_addr = 0;
  logic [CW_W-1:0]   prog_data = 0;
  logic [9:0]        h_addr = 0;
  logic [31:0]       reg_q [NREG];

  nisc_processor dut (
    .clk(clk), .rst(rst), .start(start), .busy(busy), .done(done),
    .cycles(cycles), .pc(pc), .prog_we(prog_we), .prog_addr(prog_addr),
    .prog_data(prog_data), .h_addr(h_addr), .h_wdata(h_wdata), .h_we(h_we),
    .h_rdata(h_rdata), .reg_q(reg_q));

  task automatic run(int a, int b, int c, int d, int e, int f);
    int vals [6] = '{a, b, c, d, e, f};
    int g;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); h_we = 1; h_addr = 10'(BASE + i); h_wdata = vals[i];
    end
    @(negedge clk); h_we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk); h_addr = 10'(BASE + 6); #1;
    g = (e * f == 0) ? -1 : (a * b + c * d) / (e * f);
    checks++;
    if (h_rdata != g) begin
      failures++;
      $display("FAIL: g=%0d expected %0d", $signed(h_rdata), g);
    end
    checks++;
    if (cycles != EXPR1_CYCLES) begin
      failures++;
      $display("FAIL: %0d cycles, expected %0d", cycles, EXPR1_CYCLES);
    end
  endtask

  initial begin
    word_t prog [$];
    repeat (3) @(negedge clk);
    rst = 0;
    expr1_program(AW, CONST_W, BASE, prog);
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = AW'(i); prog_data = prog[i][CW_W-1:0];
    end
    @(negedge clk); prog_we = 0;

    run(3, 4, 5, 6, 1, 2);
    run(-7, 9, 11, 13, -2, 3);
    run(100, 200, -300, 40, 7, -9);
    run(1, 2, 3, 4, 0, 9);
    repeat (16)
      run($urandom_range(60000) - 30000, $urandom_range(60000) - 30000,
          $urandom_range(60000) - 30000, $urandom_range(60000) - 30000,
          $urandom_range(2000) - 1000, $urandom_range(2000) - 1000);

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
