// tb_reg_file: random writes and reads of an 8-word register file and of a
// single register (DEPTH = 1, as used in the data path) against a model;
// checks that reset clears the words, that a write is visible in the next
// cycle and that a cycle without write enable keeps the contents.
module tb_reg_file;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        we = 0, we1 = 0;
  logic [2:0]  waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, wdata1 = 0, rdata, rdata1;
  logic [31:0] model [8];
  logic [31:0] model1;

  reg_file #(.DATA_W(32), .DEPTH(8)) dut  (.clk(clk), .rst(rst), .we(we), .waddr(waddr),
    .wdata(wdata), .raddr(raddr), .rdata(rdata));
  reg_file #(.DATA_W(32), .DEPTH(1)) dut1 (.clk(clk), .rst(rst), .we(we1), .waddr(1'b0),
    .wdata(wdata1), .raddr(1'b0), .rdata(rdata1));

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 8; i++) begin
      raddr = 3'(i); #1; chk(rdata, 0, "after reset");
      model[i] = 0;
    end
    #1 chk(rdata1, 0, "single after reset");
    model1 = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 3'($urandom); wdata = $urandom;
      we1 = 1'($urandom); wdata1 = $urandom;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      if (we1) model1 = wdata1;
      @(negedge clk);
      we = 0; we1 = 0;
      raddr = 3'($urandom); #1;
      chk(rdata, model[raddr], "read");
      chk(rdata1, model1, "single read");
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
