// tb_dmem_wrap: random traffic on both ports of a 64-word data memory against
// a model: writes from either port are read back from either port in the next
// cycle, reads are combinational, processor addresses wrap modulo the depth,
// and the processor port wins a same-word write collision.
module tb_dmem_wrap;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] addr = 0, wdata = 0, rdata, h_wdata = 0, h_rdata;
  logic        we = 0, h_we = 0;
  logic [5:0]  h_addr = 0;
  logic [31:0] model [64];

  dmem_wrap #(.DATA_W(32), .DEPTH(64)) dut (.clk(clk), .addr(addr), .wdata(wdata), .we(we),
    .rdata(rdata), .h_addr(h_addr), .h_wdata(h_wdata), .h_we(h_we), .h_rdata(h_rdata));

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    // initialise through the host port
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); h_we = 1; h_addr = 6'(i); h_wdata = 32'(i * 3 + 1); model[i] = 32'(i * 3 + 1);
    end
    @(negedge clk); h_we = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we = 1'($urandom); addr = $urandom; wdata = $urandom;
      h_we = 1'($urandom); h_addr = 6'($urandom); h_wdata = $urandom;
      if (t % 10 == 0) h_addr = addr[5:0];
      #1;
      chk(rdata, model[addr[5:0]], "processor read");
      chk(h_rdata, model[h_addr], "host read");
      @(posedge clk);
      if (h_we) model[h_addr] = h_wdata;
      if (we)   model[addr[5:0]] = wdata;
    end
    @(negedge clk); we = 0; h_we = 0;
    for (int i = 0; i < 64; i++) begin
      h_addr = 6'(i); addr = 32'(i + 64 * 5); #1;
      chk(h_rdata, model[i], "final host read");
      chk(rdata, model[i], "final processor read");
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
