// tb_src_mux: a 6-source multiplexer with four sources connected
// (CONN = 6'b101101) must pass the selected connected source and give 0 for an
// unconnected or out-of-range select.
module tb_src_mux;
  import nisc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam logic [5:0] CONN = 6'b101101;
  logic [15:0]      src [6];
  logic [SEL_W-1:0] sel;
  logic [15:0]      y;

  src_mux #(.DATA_W(16), .N(6), .CONN(CONN)) dut (.src(src), .sel(sel), .y(y));

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 6; i++) src[i] = 16'($urandom);
      for (int s = 0; s < 8; s++) begin
        logic [15:0] e;
        sel = SEL_W'(s);
        #1;
        e = (s < 6 && CONN[s]) ? src[s] : 16'd0;
        checks++;
        if (y !== e) begin
          failures++;
          $display("FAIL: sel=%0d y=%h expected %h", s, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
