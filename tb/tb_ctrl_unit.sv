// tb_ctrl_unit: the control unit runs random control-memory programs under a
// random status bit. A model of the next-address rules (next, jump, branch on
// status true / false, halt) predicts the address of every state; each cycle the
// testbench checks pc and the control word handed to the data path, and at the
// end of each run that done rose with the halting word and that cycles equals
// the number of states executed. A run that does not halt within 300 cycles is
// ended by reset.
module tb_ctrl_unit;
  import nisc_pkg::*;

  localparam int unsigned AW = 4, CW_W = 16;

  int checks = 0, failures = 0, runs = 0, halts = 0, taken = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic            start = 0, status = 0, prog_we = 0, active, done;
  logic [AW-1:0]   prog_addr = 0, pc;
  logic [CW_W-1:0] prog_data = 0, cw;
  logic [31:0]     cycles;
  logic [CW_W-1:0] model [16];

  ctrl_unit #(.AW(AW), .CW_W(CW_W)) dut (.clk(clk), .rst(rst), .start(start), .status(status),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data), .cw(cw),
    .active(active), .pc(pc), .done(done), .cycles(cycles));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int p = 0; p < 40; p++) begin
      // program
      for (int i = 0; i < 16; i++) begin
        int unsigned r;
        nxt_e m;
        r = $urandom_range(15);
        m = r < 6 ? NXT_SEQ : r < 8 ? NXT_JUMP : r < 11 ? NXT_BRT : r < 14 ? NXT_BRF : NXT_HALT;
        model[i] = {9'($urandom), AW'($urandom), m};
        @(negedge clk); prog_we = 1; prog_addr = AW'(i); prog_data = model[i];
      end
      @(negedge clk); prog_we = 0; start = 1;
      @(negedge clk); start = 0;
      begin
        int unsigned mpc, n;
        bit halted;
        mpc = 0; n = 0; halted = 0;
        runs++;
        while (!halted && n < 300) begin
          nxt_e m;
          logic [AW-1:0] tgt;
          status = 1'($urandom);
          #1;
          chk(active, "not active during run");
          chk(pc == AW'(mpc), $sformatf("pc %0d expected %0d", pc, mpc));
          chk(cw == model[mpc], "control word");
          m = nxt_e'(model[mpc][2:0]);
          tgt = model[mpc][3 +: AW];
          n++;
          case (m)
            NXT_JUMP: mpc = tgt;
            NXT_BRT:  begin if (status) begin mpc = tgt; taken++; end else mpc = (mpc + 1) % 16; end
            NXT_BRF:  begin if (!status) begin mpc = tgt; taken++; end else mpc = (mpc + 1) % 16; end
            NXT_HALT: halted = 1;
            default:  mpc = (mpc + 1) % 16;
          endcase
          @(negedge clk);
        end
        if (halted) begin
          halts++;
          #1;
          chk(done && !active, "done after halt");
          chk(cycles == n, $sformatf("cycles %0d expected %0d", cycles, n));
          if (active) begin
            rst = 1; @(negedge clk); rst = 0;
          end
        end else begin
          rst = 1; @(negedge clk); rst = 0;
          chk(!active && !done && cycles == 0, "reset ends run");
        end
      end
    end
    chk(halts > 5 && taken > 20, $sformatf("too few halts (%0d) or taken branches (%0d)", halts, taken));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
