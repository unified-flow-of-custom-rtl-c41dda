// tb_func_unit: checks the functional unit against a reference model.
// u_all implements every operation and is driven with random and corner
// operands for each operation; u_am is an ADD/MUL unit, as in the worked
// example, and must give 0 for the operations it does not contain.
module tb_func_unit;
  import nisc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  op_e         op;
  logic [31:0] a, b, y_all, y_am;

  func_unit #(.DATA_W(32), .OPS(M_ALL))         u_all (.op(op), .a(a), .b(b), .y(y_all));
  func_unit #(.DATA_W(32), .OPS(M_ADD | M_MUL)) u_am  (.op(op), .a(a), .b(b), .y(y_am));

  function automatic logic [31:0] ref_y(op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      OP_ASSIGN: return x;
      OP_ADD:    return x + z;
      OP_SUB:    return x - z;
      OP_MUL:    return 32'(longint'($signed(x)) * longint'($signed(z)));
      OP_DIV: begin
        longint q;
        if (z == 0) return 32'hFFFF_FFFF;
        q = longint'($signed(x)) / longint'($signed(z));
        return q[31:0];
      end
      OP_SHL:    return x << z[4:0];
      OP_SHR:    return x >> z[4:0];
      OP_AND:    return x & z;
      OP_OR:     return x | z;
      OP_XOR:    return x ^ z;
      OP_NOT:    return ~x;
      OP_LT:     return {31'd0, $signed(x) < $signed(z)};
      OP_EQ:     return {31'd0, x == z};
      default:   return 0;
    endcase
  endfunction

  task automatic one(op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] e;
    op = o; a = x; b = z;
    #1;
    e = ref_y(o, x, z);
    checks++;
    if (y_all !== e) begin
      failures++;
      $display("FAIL: op %s a=%h b=%h y=%h expected %h", o.name(), x, z, y_all, e);
    end
    checks++;
    if (y_am !== ((o == OP_ADD || o == OP_MUL) ? e : 32'd0)) begin
      failures++;
      $display("FAIL: ADD/MUL unit op %s y=%h", o.name(), y_am);
    end
  endtask

  initial begin
    for (int k = 0; k < N_OPS; k++) begin
      automatic op_e o = op_e'(k);
      one(o, 0, 0);
      one(o, 32'h8000_0000, 32'hFFFF_FFFF);
      one(o, 7, 7);
      one(o, 32'hFFFF_FFF9, 2);          // -7, 2
      one(o, 12345, 0);
      for (int i = 0; i < 200; i++) one(o, $urandom, $urandom);
      for (int i = 0; i < 50; i++) one(o, $urandom_range(100), $urandom_range(40));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
