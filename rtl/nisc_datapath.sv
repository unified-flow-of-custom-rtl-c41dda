// nisc_datapath: the final data path of the custom processor.
//
// The data path is built for one program. Its registers hold operands whose
// lifetimes do not overlap, its functional units each implement the combination
// of operations that was bound to them, and a multiplexer sits wherever more
// than one connection reaches a port. All of that is set here by parameters, so
// one module describes every generated data path:
//   FU_OPS        operation set of each functional unit (nisc_pkg masks)
//   FU_A_CONN,    which sources reach input A / B of each unit; the source
//   FU_B_CONN     space is registers 0..NREG-1, then the control-word constant
//   REG_CONN      which sources reach each register's input; the source space is
//                 the unit outputs 0..NFU-1, then memory read data, then the
//                 constant
//   MEM_ADDR_CONN, MEM_DATA_CONN   sources of the data-memory address and
//                 write data, in the register/constant space
//   STATUS_FU     the unit whose result (non-zero) is the status bit
// A port with one connection is a wire; one with several gets a src_mux.
//
// The defaults are the worked example g = ((a*b) + (c*d)) / (e*f): two units,
// FU_1 = ADD/MUL and FU_2 = MUL/DIV, and four registers, R_1 = {res, e, c},
// R_2 = {T6, f, d}, R_3 = {T3, T4, a}, R_4 = {T5, b} (registers 0..3 here).
// The connections are those the three-state schedule needs:
//   S1: FU_1: T4 = R_1 * R_2 -> R_3    FU_2: T5 = R_3 * R_4 -> R_4
//   S2: FU_1: T6 = R_4 + R_3 -> R_2    FU_2: T3 = R_1 * R_2 -> R_3
//   S3:                                FU_2: res = R_2 / R_3 -> R_1
// giving 2-input multiplexers on the FU_1 inputs, 3-input ones on the FU_2
// inputs and a multiplexer choosing FU_1 or FU_2 for R_3. The example does not
// say how a..f arrive or where res goes; here every register can also be loaded
// from the data memory, and R_1 can be stored to it at an address taken from the
// constant (the memory wrapper is part of every generated processor), so the
// register inputs carry one more connection than in the example.
//
// Interface: cw is the current control word (layout in nisc_pkg), active gates
// all writes. The data-memory port is mem_addr/mem_wdata/mem_we/mem_rdata.
// reg_q shows the register contents. Timing: one state per clock; operands are
// read, computed and written back in the same cycle (combinational units).
// Registers reset to 0.
module nisc_datapath
  import nisc_pkg::*;
#(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned NREG    = 4,
  parameter int unsigned NFU     = 2,
  parameter int unsigned AW      = 8,
  parameter int unsigned CONST_W = 16,
  parameter logic [NFU-1:0][N_OPS-1:0] FU_OPS    = {M_MUL | M_DIV, M_ADD | M_MUL},
  parameter logic [NFU-1:0][NREG:0]    FU_A_CONN = {5'b00111, 5'b01001},
  parameter logic [NFU-1:0][NREG:0]    FU_B_CONN = {5'b01110, 5'b00110},
  parameter logic [NREG-1:0][NFU+1:0]  REG_CONN  = {4'b0110, 4'b0111, 4'b0101, 4'b0110},
  parameter logic [NREG:0]             MEM_ADDR_CONN = 5'b10000,
  parameter logic [NREG:0]             MEM_DATA_CONN = 5'b00001,
  parameter int unsigned               STATUS_FU     = 0,
  localparam int unsigned CW_W = cw_width(AW, CONST_W, NREG, NFU)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [CW_W-1:0]   cw,
  input  logic              active,
  output logic              status,
  // data memory
  output logic [DATA_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  output logic              mem_we,
  input  logic [DATA_W-1:0] mem_rdata,
  // observation
  output logic [DATA_W-1:0] reg_q [NREG]
);

  localparam int unsigned MEM_LSB = cw_mem_lsb(AW, CONST_W);

  // the select fields must be able to name every source
  if (NREG + 1 > (1 << SEL_W) || NFU + 2 > (1 << SEL_W) || STATUS_FU >= NFU) begin : g_bad_shape
    $error("nisc_datapath: NREG=%0d / NFU=%0d / STATUS_FU=%0d do not fit the select fields",
           NREG, NFU, STATUS_FU);
  end

  // constant from the control word, sign-extended
  logic [DATA_W-1:0] konst;
  assign konst = DATA_W'($signed(cw[cw_const_lsb(AW) +: CONST_W]));

  // source spaces
  logic [DATA_W-1:0] opnd_src [NREG+1];   // registers, constant
  logic [DATA_W-1:0] fu_y     [NFU];
  logic [DATA_W-1:0] wr_src   [NFU+2];    // unit outputs, memory, constant

  for (genvar r = 0; r < NREG; r++) begin : g_opnd
    assign opnd_src[r] = reg_q[r];
  end
  assign opnd_src[NREG] = konst;

  for (genvar f = 0; f < NFU; f++) begin : g_wr
    assign wr_src[f] = fu_y[f];
  end
  assign wr_src[NFU]   = mem_rdata;
  assign wr_src[NFU+1] = konst;

  // functional units with their input multiplexers
  for (genvar f = 0; f < NFU; f++) begin : g_fu
    localparam int unsigned LSB = cw_fu_lsb(AW, CONST_W, NREG, f);
    op_e               op;
    logic [SEL_W-1:0]  sel_a, sel_b;
    logic [DATA_W-1:0] a, b;

    assign op    = op_e'(cw[LSB +: OP_W]);
    assign sel_a = cw[LSB + OP_W +: SEL_W];
    assign sel_b = cw[LSB + OP_W + SEL_W +: SEL_W];

    src_mux #(.DATA_W(DATA_W), .N(NREG + 1), .CONN(FU_A_CONN[f])) u_mux_a (
      .src(opnd_src), .sel(sel_a), .y(a));
    src_mux #(.DATA_W(DATA_W), .N(NREG + 1), .CONN(FU_B_CONN[f])) u_mux_b (
      .src(opnd_src), .sel(sel_b), .y(b));

    func_unit #(.DATA_W(DATA_W), .OPS(FU_OPS[f])) u_fu (
      .op(op), .a(a), .b(b), .y(fu_y[f]));
  end

  // registers with their input multiplexers
  for (genvar r = 0; r < NREG; r++) begin : g_reg
    localparam int unsigned LSB = cw_reg_lsb(AW, CONST_W, r);
    logic              we;
    logic [SEL_W-1:0]  sel;
    logic [DATA_W-1:0] d;

    assign we  = active && cw[LSB];
    assign sel = cw[LSB + 1 +: SEL_W];

    src_mux #(.DATA_W(DATA_W), .N(NFU + 2), .CONN(REG_CONN[r])) u_mux (
      .src(wr_src), .sel(sel), .y(d));

    reg_file #(.DATA_W(DATA_W), .DEPTH(1)) u_reg (
      .clk(clk), .rst(rst), .we(we), .waddr(1'b0), .wdata(d),
      .raddr(1'b0), .rdata(reg_q[r]));

    // a register may only be written from a source wired to it
    logic sel_ok;
    always_comb begin
      sel_ok = 1'b0;
      for (int unsigned i = 0; i < NFU + 2; i++)
        if (REG_CONN[r][i] && sel == SEL_W'(i)) sel_ok = 1'b1;
    end

    assert property (@(posedge clk) disable iff (rst) we |-> sel_ok)
      else $error("nisc_datapath: register %0d written from unconnected source %0d", r, sel);
  end

  // data-memory connections
  logic [SEL_W-1:0] mem_addr_sel, mem_data_sel;
  assign mem_we       = active && cw[MEM_LSB];
  assign mem_addr_sel = cw[MEM_LSB + 1 +: SEL_W];
  assign mem_data_sel = cw[MEM_LSB + 1 + SEL_W +: SEL_W];

  src_mux #(.DATA_W(DATA_W), .N(NREG + 1), .CONN(MEM_ADDR_CONN)) u_mux_maddr (
    .src(opnd_src), .sel(mem_addr_sel), .y(mem_addr));
  src_mux #(.DATA_W(DATA_W), .N(NREG + 1), .CONN(MEM_DATA_CONN)) u_mux_mdata (
    .src(opnd_src), .sel(mem_data_sel), .y(mem_wdata));

  // status bit for the control unit
  assign status = (fu_y[STATUS_FU] != '0);

endmodule
