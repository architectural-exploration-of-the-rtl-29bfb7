// tb_adres_top: end-to-end test of the 4x4 ADRES instance at its default
// sizes.
//
// The testbench supplies a zero-wait instruction memory and a data memory
// with four ports (both are outside the core), loads the configuration
// memories of all 16 tiles, and runs a VLIW program that
//   * sets up pointers and a loop count, loads a word, compares into the
//     global PRF and takes a predicated branch (one branch target is HALT,
//     so a wrong branch shows);
//   * executes a guarded-off and a guarded-on operation;
//   * calls a modulo-scheduled CGA loop (II = 2, N + 1 iterations) computing
//     y[j] = 3 * x[j] + 7 for j < N while also summing x and counting the
//     iterations whose partial sum is below a threshold T;
//   * calls a two-context CGA loop that moves the array results back into
//     the global DRF through the VLIW row, also over the diagonal links
//     between row 0 and the global DRF (a row 0 tile writing the global DRF
//     from its SE/SW FU, a row 1 FU reading its NE tile's global DRF read
//     port), then stores them from VLIW mode.
// The loop uses every interconnect type of the selected instance: mesh
// (vertical and horizontal), mesh_plus (two rows down), reg_con1 (a local
// DRF written by a diagonal FU), reg_con2 (an FU reading a diagonal tile's
// local DRF), neighbour predicates, a local PRF and loads/stores by a VLIW
// FU in CGA mode.
//
// The expected memory image, register values and the exact cycle count of
// the run (one cycle per VLIW instruction, II x count cycles per CGA loop)
// are computed here from plain arithmetic. Each mechanism is counted while
// it happens; one that never happened counts as a failure.
module tb_adres_top;
  import adres_pkg::*;

  localparam int N  = 200;     // loop elements
  localparam int X  = 'h100;   // x[] base address (word addresses)
  localparam int D  = 'h400;   // y[] base address
  localparam int R  = 'h700;   // result area
  localparam int MW = 4096;    // data memory words in this model

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                        cfg_we;
  logic [1:0]                  cfg_row, cfg_col;
  cfg_unit_e                   cfg_unit;
  logic [CM_AW-1:0]            cfg_addr;
  logic [CFG_W-1:0]            cfg_wdata;
  logic [PC_W-1:0]             imem_addr;
  vliw_instr_t                 imem_rdata;
  logic [COLS-1:0][DATA_W-1:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic [COLS-1:0]             dmem_re, dmem_we;
  logic                        halted, cga_en;
  logic [CM_AW-1:0]            ctx;

  adres_top dut (.*);

  // ------------------------------------------------ memories (models)
  vliw_instr_t prog [16];
  logic [31:0] dmem [MW];

  function automatic logic [31:0] init_word(int a);
    return (a * 32'd2654435761) >> 20;   // 12-bit pseudo-random data
  endfunction

  always_comb begin
    imem_rdata = prog[imem_addr[3:0]];
    for (int p = 0; p < COLS; p++) dmem_rdata[p] = dmem[dmem_addr[p] % MW];
  end

  always_ff @(posedge clk)
    for (int p = 0; p < COLS; p++)
      if (dmem_we[p]) dmem[dmem_addr[p] % MW] <= dmem_wdata[p];

  // -------------------------------------------------- program helpers
  function automatic vliw_op_t vop(opcode_e op, int dst = 0, int s1 = 0, int s2 = 0,
                                   int s3 = 0, bit ie = 0, int imm = 0, bit pe = 0, int p = 0);
    vliw_op_t o;
    o.op = op; o.dst = GRF_AW'(dst); o.src1 = GRF_AW'(s1); o.src2 = GRF_AW'(s2);
    o.src3 = GRF_AW'(s3); o.imm_en = ie; o.imm = IMM_W'(imm); o.pred_en = pe; o.pred = GRF_AW'(p);
    return o;
  endfunction

  // One instruction, operations given in slot order 0..3.
  function automatic vliw_instr_t ins4(vliw_op_t s0, vliw_op_t s1, vliw_op_t s2, vliw_op_t s3);
    vliw_instr_t i;
    i[0] = s0; i[1] = s1; i[2] = s2; i[3] = s3;
    return i;
  endfunction

  task automatic cfgw(int r, int c, cfg_unit_e u, int a, logic [CFG_W-1:0] w);
    @(negedge clk);
    cfg_we = 1; cfg_row = 2'(r); cfg_col = 2'(c); cfg_unit = u; cfg_addr = CM_AW'(a); cfg_wdata = w;
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic cga_fu_cfg_t fcfg(opcode_e op, src_sel_e a, src_sel_e b, psrc_sel_e p, int imm);
    cga_fu_cfg_t f;
    f.op = op; f.src1_sel = a; f.src2_sel = b; f.pred_sel = p; f.imm = IMM_W'(imm);
    return f;
  endfunction

  function automatic vliw_cfg_t vcfg(opcode_e op, src_sel_e a, src_sel_e b, src_sel_e c3, int imm,
                                     int ra, bit we, int wa);
    vliw_cfg_t v = '0;
    v.op = op; v.src1_sel = a; v.src2_sel = b; v.src3_sel = c3; v.pred_sel = PSRC_TRUE;
    v.imm = IMM_W'(imm); v.drf_raddr[0] = GRF_AW'(ra); v.drf_we = we; v.drf_waddr = GRF_AW'(wa);
    return v;
  endfunction

  // ------------------------------------------------ mechanism counters
  int n_cycles = 0, n_cga = 0, n_mode_sw = 0, n_br = 0, n_ld = 0, n_st = 0;
  int n_mesh = 0, n_mesh_h = 0, n_mplus = 0, n_rc1 = 0, n_rc2 = 0, n_gfalse = 0, n_lprf = 0, n_npred = 0;
  int n_grc1 = 0, n_grc2 = 0;
  logic cga_q = 0;
  logic [PC_W-1:0] pc_q = 0;

  always @(posedge clk) if (rst_n && !halted) begin
    n_cycles++;
    if (cga_en) n_cga++;
    if (cga_en && !cga_q) n_mode_sw++;
    if (!cga_en && !cga_q && n_cycles > 1 && imem_addr != pc_q + 1 && imem_addr != pc_q) n_br++;
    cga_q <= cga_en;
    pc_q  <= imem_addr;
    n_ld += $countones(dmem_re);
    n_st += $countones(dmem_we);
    if (cga_en && dut.g_row[1].g_col[0].u_tile.fcfg.src1_sel == SRC_N) n_mesh++;
    if (cga_en && dut.g_row[1].g_col[2].u_tile.fcfg.src1_sel == SRC_W) n_mesh_h++;
    if (cga_en && dut.g_vliw[1].u_tile.cfg.src3_sel == SRC_S2 && dmem_we[1]) n_mplus++;
    if (cga_en && dut.g_row[1].g_col[1].u_tile.drf_we &&
        dut.g_row[1].g_col[1].u_tile.dcfg.wsel == WSRC_NW) n_rc1++;
    if (cga_en && dut.g_row[2].g_col[1].u_tile.fcfg.src1_sel == SRC_NW) n_rc2++;
    if (cga_en && dut.gdrf_we[0] && dut.g_vliw[0].u_tile.cfg.drf_wsel == WSRC_SE) n_grc1++;
    if (cga_en && dut.gdrf_we[1] && dut.g_vliw[1].u_tile.cfg.drf_wsel == WSRC_SW) n_grc1++;
    if (cga_en && dut.g_row[1].g_col[0].u_tile.fcfg.src1_sel == SRC_NE) n_grc2++;
    if (cga_en && dut.g_row[1].g_col[2].u_tile.fcfg.pred_sel == PSRC_RF) n_lprf++;
    if (cga_en && dut.g_row[1].g_col[3].u_tile.fcfg.pred_sel == PSRC_W) n_npred++;
    if (dut.g_vliw[1].u_tile.op == OP_ADD && !dut.g_vliw[1].u_tile.pred_in) n_gfalse++;
    if (dut.g_row[1].g_col[3].u_tile.fcfg.op == OP_ADD && !dut.g_row[1].g_col[3].u_tile.pred_in) n_gfalse++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_mem(string what, int a, logic [31:0] exp);
    checks++;
    if (dmem[a] !== exp) begin
      failures++;
      $display("FAIL %s: mem[%0h] = %0d expected %0d", what, a, dmem[a], exp);
    end
  endtask

  task automatic expect_cnt(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    int T, s, cnt, c_last;
    vliw_cfg_t vc;
    cfg_we = 0; cfg_row = 0; cfg_col = 0; cfg_unit = CU_FU; cfg_addr = 0; cfg_wdata = 0;
    for (int a = 0; a < MW; a++) dmem[a] = init_word(a);

    // ------------------------------------------------------- program
    for (int i = 0; i < 16; i++) prog[i] = '{default: vop(OP_HALT)};
    prog[0] = ins4(vop(OP_ADD, 1, 0, 0, 0, 1, X),  vop(OP_ADD, 2, 0, 0, 0, 1, D - 2),
                vop(OP_ADD, 3, 0, 0, 0, 1, N + 1), vop(OP_ADD, 4, 0, 0, 0, 1, 5));
    prog[1] = ins4(vop(OP_ADD, 9, 0, 0, 0, 1, 1), vop(OP_LTU, 1, 4, 0, 0, 1, 10),
                vop(OP_EQ, 2, 4, 0, 0, 1, 0),  vop(OP_LD, 5, 0, 0, 0, 1, X));
    prog[2] = ins4(vop(OP_BR, 0, 0, 0, 0, 0, 4, 1, 1), vop(OP_ADD, 6, 5, 0, 0, 1, 1),
                vop(OP_NOP), vop(OP_NOP));
    prog[3] = '{default: vop(OP_HALT)};
    prog[4] = ins4(vop(OP_CGA, 0, 3, 0, 0, 0, (1 << 7) | 0), vop(OP_ADD, 7, 0, 0, 0, 1, 11, 1, 2),
                vop(OP_ADD, 8, 0, 0, 0, 1, 22, 1, 1), vop(OP_NOP));
    prog[5] = ins4(vop(OP_CGA, 0, 9, 0, 0, 0, (1 << 7) | 2), vop(OP_NOP), vop(OP_NOP), vop(OP_NOP));
    prog[6] = ins4(vop(OP_ST, 0, 0, 0, 10, 1, R + 0), vop(OP_ST, 0, 0, 0, 11, 1, R + 1),
                vop(OP_ST, 0, 0, 0, 12, 1, R + 2), vop(OP_ST, 0, 0, 0, 6, 1, R + 3));
    prog[7] = ins4(vop(OP_ST, 0, 0, 0, 7, 1, R + 4), vop(OP_ST, 0, 0, 0, 8, 1, R + 5),
                vop(OP_ST, 0, 0, 0, 1, 1, R + 6), vop(OP_ST, 0, 0, 0, 2, 1, R + 7));
    prog[8] = ins4(vop(OP_ST, 0, 0, 0, 13, 1, R + 8), vop(OP_ST, 0, 0, 0, 14, 1, R + 9),
                vop(OP_NOP), vop(OP_NOP));
    prog[9] = '{default: vop(OP_HALT)};

    // threshold: sum of the first 8 elements (fits the 16-bit immediate)
    T = 0;
    for (int j = 0; j < 8; j++) T += init_word(X + j);
    if (T > 32767) T = 32767;

    // ---------------------------------------- configuration memories
    // (loaded while the core is held in reset; the CMs are not reset)
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        for (int a = 0; a < 4; a++)
          for (int u = 0; u < 3; u++) cfgw(r, c, cfg_unit_e'(u), a, '0);
    // context 0 (A) and 1 (B) of the loop; context 2 moves results out
    cfgw(0, 0, CU_FU, 0, vcfg(OP_LD,  SRC_RFA, SRC_IMM, SRC_RFA, 0, 1, 0, 0));
    cfgw(0, 0, CU_FU, 1, vcfg(OP_ADD, SRC_RFA, SRC_IMM, SRC_RFA, 1, 1, 1, 1));
    cfgw(0, 1, CU_FU, 0, vcfg(OP_ADD, SRC_RFA, SRC_IMM, SRC_RFA, 1, 2, 1, 2));
    cfgw(0, 1, CU_FU, 1, vcfg(OP_ST,  SRC_RFA, SRC_IMM, SRC_S2, 0, 2, 0, 0));
    vc = vcfg(OP_MOV, SRC_S, SRC_IMM, SRC_RFA, 0, 0, 1, 10);
    vc.drf_raddr[1] = 6;                 // port B: r6, seen by (1,0) as NE
    cfgw(0, 1, CU_FU, 2, vc);
    vc = vcfg(OP_NOP, SRC_RFA, SRC_RFA, SRC_RFA, 0, 0, 1, 13);
    vc.drf_wsel = WSRC_SE;               // r13 <- output of (1,1), the sum
    cfgw(0, 0, CU_FU, 2, vc);
    vc = vcfg(OP_NOP, SRC_RFA, SRC_RFA, SRC_RFA, 0, 0, 1, 14);
    vc.drf_wsel = WSRC_SW;               // r14 <- output of (1,0)
    cfgw(0, 1, CU_FU, 3, vc);
    cfgw(1, 0, CU_FU, 2, fcfg(OP_ADD, SRC_NE, SRC_IMM, PSRC_TRUE, 1000));
    cfgw(0, 2, CU_FU, 2, vcfg(OP_MOV, SRC_S, SRC_IMM, SRC_RFA, 0, 0, 1, 12));
    cfgw(0, 3, CU_FU, 2, vcfg(OP_MOV, SRC_S, SRC_IMM, SRC_RFA, 0, 0, 1, 11));
    // (1,0): 3 * x, also kept in its local DRF word 0
    cfgw(1, 0, CU_FU,  1, fcfg(OP_MUL, SRC_N, SRC_IMM, PSRC_TRUE, 3));
    cfgw(1, 0, CU_DRF, 1, cga_drf_cfg_t'{raddr_a: 0, raddr_b: 0, waddr: 0, we: 1, wsel: WSRC_OWN});
    cfgw(1, 0, CU_DRF, 0, cga_drf_cfg_t'{raddr_a: 0, raddr_b: 0, waddr: 0, we: 0, wsel: WSRC_OWN});
    // (2,1): reads (1,0)'s local DRF over the diagonal, adds 7
    cfgw(2, 1, CU_FU, 0, fcfg(OP_ADD, SRC_NW, SRC_IMM, PSRC_TRUE, 7));
    // (1,1): local DRF word 2 written from the diagonal FU (0,0); accumulate
    cfgw(1, 1, CU_DRF, 1, cga_drf_cfg_t'{raddr_a: 2, raddr_b: 0, waddr: 2, we: 1, wsel: WSRC_NW});
    cfgw(1, 1, CU_DRF, 0, cga_drf_cfg_t'{raddr_a: 2, raddr_b: 0, waddr: 0, we: 0, wsel: WSRC_OWN});
    cfgw(1, 1, CU_FU,  0, fcfg(OP_ADD, SRC_RFA, SRC_SELF, PSRC_TRUE, 0));
    // (1,2): partial sum < T ? keeps !cond in its local PRF, guarded add
    cfgw(1, 2, CU_FU,  0, fcfg(OP_LT, SRC_W, SRC_IMM, PSRC_TRUE, T));
    cfgw(1, 2, CU_FU,  1, fcfg(OP_ADD, SRC_SELF, SRC_IMM, PSRC_RF, 100));
    cfgw(1, 2, CU_PRF, 0, cga_prf_cfg_t'{raddr: 0, waddr: 0, we: 1, wsel: 1'b1});
    cfgw(1, 2, CU_PRF, 1, cga_prf_cfg_t'{raddr: 0, waddr: 0, we: 0, wsel: 1'b0});
    // (1,3): count iterations guarded by the west neighbour's predicate
    cfgw(1, 3, CU_FU, 1, fcfg(OP_ADD, SRC_SELF, SRC_IMM, PSRC_W, 1));
    // -------------------------------------------------------- run
    @(negedge clk);
    rst_n = 1;
    wait (halted);
    @(negedge clk);

    // ------------------------------------------------------ expected
    for (int j = 0; j < N; j++)
      expect_mem("y = 3x + 7", D + j, 3 * init_word(X + j) + 7);
    expect_mem("first store of the loop fill", D - 1, 7);
    s = 0; cnt = 0; c_last = 0;
    for (int k = 0; k <= N; k++) begin      // S_{k-1} < T, S_{-1} = S_0 = 0
      int sp;
      sp = 0;
      for (int j = 0; j < k - 1; j++) sp += init_word(X + j);
      c_last = (sp < T);
      cnt += c_last;
    end
    for (int j = 0; j < N; j++) s += init_word(X + j);
    expect_mem("sum of x", R + 0, s);
    expect_mem("count below threshold", R + 1, cnt);
    expect_mem("guarded add via local PRF", R + 2, c_last ? 1 : 100);
    expect_mem("VLIW load + add", R + 3, init_word(X) + 1);
    expect_mem("guard false: not written", R + 4, 0);
    expect_mem("guard true: written", R + 5, 22);
    expect_mem("source pointer after loop", R + 6, X + N + 1);
    expect_mem("destination pointer after loop", R + 7, D - 2 + N + 1);
    expect_mem("global DRF written from a diagonal FU", R + 8, s);
    expect_mem("global DRF read over a diagonal", R + 9, init_word(X) + 1 + 1000);
    // cycles: one per VLIW instruction (0, 1, 2, 4, 5, 6, 7, 8 and the HALT
    // at 9) plus II x count per CGA loop
    expect_cnt("CGA cycles", n_cga, 2 * (N + 1) + 2);
    expect_cnt("total cycles to HALT", n_cycles, 9 + 2 * (N + 1) + 2);
    expect_cnt("VLIW to CGA switches", n_mode_sw, 2);

    $display("mechanisms:");
    expect_seen("VLIW to CGA mode switch", n_mode_sw);
    expect_seen("branch taken", n_br);
    expect_seen("load", n_ld);
    expect_seen("store", n_st);
    expect_seen("mesh vertical", n_mesh);
    expect_seen("mesh horizontal", n_mesh_h);
    expect_seen("mesh_plus", n_mplus);
    expect_seen("reg_con1 diagonal write", n_rc1);
    expect_seen("reg_con2 diagonal read", n_rc2);
    expect_seen("reg_con1 into the global DRF", n_grc1);
    expect_seen("reg_con2 from the global DRF", n_grc2);
    expect_seen("local PRF guard", n_lprf);
    expect_seen("neighbour predicate guard", n_npred);
    expect_seen("guard false", n_gfalse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
