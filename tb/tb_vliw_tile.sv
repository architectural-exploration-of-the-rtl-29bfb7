// tb_vliw_tile: self-checking random test of a VLIW-section FU tile.
// The testbench plays the global DRF and PRF (its own arrays answer the
// tile's read addresses) and a data memory. Phase 1 issues random VLIW
// operations (register or immediate src2, guarded or not, loads and stores);
// phase 2 loads random contexts into the tile's configuration memory and
// runs them in CGA mode with random neighbour and diagonal inputs; the
// contexts alternate between the tile's own result and each of the four
// diagonal FU outputs as the global DRF write data. Every cycle the
// register file write ports, the read port B data seen by the diagonal
// tiles, the predicate write port, the memory signals
// and the output registers are compared with a reference model.
module tb_vliw_tile;
  import adres_pkg::*;
  import adres_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                   cfg_we;
  logic [CM_AW-1:0]       cfg_addr;
  logic [CFG_W-1:0]       cfg_wdata;
  logic                   cga_en;
  logic [CM_AW-1:0]       ctx;
  vliw_op_t               vop;
  logic [2:0][GRF_AW-1:0] drf_raddr;
  logic [2:0][DATA_W-1:0] drf_rdata;
  logic                   drf_we, prf_we, prf_rdata, prf_wdata, out_pred, mem_re, mem_we;
  logic [GRF_AW-1:0]      drf_waddr, prf_raddr, prf_waddr;
  logic [DATA_W-1:0]      drf_wdata, out_data, mem_addr, mem_wdata, mem_rdata;
  nb_data_t               nb_data;
  logic [3:0]             nb_pred;
  logic [3:0][DATA_W-1:0] dg_res;
  logic [DATA_W-1:0]      rf_b_data;

  vliw_tile dut (.*);

  logic [31:0] g_drf [64];
  logic        g_prf [64];
  logic [31:0] m_out;
  logic        m_pred;

  always_comb begin
    for (int i = 0; i < 3; i++) drf_rdata[i] = g_drf[drf_raddr[i]];
    prf_rdata = g_prf[prf_raddr];
    mem_rdata = mem_addr ^ 32'hA5A5_0000;   // data memory contents: a function of the address
  end

  localparam int NCTX = 16;
  vliw_cfg_t cf [NCTX];
  int n_ld = 0, n_st = 0, n_cmp = 0, n_false = 0;

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [31:0] sel_src(src_sel_e s, logic [31:0] rf, logic [15:0] imm);
    case (s)
      SRC_RFA:  return rf;
      SRC_RFB:  return 0;
      SRC_SELF: return m_out;
      SRC_IMM:  return {{16{imm[15]}}, imm};
      default:  return nb_data[int'(s) - 3];
    endcase
  endfunction

  // Compare the tile's outputs this cycle with the expected effects.
  task automatic check_cycle(opcode_e op, logic [31:0] s1, s2, s3, logic pin,
                             logic dwe_en, logic [5:0] dwa, logic pwe_en, logic [5:0] pwa,
                             logic pwsel, logic cga, int wsel, logic [31:0] exp_rb);
    ref_res_t    r;
    logic        exp_dwe, exp_pwe;
    logic [31:0] wd;
    r = ref_fu(op, s1, s2, 1, s1 + s2 ^ 32'hA5A5_0000);
    exp_dwe = cga ? (dwe_en & pin & (r.wr | r.cmp)) : (pin & r.wr);
    wd = r.d;
    if (cga && wsel >= 1 && wsel <= 4) begin   // diagonal FU output, not guarded
      exp_dwe = dwe_en;
      wd = dg_res[wsel - 1];
    end
    exp_pwe = pwe_en & pin & r.cmp;
    expect_eq("rf_b_data", rf_b_data, exp_rb);
    expect_eq("drf_we", drf_we, exp_dwe);
    if (exp_dwe) begin
      expect_eq("drf_waddr", drf_waddr, dwa);
      expect_eq("drf_wdata", drf_wdata, wd);
    end
    expect_eq("prf_we", prf_we, exp_pwe);
    if (exp_pwe) begin
      expect_eq("prf_waddr", prf_waddr, pwa);
      expect_eq("prf_wdata", prf_wdata, pwsel ? !r.c : r.c);
    end
    expect_eq("mem_re", mem_re, pin && op == OP_LD);
    expect_eq("mem_we", mem_we, pin && op == OP_ST);
    if (pin && op == OP_ST) begin
      expect_eq("mem_addr", mem_addr, 64'(32'(s1 + s2)));
      expect_eq("mem_wdata", mem_wdata, s3);
    end
    n_ld += (pin && op == OP_LD); n_st += (pin && op == OP_ST);
    n_cmp += (pin && r.cmp); n_false += !pin;
    @(posedge clk);
    #1;   // the register file model changes after the tile has sampled
    if (exp_dwe) g_drf[dwa] = wd;
    if (exp_pwe) g_prf[pwa] = pwsel ? !r.c : r.c;
    if (pin && (r.wr || r.cmp)) m_out = r.d;
    if (pin && r.cmp) m_pred = r.c;
    expect_eq("out_data", out_data, m_out);
    expect_eq("out_pred", out_pred, m_pred);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; cga_en = 0; ctx = 0; vop = '0;
    nb_data = '0; nb_pred = '0; dg_res = '0;
    for (int i = 0; i < 64; i++) begin g_drf[i] = $urandom; g_prf[i] = $urandom_range(0, 1); end
    m_out = 0; m_pred = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---------------------------------------------------- VLIW mode
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] s2;
      @(negedge clk);
      vop         = '0;
      vop.op      = rand_op();
      vop.dst     = $urandom_range(0, 63);
      vop.src1    = $urandom_range(0, 63);
      vop.src2    = $urandom_range(0, 63);
      vop.src3    = $urandom_range(0, 63);
      vop.imm_en  = $urandom_range(0, 1);
      vop.imm     = $urandom;
      vop.pred_en = $urandom_range(0, 1);
      vop.pred    = $urandom_range(0, 63);
      #1;
      s2 = vop.imm_en ? {{16{vop.imm[15]}}, vop.imm} : g_drf[vop.src2];
      check_cycle(vop.op, g_drf[vop.src1], s2, g_drf[vop.src3],
                  vop.pred_en ? g_prf[vop.pred] : 1'b1,
                  1'b1, vop.dst, 1'b1, vop.dst, 1'b0, 1'b0, 0, g_drf[vop.src2]);
    end
    // ----------------------------------------------------- CGA mode
    @(negedge clk); vop = '0;
    for (int k = 0; k < NCTX; k++) begin
      cf[k] = vliw_cfg_t'({$urandom, $urandom, $urandom});
      cf[k].op = rand_op();
      if (k % 4 == 0) cf[k].pred_sel = PSRC_TRUE;
      cf[k].drf_wsel = (k % 2) ? wsrc_sel_e'(1 + (k / 2) % 4) : WSRC_OWN;
      @(negedge clk); cfg_we = 1; cfg_addr = CM_AW'(k + 100); cfg_wdata = cf[k];
    end
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < 2000; n++) begin
      int k;
      logic [31:0] s1, s2, s3;
      logic pin;
      @(negedge clk);
      k = $urandom_range(0, NCTX - 1);
      cga_en = 1; ctx = CM_AW'(k + 100);
      vop.op = OP_ADD;   // ignored in CGA mode
      for (int i = 0; i < NB_NUM; i++) nb_data[i] = $urandom;
      nb_pred = 4'($urandom);
      for (int i = 0; i < 4; i++) dg_res[i] = $urandom;
      #1;
      s1 = sel_src(cf[k].src1_sel, g_drf[cf[k].drf_raddr[0]], cf[k].imm);
      s2 = sel_src(cf[k].src2_sel, g_drf[cf[k].drf_raddr[1]], cf[k].imm);
      s3 = sel_src(cf[k].src3_sel, g_drf[cf[k].drf_raddr[2]], cf[k].imm);
      case (cf[k].pred_sel)
        PSRC_TRUE: pin = 1; PSRC_RF: pin = g_prf[cf[k].prf_raddr]; PSRC_SELF: pin = m_pred;
        PSRC_N: pin = nb_pred[0]; PSRC_S: pin = nb_pred[1]; PSRC_E: pin = nb_pred[2];
        PSRC_W: pin = nb_pred[3]; default: pin = 0;
      endcase
      check_cycle(cf[k].op, s1, s2, s3, pin, cf[k].drf_we, cf[k].drf_waddr,
                  cf[k].prf_we, cf[k].prf_waddr, cf[k].prf_wsel, 1'b1,
                  int'(cf[k].drf_wsel), g_drf[cf[k].drf_raddr[1]]);
    end
    $display("loads %0d stores %0d compares %0d guard-false %0d", n_ld, n_st, n_cmp, n_false);
    if (n_ld == 0 || n_st == 0 || n_cmp == 0 || n_false == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
