// tb_cga_tile: self-checking random test of one CGA tile.
// Loads random contexts into the FU, DRF and PRF configuration memories,
// then runs random context sequences with random neighbour data, neighbour
// predicates and diagonal FU results. A reference model of the tile (local
// DRF and PRF, output registers, source/predicate/write muxes) runs beside
// it and out_data, out_pred and the read port B data sent to the diagonals
// are compared every cycle. Also checks that the tile is idle with
// cga_en = 0. Every operation takes one cycle (non-pipelined core).
module tb_cga_tile;
  import adres_pkg::*;
  import adres_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                   cfg_we;
  cfg_unit_e              cfg_unit;
  logic [CM_AW-1:0]       cfg_addr;
  logic [CFG_W-1:0]       cfg_wdata;
  logic                   cga_en;
  logic [CM_AW-1:0]       ctx;
  nb_data_t               nb_data;
  logic [3:0]             nb_pred;
  logic [3:0][DATA_W-1:0] dg_res;
  logic [DATA_W-1:0]      out_data, rf_b_data;
  logic                   out_pred;

  cga_tile dut (.*);

  localparam int NCTX = 24;
  cga_fu_cfg_t  fc [NCTX];
  cga_drf_cfg_t dc [NCTX];
  cga_prf_cfg_t pc [NCTX];

  logic [31:0] m_drf [16];
  logic        m_prf [16];
  logic [31:0] m_out;
  logic        m_pred;
  int          n_pred_false = 0, n_diag_wr = 0;

  function automatic logic [31:0] sel_src(src_sel_e s, logic [31:0] ra, logic [31:0] rb, logic [15:0] imm);
    case (s)
      SRC_RFA:  return ra;
      SRC_RFB:  return rb;
      SRC_SELF: return m_out;
      SRC_IMM:  return {{16{imm[15]}}, imm};
      default:  return nb_data[int'(s) - 3];
    endcase
  endfunction

  task automatic load(cfg_unit_e u, int a, logic [CFG_W-1:0] w);
    @(negedge clk);
    cfg_we = 1; cfg_unit = u; cfg_addr = CM_AW'(a); cfg_wdata = w;
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_unit = CU_FU; cfg_addr = 0; cfg_wdata = 0; cga_en = 0; ctx = 0;
    nb_data = '0; nb_pred = '0; dg_res = '0;
    for (int i = 0; i < 16; i++) begin m_drf[i] = 0; m_prf[i] = 0; end
    m_out = 0; m_pred = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NCTX; k++) begin
      fc[k].op       = rand_op();
      fc[k].src1_sel = src_sel_e'($urandom_range(0, 15));
      fc[k].src2_sel = src_sel_e'($urandom_range(0, 15));
      fc[k].pred_sel = psrc_sel_e'($urandom_range(0, 7));
      fc[k].imm      = (k % 3 == 0) ? 16'($urandom_range(0, 31)) : 16'($urandom);
      dc[k].raddr_a  = $urandom_range(0, 15);
      dc[k].raddr_b  = $urandom_range(0, 15);
      dc[k].waddr    = $urandom_range(0, 15);
      dc[k].we       = $urandom_range(0, 3) != 0;
      dc[k].wsel     = wsrc_sel_e'((k % 2 == 0) ? 0 : 1 + (k / 2) % 4);   // each diagonal input used
      pc[k].raddr    = $urandom_range(0, 15);
      pc[k].waddr    = $urandom_range(0, 15);
      pc[k].we       = $urandom_range(0, 1);
      pc[k].wsel     = $urandom_range(0, 1);
      load(CU_FU,  k, CFG_W'(fc[k]));
      load(CU_DRF, k, CFG_W'(dc[k]));
      load(CU_PRF, k, CFG_W'(pc[k]));
    end
    for (int n = 0; n < 4000; n++) begin
      int k;
      logic [31:0] s1, s2, ra, rb, wd;
      logic pin, wen;
      ref_res_t r;
      @(negedge clk);
      k = $urandom_range(0, NCTX - 1);
      cga_en = (n % 10 != 9);
      ctx = CM_AW'(k);
      for (int i = 0; i < NB_NUM; i++) nb_data[i] = (n % 4 == 0) ? 32'($urandom_range(0, 40)) : $urandom;
      nb_pred = 4'($urandom);
      for (int i = 0; i < 4; i++) dg_res[i] = $urandom;
      #1;
      // reference model of this cycle
      if (cga_en) begin
        ra  = m_drf[dc[k].raddr_a];
        rb  = m_drf[dc[k].raddr_b];
        s1  = sel_src(fc[k].src1_sel, ra, rb, fc[k].imm);
        s2  = sel_src(fc[k].src2_sel, ra, rb, fc[k].imm);
        case (fc[k].pred_sel)
          PSRC_TRUE: pin = 1;  PSRC_RF: pin = m_prf[pc[k].raddr];
          PSRC_SELF: pin = m_pred; PSRC_N: pin = nb_pred[0]; PSRC_S: pin = nb_pred[1];
          PSRC_E: pin = nb_pred[2]; PSRC_W: pin = nb_pred[3]; default: pin = 0;
        endcase
        r = ref_fu(fc[k].op, s1, s2, 0, 0);
        checks++;
        if (rf_b_data !== rb) begin
          failures++;
          $display("FAIL cycle %0d rf_b_data %h expected %h", n, rf_b_data, rb);
        end
      end else begin
        pin = 0; r = ref_fu(OP_NOP, 0, 0, 0, 0);
      end
      if (!pin) n_pred_false++;
      @(posedge clk);
      if (cga_en) begin
        if (dc[k].wsel == WSRC_OWN) begin wd = r.d; wen = dc[k].we & pin & (r.wr | r.cmp); end
        else begin wd = dg_res[int'(dc[k].wsel) - 1]; wen = dc[k].we; n_diag_wr += wen; end
        if (wen) m_drf[dc[k].waddr] = wd;
        if (pc[k].we && pin && r.cmp) m_prf[pc[k].waddr] = pc[k].wsel ? !r.c : r.c;
        if (pin && (r.wr || r.cmp)) m_out = r.d;
        if (pin && r.cmp) m_pred = r.c;
      end
      #1;
      checks += 2;
      if (out_data !== m_out || out_pred !== m_pred) begin
        failures++;
        $display("FAIL cycle %0d ctx %0d op %s: out %h/%b expected %h/%b", n, k,
                 fc[k].op.name(), out_data, out_pred, m_out, m_pred);
      end
    end
    if (n_pred_false == 0 || n_diag_wr == 0) failures++;
    $display("guard false %0d times, diagonal (reg_con1) writes %0d", n_pred_false, n_diag_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
