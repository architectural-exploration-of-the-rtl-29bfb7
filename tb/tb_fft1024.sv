// tb_fft1024: a complete 1024-point radix-2 FFT run on the 4x4 array at its
// default sizes.
//
// Data layout in the (testbench) data memory, word addresses:
//   RE 0x000..0x3FF, IM 0x400..0x7FF   complex data, in place
//   WR 0x800..0x9FF, WI 0xA00..0xBFF   twiddles W^m = exp(-2*pi*i*m/1024),
//                                      m < 512, in Q12 fixed point
// The input (a tone in bin 37 plus pseudo-random noise, |x| <= ~140) is
// placed in bit-reversed order, so the decimation-in-time stages produce
// the spectrum in natural order. A butterfly computes
//   t  = (W * b) >>> 12     (tr = (wr*br - wi*bi) >>> 12, ti = (wr*bi + wi*br) >>> 12)
//   a' = a + t,  b' = a - t
// in 32-bit integers; the input range keeps every product within 31 bits.
//
// VLIW code runs the 10 stages. For stage s it sets half = 2^s,
// maskhi = -half, lowmask = half - 1, shift = 9 - s, k = 0, and calls a CGA
// loop of 512 iterations with II = 10. One iteration is one butterfly
// (contexts c0..c9, not overlapped):
//   c0-c2  row 0 computes a = k + (k & maskhi), b = a + half and the
//          twiddle index (k & lowmask) << shift in the global DRF
//   c2-c4  row 0 loads twiddles and operands; row 1 picks them up from the
//          mesh and keeps one operand each in its local DRF
//   c4-c5  row 1 forms the four products; ar and ai are captured from row 0
//          into (1,0) and (1,3) over the reg_con1 diagonal write inputs
//   c6-c7  (1,1) and (1,2) form tr and ti and scale them
//   c8     (1,0), (1,3) form a' from their local DRFs; (2,1), (2,2) form b'
//          reading ar/ai over the reg_con2 diagonal inputs
//   c9     row 0 stores a' (mesh) and b' (mesh_plus, two rows down)
// The result is compared word for word with the same fixed-point algorithm
// computed here in plain SystemVerilog, the tone bin is checked against the
// expected magnitude, and the cycle count must be exactly
// 1 + 10 x (4 + 512 x 10).
module tb_fft1024;
  import adres_pkg::*;

  localparam int NP = 1024;
  localparam int RE = 'h000, IM = 'h400, WR = 'h800, WI = 'hA00;
  localparam int MW = 4096;
  localparam int II = 10;

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

  vliw_instr_t prog [8];
  logic [31:0] dmem [MW];

  always_comb begin
    imem_rdata = prog[imem_addr[2:0]];
    for (int p = 0; p < COLS; p++) dmem_rdata[p] = dmem[dmem_addr[p] % MW];
  end

  always_ff @(posedge clk)
    for (int p = 0; p < COLS; p++)
      if (dmem_we[p]) dmem[dmem_addr[p] % MW] <= dmem_wdata[p];

  function automatic vliw_op_t vop(opcode_e op, int dst = 0, int s1 = 0, int s2 = 0,
                                   int s3 = 0, bit ie = 0, int imm = 0, bit pe = 0, int p = 0);
    vliw_op_t o;
    o.op = op; o.dst = GRF_AW'(dst); o.src1 = GRF_AW'(s1); o.src2 = GRF_AW'(s2);
    o.src3 = GRF_AW'(s3); o.imm_en = ie; o.imm = IMM_W'(imm); o.pred_en = pe; o.pred = GRF_AW'(p);
    return o;
  endfunction

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

  // Row 0 context: operation, sources, immediate, global DRF read addresses
  // of src1/src2, and an optional global DRF write.
  function automatic vliw_cfg_t v(opcode_e op, src_sel_e a, src_sel_e b, src_sel_e c3, int imm,
                                  int ra0, int ra1, bit we, int wa);
    vliw_cfg_t x = '0;
    x.op = op; x.src1_sel = a; x.src2_sel = b; x.src3_sel = c3; x.pred_sel = PSRC_TRUE;
    x.imm = IMM_W'(imm); x.drf_raddr[0] = GRF_AW'(ra0); x.drf_raddr[1] = GRF_AW'(ra1);
    x.drf_we = we; x.drf_waddr = GRF_AW'(wa);
    return x;
  endfunction

  function automatic cga_fu_cfg_t f(opcode_e op, src_sel_e a, src_sel_e b, int imm = 0);
    cga_fu_cfg_t x;
    x.op = op; x.src1_sel = a; x.src2_sel = b; x.pred_sel = PSRC_TRUE; x.imm = IMM_W'(imm);
    return x;
  endfunction

  function automatic cga_drf_cfg_t d(int ra, int rb, bit we, int wa, wsrc_sel_e ws);
    cga_drf_cfg_t x;
    x.raddr_a = LRF_AW'(ra); x.raddr_b = LRF_AW'(rb); x.we = we; x.waddr = LRF_AW'(wa); x.wsel = ws;
    return x;
  endfunction

  function automatic int bitrev10(int n);
    int r = 0;
    for (int i = 0; i < 10; i++) r |= ((n >> i) & 1) << (9 - i);
    return r;
  endfunction

  function automatic int rnd(real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  int n_cycles = 0, n_cga = 0, n_calls = 0;
  logic cga_q = 0;
  always @(posedge clk) if (rst_n && !halted) begin
    n_cycles++;
    if (cga_en) n_cga++;
    if (cga_en && !cga_q) n_calls++;
    cga_q <= cga_en;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [NP], xi [NP], wr [NP/2], wi [NP/2];

  initial begin
    const real PI = 3.14159265358979323846;
    cfg_we = 0; cfg_row = 0; cfg_col = 0; cfg_unit = CU_FU; cfg_addr = 0; cfg_wdata = 0;

    // ------------------------------------------------ data and twiddles
    for (int a = 0; a < MW; a++) dmem[a] = 0;
    for (int m = 0; m < NP / 2; m++) begin
      wr[m] = rnd($cos(2.0 * PI * m / NP) * 4096.0);
      wi[m] = rnd(-$sin(2.0 * PI * m / NP) * 4096.0);
      dmem[WR + m] = wr[m];
      dmem[WI + m] = wi[m];
    end
    for (int n = 0; n < NP; n++) begin
      int tone, noise;
      tone  = rnd(100.0 * $cos(2.0 * PI * 37 * n / NP));
      noise = int'($urandom_range(0, 80)) - 40;
      xr[bitrev10(n)] = tone + noise;
      xi[bitrev10(n)] = int'($urandom_range(0, 20)) - 10;
    end
    for (int n = 0; n < NP; n++) begin dmem[RE + n] = xr[n]; dmem[IM + n] = xi[n]; end

    // ------------------------------------------------ VLIW program
    // r1 maskhi, r2 half, r3 shift, r4 lowmask, r5 k, r6 count, r12 stages left
    for (int i = 0; i < 8; i++) prog[i] = ins4(vop(OP_HALT), vop(OP_NOP), vop(OP_NOP), vop(OP_NOP));
    prog[0] = ins4(vop(OP_ADD, 2, 0, 0, 0, 1, 1),   vop(OP_ADD, 3, 0, 0, 0, 1, 9),
                   vop(OP_ADD, 6, 0, 0, 0, 1, 512), vop(OP_ADD, 12, 0, 0, 0, 1, 10));
    prog[1] = ins4(vop(OP_SUB, 1, 0, 2),             vop(OP_ADD, 4, 2, 0, 0, 1, -1),
                   vop(OP_ADD, 5, 0, 0, 0, 1, 0),    vop(OP_ADD, 12, 12, 0, 0, 1, -1));
    prog[2] = ins4(vop(OP_CGA, 0, 6, 0, 0, 0, ((II - 1) << 7) | 0), vop(OP_EQ, 1, 12, 0, 0, 1, 0),
                   vop(OP_NOP), vop(OP_NOP));
    prog[3] = ins4(vop(OP_BR, 0, 0, 0, 0, 0, 5, 1, 1), vop(OP_SHL, 2, 2, 0, 0, 1, 1),
                   vop(OP_ADD, 3, 3, 0, 0, 1, -1),   vop(OP_NOP));
    prog[4] = ins4(vop(OP_BR, 0, 0, 0, 0, 0, 1),     vop(OP_NOP), vop(OP_NOP), vop(OP_NOP));
    prog[5] = ins4(vop(OP_HALT), vop(OP_NOP), vop(OP_NOP), vop(OP_NOP));

    // ------------------------------------------------ array contexts
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        for (int a = 0; a < II; a++)
          for (int u = 0; u < 3; u++) cfgw(r, c, cfg_unit_e'(u), a, '0);
    // c0, c1: address arithmetic in row 0
    cfgw(0, 0, CU_FU, 0, v(OP_AND, SRC_RFA, SRC_RFA, SRC_RFA, 0, 5, 1, 1, 7));   // r7 = k & maskhi
    cfgw(0, 1, CU_FU, 0, v(OP_AND, SRC_RFA, SRC_RFA, SRC_RFA, 0, 5, 4, 1, 8));   // r8 = k & lowmask
    cfgw(0, 0, CU_FU, 1, v(OP_ADD, SRC_RFA, SRC_RFA, SRC_RFA, 0, 5, 7, 1, 9));   // r9 = a
    cfgw(0, 1, CU_FU, 1, v(OP_SHL, SRC_RFA, SRC_RFA, SRC_RFA, 0, 8, 3, 1, 8));   // r8 = twiddle index
    // c2: b, first twiddle loads
    cfgw(0, 0, CU_FU, 2, v(OP_ADD, SRC_RFA, SRC_RFA, SRC_RFA, 0, 9, 2, 1, 10));  // r10 = b
    cfgw(0, 1, CU_FU, 2, v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, WI, 8, 0, 0, 0));   // wi
    cfgw(0, 2, CU_FU, 2, v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, WR, 8, 0, 0, 0));   // wr
    cfgw(0, 3, CU_FU, 2, v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, WI, 8, 0, 0, 0));   // wi
    // c3: more loads; row 1 keeps the twiddles
    cfgw(0, 0, CU_FU, 3, v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, WR, 8, 0, 0, 0));   // wr
    cfgw(0, 1, CU_FU, 3, v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, IM, 10, 0, 0, 0));  // bi
    cfgw(0, 2, CU_FU, 3, v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, IM, 10, 0, 0, 0));  // bi
    cfgw(0, 3, CU_FU, 3, v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, RE, 10, 0, 0, 0));  // br
    for (int c = 1; c < 4; c++) begin
      cfgw(1, c, CU_FU,  3, f(OP_MOV, SRC_N, SRC_IMM));
      cfgw(1, c, CU_DRF, 3, d(0, 0, 1, 0, WSRC_OWN));
    end
    // c4: last loads; products wi*bi, wr*bi, wi*br
    cfgw(0, 0, CU_FU, 4, v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, RE, 10, 0, 0, 0));  // br
    cfgw(0, 1, CU_FU, 4, v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, RE, 9, 0, 0, 0));   // ar
    cfgw(0, 2, CU_FU, 4, v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, IM, 9, 0, 0, 0));   // ai
    cfgw(1, 0, CU_FU,  4, f(OP_MOV, SRC_N, SRC_IMM));
    cfgw(1, 0, CU_DRF, 4, d(0, 0, 1, 0, WSRC_OWN));
    for (int c = 1; c < 4; c++) begin
      cfgw(1, c, CU_FU,  4, f(OP_MUL, SRC_RFA, SRC_N));
      cfgw(1, c, CU_DRF, 4, d(0, 0, 0, 0, WSRC_OWN));
    end
    // c5: wr*br; ar, ai captured over reg_con1; k + 1
    cfgw(0, 0, CU_FU,  5, v(OP_ADD, SRC_RFA, SRC_IMM, SRC_RFA, 1, 5, 0, 1, 5));
    cfgw(1, 0, CU_FU,  5, f(OP_MUL, SRC_RFA, SRC_N));
    cfgw(1, 0, CU_DRF, 5, d(0, 0, 1, 1, WSRC_NE));
    cfgw(1, 3, CU_DRF, 5, d(0, 0, 1, 1, WSRC_NW));
    // c6, c7: tr, ti
    cfgw(1, 1, CU_FU, 6, f(OP_SUB, SRC_W, SRC_SELF));
    cfgw(1, 2, CU_FU, 6, f(OP_ADD, SRC_SELF, SRC_E));
    cfgw(1, 1, CU_FU, 7, f(OP_SRA, SRC_SELF, SRC_IMM, 12));
    cfgw(1, 2, CU_FU, 7, f(OP_SRA, SRC_SELF, SRC_IMM, 12));
    // c8: a' and b'
    cfgw(1, 0, CU_FU,  8, f(OP_ADD, SRC_RFB, SRC_E));
    cfgw(1, 0, CU_DRF, 8, d(0, 1, 0, 0, WSRC_OWN));
    cfgw(1, 3, CU_FU,  8, f(OP_ADD, SRC_RFB, SRC_W));
    cfgw(1, 3, CU_DRF, 8, d(0, 1, 0, 0, WSRC_OWN));
    cfgw(2, 1, CU_FU,  8, f(OP_SUB, SRC_NW, SRC_N));
    cfgw(2, 2, CU_FU,  8, f(OP_SUB, SRC_NE, SRC_N));
    // c9: stores
    cfgw(0, 0, CU_FU, 9, v(OP_ST, SRC_RFA, SRC_IMM, SRC_S,  RE, 9, 0, 0, 0));    // ar'
    cfgw(0, 1, CU_FU, 9, v(OP_ST, SRC_RFA, SRC_IMM, SRC_S2, RE, 10, 0, 0, 0));   // br'
    cfgw(0, 2, CU_FU, 9, v(OP_ST, SRC_RFA, SRC_IMM, SRC_S2, IM, 10, 0, 0, 0));   // bi'
    cfgw(0, 3, CU_FU, 9, v(OP_ST, SRC_RFA, SRC_IMM, SRC_S,  IM, 9, 0, 0, 0));    // ai'

    // ------------------------------------------------ run
    @(negedge clk);
    rst_n = 1;
    wait (halted);
    @(negedge clk);

    // ------------------------------------------------ reference FFT
    for (int s = 0; s < 10; s++) begin
      int half;
      half = 1 << s;
      for (int k = 0; k < NP / 2; k++) begin
        int a, b, m, tr, ti, ar, ai;
        a = (k / half) * 2 * half + k % half;
        b = a + half;
        m = (k % half) * (NP / 2 / half);
        tr = (wr[m] * xr[b] - wi[m] * xi[b]) >>> 12;
        ti = (wr[m] * xi[b] + wi[m] * xr[b]) >>> 12;
        ar = xr[a]; ai = xi[a];
        xr[a] = ar + tr; xi[a] = ai + ti;
        xr[b] = ar - tr; xi[b] = ai - ti;
      end
    end
    for (int n = 0; n < NP; n++) begin
      checks += 2;
      if (dmem[RE + n] !== xr[n] || dmem[IM + n] !== xi[n]) begin
        failures++;
        if (failures < 10)
          $display("FAIL X[%0d] = %0d, %0d expected %0d, %0d", n, int'(dmem[RE + n]),
                   int'(dmem[IM + n]), xr[n], xi[n]);
      end
    end
    // the tone: 100 * cos -> magnitude 100 * 1024 / 2 in bins 37 and 1024 - 37
    checks++;
    if (int'(dmem[RE + 37]) < 45000 || int'(dmem[RE + 37]) > 57000) begin
      failures++;
      $display("FAIL tone bin 37 = %0d", int'(dmem[RE + 37]));
    end
    checks++;
    if (n_cycles != 1 + 10 * (4 + (NP / 2) * II)) begin
      failures++;
      $display("FAIL cycles %0d expected %0d", n_cycles, 1 + 10 * (4 + (NP / 2) * II));
    end
    checks++;
    if (n_calls != 10 || n_cga != 10 * (NP / 2) * II) begin
      failures++;
      $display("FAIL CGA calls %0d cycles %0d", n_calls, n_cga);
    end
    $display("1024-point FFT: %0d cycles, %0d in CGA mode over %0d loop calls; X[37] = %0d, %0d",
             n_cycles, n_cga, n_calls, int'(dmem[RE + 37]), int'(dmem[IM + 37]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
