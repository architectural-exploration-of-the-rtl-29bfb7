// tb_idct396: the 2-D 8x8 IDCT of 396 blocks run on the 4x4 array at its
// default sizes.
//
// The IDCT is computed as two passes of 8-point matrix-vector products,
//   y[i] = (sum_k M[i][k] * x[k]) >>> 12,
//   M[i][k] = round(4096 * c(k)/2 * cos((2i+1) k pi / 16)), c(0) = 1/sqrt(2),
// over 396 x 8 = 3168 vectors per pass. Each pass reads vector V from
// in + 8V and writes element i to out + 64*(V/8) + 8i + V%8, i.e. it
// transposes each block, so the second pass (rows of the transposed first
// result) returns the blocks in natural order.
//
// Data memory (testbench model, word addresses): M at 0 (64 words), the
// coefficient blocks X at 64, the intermediate T at 25408, the result Y at
// 50752.
//
// Array mapping:
//   * a one-iteration setup loop (17 contexts at CM address 64) loads M
//     through row 0 and leaves column k of M in the local DRF words 0..7 of
//     tile (1,k) for k < 4 and tile (2,k-4) for k >= 4;
//   * the IDCT loop (II = 32 contexts, one vector per iteration): row 0
//     computes the addresses in the global DRF and loads x[0..7], which
//     rows 1 and 2 keep in DRF word 8 (over the mesh and mesh_plus links);
//     then for each output i the eight tiles multiply DRF[i] x DRF[8], row 3
//     adds the pairs (mesh and mesh_plus from above), (3,0) and (3,3) add
//     across, (3,1) adds those two (mesh W and mesh_plus E2), (2,1) scales,
//     and (0,1) stores the result (mesh_plus S2). Each output takes six
//     contexts (b .. b+5) and a new one starts every 3: in context phase 0
//     the multiplies of output i run beside the last add of output i-1,
//     phase 1 holds the pair adds and the scaling, phase 2 the cross adds
//     and the store, so no tile is asked for two operations at once and
//     every output register is read before it is overwritten.
// The result is compared word for word with the same fixed-point algorithm
// computed here; a DC-only block must come out flat; the run must take
// exactly 7 + 17 + 2 x 3168 x 32 cycles.
module tb_idct396;
  import adres_pkg::*;

  localparam int NB = 396;             // 8x8 blocks
  localparam int NV = NB * 8;          // vectors per pass
  localparam int CB = 0, XB = 64, TB = XB + NB * 64, YB = TB + NB * 64;
  localparam int MW = YB + NB * 64;
  localparam int II = 32;
  localparam int IO = 5;               // first output context

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m [8][8];
  int ref_t [NB * 64], ref_y [NB * 64];

  // One pass of the reference: vectors from src, transposed into dst.
  task automatic ref_pass(input int src_base, input bit from_x, output int dst [NB * 64]);
    for (int vv = 0; vv < NV; vv++)
      for (int i = 0; i < 8; i++) begin
        int acc;
        acc = 0;
        for (int k = 0; k < 8; k++)
          acc += m[i][k] * (from_x ? int'(dmem[src_base + 8 * vv + k]) : ref_t[8 * vv + k]);
        dst[64 * (vv / 8) + 8 * i + vv % 8] = acc >>> 12;
      end
  endtask

  initial begin
    const real PI = 3.14159265358979323846;
    cfg_we = 0; cfg_row = 0; cfg_col = 0; cfg_unit = CU_FU; cfg_addr = 0; cfg_wdata = 0;

    // ------------------------------------------------ data
    for (int a = 0; a < MW; a++) dmem[a] = 0;
    for (int i = 0; i < 8; i++)
      for (int k = 0; k < 8; k++) begin
        real ck;
        ck = (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        m[i][k] = rnd(4096.0 * ck / 2.0 * $cos((2 * i + 1) * k * PI / 16.0));
        dmem[CB + 8 * i + k] = m[i][k];
      end
    // block 0: DC only; other blocks: decaying random coefficients
    dmem[XB] = 256;
    for (int b = 1; b < NB; b++)
      for (int n = 0; n < 64; n++)
        dmem[XB + 64 * b + n] = int'($urandom_range(0, 512 >> (n / 8))) - (256 >> (n / 8));

    // ------------------------------------------------ VLIW program
    // r23 vector V, r24 input base, r25 output base, r26 M base
    for (int i = 0; i < 8; i++) prog[i] = ins4(vop(OP_HALT), vop(OP_NOP), vop(OP_NOP), vop(OP_NOP));
    prog[0] = ins4(vop(OP_ADD, 26, 0, 0, 0, 1, CB), vop(OP_ADD, 24, 0, 0, 0, 1, XB),
                   vop(OP_ADD, 25, 0, 0, 0, 1, TB), vop(OP_ADD, 6, 0, 0, 0, 1, NV));
    prog[1] = ins4(vop(OP_ADD, 9, 0, 0, 0, 1, 1),  vop(OP_ADD, 27, 0, 0, 0, 1, YB / 64),
                   vop(OP_ADD, 23, 0, 0, 0, 1, 0), vop(OP_NOP));
    prog[2] = ins4(vop(OP_CGA, 0, 9, 0, 0, 0, (16 << 7) | 64), vop(OP_SHL, 27, 27, 0, 0, 1, 6),
                   vop(OP_NOP), vop(OP_NOP));
    prog[3] = ins4(vop(OP_CGA, 0, 6, 0, 0, 0, ((II - 1) << 7) | 0), vop(OP_NOP), vop(OP_NOP), vop(OP_NOP));
    prog[4] = ins4(vop(OP_ADD, 24, 25, 0, 0, 1, 0), vop(OP_ADD, 25, 27, 0, 0, 1, 0),
                   vop(OP_ADD, 23, 0, 0, 0, 1, 0),  vop(OP_NOP));
    prog[5] = ins4(vop(OP_CGA, 0, 6, 0, 0, 0, ((II - 1) << 7) | 0), vop(OP_NOP), vop(OP_NOP), vop(OP_NOP));
    prog[6] = ins4(vop(OP_HALT), vop(OP_NOP), vop(OP_NOP), vop(OP_NOP));

    // ------------------------------------------------ array contexts
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        for (int u = 0; u < 3; u++) begin
          for (int a = 0; a < II; a++) cfgw(r, c, cfg_unit_e'(u), a, '0);
          for (int a = 64; a <= 80; a++) cfgw(r, c, cfg_unit_e'(u), a, '0);
        end
    // setup loop: column k of M into DRF words 0..7 of its tile
    for (int i = 0; i < 8; i++)
      for (int c = 0; c < 4; c++) begin
        cfgw(0, c, CU_FU, 64 + 2 * i,     v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, 8 * i + c + 4, 26, 0, 0, 0));
        cfgw(0, c, CU_FU, 64 + 2 * i + 1, v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, 8 * i + c, 26, 0, 0, 0));
        cfgw(2, c, CU_FU,  64 + 2 * i + 1, f(OP_MOV, SRC_N2, SRC_IMM));
        cfgw(2, c, CU_DRF, 64 + 2 * i + 1, d(0, 0, 1, i, WSRC_OWN));
        cfgw(1, c, CU_FU,  64 + 2 * i + 2, f(OP_MOV, SRC_N, SRC_IMM));
        cfgw(1, c, CU_DRF, 64 + 2 * i + 2, d(0, 0, 1, i, WSRC_OWN));
      end
    // IDCT loop, contexts 0..4: addresses and loads
    cfgw(0, 0, CU_FU, 0, v(OP_SHL, SRC_RFA, SRC_IMM, SRC_RFA, 3, 23, 0, 1, 20));    // r20 = V << 3
    cfgw(0, 1, CU_FU, 0, v(OP_AND, SRC_RFA, SRC_IMM, SRC_RFA, 7, 23, 0, 1, 21));    // r21 = V & 7
    cfgw(0, 2, CU_FU, 0, v(OP_SHR, SRC_RFA, SRC_IMM, SRC_RFA, 3, 23, 0, 1, 22));    // r22 = V >> 3
    cfgw(0, 0, CU_FU, 1, v(OP_ADD, SRC_RFA, SRC_RFA, SRC_RFA, 0, 20, 24, 1, 20));   // r20 += in
    cfgw(0, 2, CU_FU, 1, v(OP_SHL, SRC_RFA, SRC_IMM, SRC_RFA, 6, 22, 0, 1, 22));    // r22 <<= 6
    for (int c = 0; c < 4; c++) begin
      cfgw(0, c, CU_FU, 2, v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, c, 20, 0, 0, 0));      // x[c]
      cfgw(0, c, CU_FU, 3, v(OP_LD, SRC_RFA, SRC_IMM, SRC_RFA, c + 4, 20, 0, 0, 0));  // x[c+4]
      cfgw(1, c, CU_FU,  3, f(OP_MOV, SRC_N, SRC_IMM));
      cfgw(1, c, CU_DRF, 3, d(0, 0, 1, 8, WSRC_OWN));
      cfgw(2, c, CU_FU,  4, f(OP_MOV, SRC_N2, SRC_IMM));
      cfgw(2, c, CU_DRF, 4, d(0, 0, 1, 8, WSRC_OWN));
    end
    cfgw(0, 0, CU_FU, 4, v(OP_ADD, SRC_RFA, SRC_IMM, SRC_RFA, 1, 23, 0, 1, 23));    // V++
    cfgw(0, 1, CU_FU, 4, v(OP_ADD, SRC_RFA, SRC_RFA, SRC_RFA, 0, 21, 22, 1, 21));   // r21 += r22
    cfgw(0, 1, CU_FU, 5, v(OP_ADD, SRC_RFA, SRC_RFA, SRC_RFA, 0, 21, 25, 1, 21));   // r21 += out
    // outputs i = 0..7, three contexts apart
    for (int i = 0; i < 8; i++) begin
      int b;
      b = IO + 3 * i;
      for (int c = 0; c < 4; c++)
        for (int r = 1; r <= 2; r++) begin
          cfgw(r, c, CU_FU,  b, f(OP_MUL, SRC_RFA, SRC_RFB));
          cfgw(r, c, CU_DRF, b, d(i, 8, 0, 0, WSRC_OWN));
        end
      for (int c = 0; c < 4; c++) cfgw(3, c, CU_FU, b + 1, f(OP_ADD, SRC_N, SRC_N2));
      cfgw(3, 0, CU_FU, b + 2, f(OP_ADD, SRC_SELF, SRC_E));
      cfgw(3, 3, CU_FU, b + 2, f(OP_ADD, SRC_SELF, SRC_W));
      cfgw(3, 1, CU_FU, b + 3, f(OP_ADD, SRC_W, SRC_E2));
      cfgw(2, 1, CU_FU, b + 4, f(OP_SRA, SRC_S, SRC_IMM, 12));
      cfgw(0, 1, CU_FU, b + 5, v(OP_ST, SRC_RFA, SRC_IMM, SRC_S2, 8 * i, 21, 0, 0, 0));
    end

    // ------------------------------------------------ run
    @(negedge clk);
    rst_n = 1;
    wait (halted);
    @(negedge clk);

    // ------------------------------------------------ reference
    ref_pass(XB, 1'b1, ref_t);
    ref_pass(0, 1'b0, ref_y);
    for (int n = 0; n < NB * 64; n++) begin
      checks += 2;
      if (dmem[TB + n] !== ref_t[n] || dmem[YB + n] !== ref_y[n]) begin
        failures++;
        if (failures < 10)
          $display("FAIL word %0d: T %0d Y %0d expected T %0d Y %0d", n, int'(dmem[TB + n]),
                   int'(dmem[YB + n]), ref_t[n], ref_y[n]);
      end
    end
    // a DC-only block is flat after the IDCT (256 / 8 = 32, less truncation)
    for (int n = 0; n < 64; n++) begin
      checks++;
      if (dmem[YB + n] !== dmem[YB] || int'(dmem[YB]) < 30 || int'(dmem[YB]) > 32) begin
        failures++;
        $display("FAIL DC block word %0d = %0d", n, int'(dmem[YB + n]));
      end
    end
    checks++;
    if (n_cycles != 7 + 17 + 2 * NV * II || n_calls != 3) begin
      failures++;
      $display("FAIL cycles %0d expected %0d, CGA calls %0d", n_cycles, 7 + 17 + 2 * NV * II, n_calls);
    end
    $display("IDCT of %0d blocks: %0d cycles, %0d in CGA mode over %0d loop calls", NB, n_cycles, n_cga, n_calls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
