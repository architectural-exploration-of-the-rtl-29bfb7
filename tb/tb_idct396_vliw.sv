// tb_idct396_vliw: the same 2-D 8x8 IDCT of 396 blocks as tb_idct396, run
// in VLIW mode only (the array stays idle), at the default sizes.
//
// Algorithm and data layout are those of tb_idct396: two passes of 8-point
// matrix-vector products y[i] = (sum_k M[i][k] x[k]) >>> 12 with M in 12-bit
// fixed point, each pass writing its output transposed; M is not stored but
// carried in the 16-bit immediates of the multiplies.
//
// The loop body (one vector per iteration) is generated here as a list of
// operations and packed into 4-slot instructions by a small list scheduler
// that respects read-after-write (a result is visible one instruction
// later), write-after-read (a write may share the instruction of an earlier
// read, which still sees the old value) and write-after-write order. All
// four VLIW FUs can load and store. The body ends with a guarded branch in
// slot 0 on a compare written to the global PRF. Registers: r1..r8 inputs,
// r9..r40 four banks of eight products for consecutive outputs, r41..r47
// addresses and the vector counter, r49 a base address, PRF word 1 the loop
// condition.
//
// Checks: T and Y word for word against the same fixed-point algorithm, a
// DC-only block must come out flat, the exact cycle count
// (2 + 1 + 1 + 2 x 3168 x body length), the number of taken branches, loads
// and stores, and that the array never left VLIW mode.
module tb_idct396_vliw;
  import adres_pkg::*;

  localparam int NB = 396;             // 8x8 blocks
  localparam int NV = NB * 8;          // vectors per pass
  localparam int CB = 0, XB = 64, TB = XB + NB * 64, YB = TB + NB * 64;
  localparam int MW = YB + NB * 64;

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

  vliw_instr_t prog [128];
  logic [31:0] dmem [MW];

  always_comb begin
    imem_rdata = prog[imem_addr[6:0]];
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


  // ------------------------------------------------ list scheduler
  localparam int MAXI = 64;            // instructions per body, at most
  vliw_op_t sch     [MAXI][4];
  bit       sch_use [MAXI][4];
  int       lastw [128], lastr [128];  // 0..63 DRF, 64..127 PRF
  int       body_len;

  task automatic sch_reset();
    for (int t = 0; t < MAXI; t++)
      for (int s = 0; s < 4; s++) begin sch[t][s] = '0; sch_use[t][s] = 0; end
    for (int r = 0; r < 128; r++) begin lastw[r] = -1; lastr[r] = -1; end
    body_len = 0;
  endtask

  // Place one operation at the earliest instruction its dependences allow,
  // filling slot 0 last (it is kept for the branch).
  task automatic put(opcode_e op, int dst, int s1, int s2, int s3, bit ie, int imm);
    int rd [3], nrd, wr, e;
    bit done;
    nrd = 0;
    rd[nrd++] = s1;
    if (op == OP_ST) rd[nrd++] = s3;
    else if (!ie) rd[nrd++] = s2;
    wr = (op == OP_ST) ? -1 : (op inside {OP_EQ, OP_NE, OP_LT, OP_LTU}) ? 64 + dst : dst;
    e = 0;
    for (int i = 0; i < nrd; i++) if (lastw[rd[i]] + 1 > e) e = lastw[rd[i]] + 1;
    if (wr >= 0) begin
      if (lastr[wr] > e) e = lastr[wr];
      if (lastw[wr] + 1 > e) e = lastw[wr] + 1;
    end
    done = 0;
    for (int t = e; t < MAXI && !done; t++)
      for (int s = 3; s >= 0 && !done; s--)
        if (!sch_use[t][s]) begin
          sch[t][s] = vop(op, dst, s1, s2, s3, ie, imm);
          sch_use[t][s] = 1;
          for (int i = 0; i < nrd; i++) if (t > lastr[rd[i]]) lastr[rd[i]] = t;
          if (wr >= 0) lastw[wr] = t;
          if (t + 1 > body_len) body_len = t + 1;
          done = 1;
        end
    if (!done) $fatal(1, "schedule does not fit");
  endtask

  int m [8][8];

  // One vector: r45 = V, r46 = input base, r47 = output base.
  task automatic gen_body(int start);
    int bk, t;
    sch_reset();
    put(OP_SHL, 41, 45, 0, 0, 1, 3);          // ia = V << 3
    put(OP_ADD, 41, 41, 46, 0, 0, 0);         // ia += in
    for (int k = 0; k < 8; k++) put(OP_LD, 1 + k, 41, 0, 0, 1, k);
    put(OP_AND, 42, 45, 0, 0, 1, 7);          // V & 7
    put(OP_SHR, 43, 45, 0, 0, 1, 3);          // V >> 3
    put(OP_SHL, 43, 43, 0, 0, 1, 6);          // (V >> 3) << 6
    put(OP_ADD, 44, 42, 43, 0, 0, 0);         // ob
    put(OP_ADD, 44, 44, 47, 0, 0, 0);         // ob += out
    for (int i = 0; i < 8; i++) begin
      bk = 9 + 8 * (i % 4);
      for (int k = 0; k < 8; k++) put(OP_MUL, bk + k, 1 + k, 0, 0, 1, m[i][k]);
      for (int k = 0; k < 8; k += 2) put(OP_ADD, bk + k, bk + k, bk + k + 1, 0, 0, 0);
      put(OP_ADD, bk, bk, bk + 2, 0, 0, 0);
      put(OP_ADD, bk + 4, bk + 4, bk + 6, 0, 0, 0);
      put(OP_ADD, bk, bk, bk + 4, 0, 0, 0);
      put(OP_SRA, bk, bk, 0, 0, 1, 12);
      put(OP_ST, 0, 44, 0, bk, 1, 8 * i);
    end
    put(OP_ADD, 45, 45, 0, 0, 1, 1);          // V++
    put(OP_NE, 1, 45, 0, 0, 1, NV);           // PRF[1] = V != NV
    t = body_len - 1;
    if (lastw[65] >= t || sch_use[t][0]) t++;
    sch[t][0] = vop(OP_BR, 0, 0, 0, 0, 0, start, 1, 1);
    body_len = t + 1;
    for (int i = 0; i < body_len; i++) prog[start + i] = {sch[i][3], sch[i][2], sch[i][1], sch[i][0]};
  endtask

  // ------------------------------------------------ counters and watchdog
  int n_cycles = 0, n_cga = 0, n_br = 0, n_ld = 0, n_st = 0;
  always @(posedge clk) if (rst_n && !halted) begin
    n_cycles++;
    if (cga_en) n_cga++;
    n_ld += $countones(dmem_re);
    n_st += $countones(dmem_we);
    if (prog[imem_addr[6:0]][0].op == OP_BR && dut.u_cu.guard) n_br++;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_t [NB * 64], ref_y [NB * 64];

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
    int p2, len, exp_cycles;
    cfg_we = 0; cfg_row = 0; cfg_col = 0; cfg_unit = CU_FU; cfg_addr = 0; cfg_wdata = 0;

    for (int a = 0; a < MW; a++) dmem[a] = 0;
    for (int i = 0; i < 8; i++)
      for (int k = 0; k < 8; k++) begin
        real ck;
        ck = (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        m[i][k] = rnd(4096.0 * ck / 2.0 * $cos((2 * i + 1) * k * PI / 16.0));
      end
    dmem[XB] = 256;
    for (int b = 1; b < NB; b++)
      for (int n = 0; n < 64; n++)
        dmem[XB + 64 * b + n] = int'($urandom_range(0, 512 >> (n / 8))) - (256 >> (n / 8));

    // ------------------------------------------------ program
    for (int i = 0; i < 128; i++) prog[i] = ins4(vop(OP_HALT), vop(OP_NOP), vop(OP_NOP), vop(OP_NOP));
    prog[0] = ins4(vop(OP_ADD, 46, 0, 0, 0, 1, XB), vop(OP_ADD, 47, 0, 0, 0, 1, TB),
                   vop(OP_ADD, 45, 0, 0, 0, 1, 0),  vop(OP_ADD, 49, 0, 0, 0, 1, YB / 64));
    prog[1] = ins4(vop(OP_NOP), vop(OP_SHL, 49, 49, 0, 0, 1, 6), vop(OP_NOP), vop(OP_NOP));
    gen_body(2);
    len = body_len;
    p2 = 2 + len;
    prog[p2] = ins4(vop(OP_NOP), vop(OP_ADD, 46, 47, 0, 0, 1, 0), vop(OP_ADD, 47, 49, 0, 0, 1, 0),
                    vop(OP_ADD, 45, 0, 0, 0, 1, 0));
    gen_body(p2 + 1);
    prog[p2 + 1 + len] = ins4(vop(OP_HALT), vop(OP_NOP), vop(OP_NOP), vop(OP_NOP));
    exp_cycles = 2 + 1 + 1 + 2 * NV * len;

    // the array is not used: its memories hold NOPs
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        for (int u = 0; u < 3; u++) cfgw(r, c, cfg_unit_e'(u), 0, '0);

    @(negedge clk);
    rst_n = 1;
    wait (halted);
    @(negedge clk);

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
    for (int n = 0; n < 64; n++) begin
      checks++;
      if (dmem[YB + n] !== dmem[YB] || int'(dmem[YB]) < 30 || int'(dmem[YB]) > 32) begin
        failures++;
        $display("FAIL DC block word %0d = %0d", n, int'(dmem[YB + n]));
      end
    end
    checks += 5;
    if (n_cycles != exp_cycles) begin
      failures++;
      $display("FAIL cycles %0d expected %0d", n_cycles, exp_cycles);
    end
    if (n_br != 2 * (NV - 1)) begin failures++; $display("FAIL taken branches %0d", n_br); end
    if (n_ld != 2 * NV * 8)   begin failures++; $display("FAIL loads %0d", n_ld); end
    if (n_st != 2 * NV * 8)   begin failures++; $display("FAIL stores %0d", n_st); end
    if (n_cga != 0)           begin failures++; $display("FAIL array mode used"); end
    $display("IDCT of %0d blocks in VLIW mode: body of %0d instructions, %0d cycles, %0d taken branches",
             NB, len, n_cycles, n_br);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
