// tb_vliw_cu: self-checking test of the VLIW control unit.
// A small program in a testbench instruction memory exercises sequential
// fetch, a conditional branch not taken, an unconditional and a taken
// conditional branch, a CGA loop of 4 iterations with II = 3, a CGA loop
// with a zero count (skipped), a CGA loop whose context addresses wrap at
// the end of the 128-word configuration memory, and HALT. The expected
// trace (pc, mode, context address, dispatched instruction, halted) is
// written out by hand below and compared cycle by cycle; the CGA loops must
// last exactly II x count cycles.
module tb_vliw_cu;
  import adres_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [PC_W-1:0]   imem_addr;
  vliw_instr_t       imem_rdata;
  logic [DATA_W-1:0] slot0_src1;
  logic              slot0_pred;
  vliw_instr_t       dispatch;
  logic              cga_en, halted;
  logic [CM_AW-1:0]  ctx;

  vliw_cu dut (.*);

  vliw_instr_t prog [16];
  logic [31:0] regs [4] = '{0, 4, 2, 7};
  logic        preds [4] = '{0, 0, 1, 0};

  always_comb begin
    imem_rdata = prog[imem_addr[3:0]];
    slot0_src1 = regs[imem_rdata[0].src1[1:0]];
    slot0_pred = preds[imem_rdata[0].pred[1:0]];
  end

  function automatic vliw_instr_t ins(opcode_e op, int src1, int imm, bit pen, int pred);
    vliw_instr_t i = '0;
    i[0].op = op; i[0].src1 = GRF_AW'(src1); i[0].imm = IMM_W'(imm);
    i[0].pred_en = pen; i[0].pred = GRF_AW'(pred);
    // the other slots carry ordinary operations, to see them dispatched
    for (int s = 1; s < COLS; s++) begin i[s].op = OP_ADD; i[s].dst = GRF_AW'(s); i[s].imm = IMM_W'(op); end
    return i;
  endfunction

  int cyc = 0, n_cga = 0;

  task automatic step_vliw(int pc);
    #1;
    checks++;
    if (imem_addr !== PC_W'(pc) || cga_en || halted || dispatch !== prog[pc]) begin
      failures++;
      $display("FAIL cycle %0d: pc %0d cga %b halted %b, expected VLIW at pc %0d", cyc, imem_addr, cga_en, halted, pc);
    end
    @(posedge clk); cyc++;
  endtask

  task automatic step_cga(int c);
    #1;
    checks++;
    if (!cga_en || ctx !== CM_AW'(c) || dispatch !== '0) begin
      failures++;
      $display("FAIL cycle %0d: cga %b ctx %0d, expected CGA context %0d", cyc, cga_en, ctx, c);
    end
    n_cga++;
    @(posedge clk); cyc++;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) prog[i] = ins(OP_HALT, 0, 0, 0, 0);
    prog[0]  = ins(OP_NOP, 0, 0, 0, 0);
    prog[1]  = ins(OP_CGA, 1, (2 << 7) | 10, 0, 0);     // 4 iterations, II 3, base 10
    prog[2]  = ins(OP_BR, 0, 5, 1, 1);                  // p1 = 0: not taken
    prog[3]  = ins(OP_BR, 0, 6, 0, 0);                  // taken
    prog[4]  = ins(OP_HALT, 0, 0, 0, 0);
    prog[6]  = ins(OP_CGA, 0, (2 << 7) | 10, 0, 0);     // count 0: skipped
    prog[7]  = ins(OP_CGA, 2, (15 << 7) | 120, 0, 0);   // 2 iterations, II 16, wraps
    prog[8]  = ins(OP_BR, 0, 10, 1, 2);                 // p2 = 1: taken
    prog[10] = ins(OP_HALT, 0, 0, 0, 0);
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    step_vliw(0);
    step_vliw(1);
    for (int i = 0; i < 12; i++) step_cga(10 + i % 3);
    step_vliw(2);
    step_vliw(3);
    step_vliw(6);
    step_vliw(7);
    for (int i = 0; i < 32; i++) step_cga((120 + i % 16) % 128);
    step_vliw(8);
    step_vliw(10);
    for (int i = 0; i < 5; i++) begin
      #1;
      checks++;
      if (!halted || imem_addr !== PC_W'(10) || cga_en || dispatch !== '0) begin
        failures++;
        $display("FAIL cycle %0d: not halted at pc 10", cyc);
      end
      @(posedge clk); cyc++;
    end
    checks++;
    if (n_cga != 12 + 32) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
