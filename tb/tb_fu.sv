// tb_fu: self-checking test of the functional unit.
// Drives random operands through every operation, on a load/store-capable
// FU and on one without memory access, and compares dst1, the predicate
// outputs, the write enables and the memory signals with a reference model
// written here. The FU is combinational: results are checked after a small
// settling delay, one operation per clock.
module tb_fu;
  import adres_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  opcode_e           op;
  logic [DATA_W-1:0] s1, s2, s3, mdin;
  logic              pin;
  logic [DATA_W-1:0] d_m, d_n, ma, mdo, ma_n, mdo_n;
  logic              dwe_m, p1_m, p2_m, pwe_m, re_m, we_m;
  logic              dwe_n, p1_n, p2_n, pwe_n, re_n, we_n;

  fu #(.MEM_EN(1'b1)) dut_m (.op, .src1(s1), .src2(s2), .src3(s3), .pred_in(pin),
    .dst1(d_m), .dst_we(dwe_m), .pred_dst1(p1_m), .pred_dst2(p2_m), .pred_we(pwe_m),
    .mem_addr(ma), .mem_data_out(mdo), .mem_data_in(mdin), .mem_re(re_m), .mem_we(we_m));
  fu #(.MEM_EN(1'b0)) dut_n (.op, .src1(s1), .src2(s2), .src3(s3), .pred_in(pin),
    .dst1(d_n), .dst_we(dwe_n), .pred_dst1(p1_n), .pred_dst2(p2_n), .pred_we(pwe_n),
    .mem_addr(ma_n), .mem_data_out(mdo_n), .mem_data_in(mdin), .mem_re(re_n), .mem_we(we_n));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%s s1=%h s2=%h: got %h expected %h", what, op.name(), s1, s2, got, exp);
    end
  endtask

  opcode_e ops [17] = '{OP_NOP, OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_SHL,
                        OP_SHR, OP_SRA, OP_MOV, OP_EQ, OP_NE, OP_LT, OP_LTU, OP_LD, OP_ST};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] exp_d;
    logic              exp_c, alu, cmp;
    longint            prod;
    for (int n = 0; n < 3000; n++) begin
      op   = ops[n % 17];
      s1   = $urandom;
      s2   = (n % 5 == 0) ? s1 : ((n % 7 == 0) ? (s1 + 1) : $urandom);
      if (n % 11 == 0) s2 = $urandom_range(0, 40);
      s3   = $urandom;
      mdin = $urandom;
      pin  = (n % 4 != 3);
      @(posedge clk); #1;
      exp_d = '0; exp_c = 0; alu = 1; cmp = 0;
      prod  = longint'(s1) * longint'(s2);
      case (op)
        OP_ADD: exp_d = s1 + s2;
        OP_SUB: exp_d = s1 - s2;
        OP_MUL: exp_d = prod[31:0];
        OP_AND: exp_d = s1 & s2;
        OP_OR:  exp_d = s1 | s2;
        OP_XOR: exp_d = s1 ^ s2;
        OP_SHL: exp_d = s1 << (s2 % 32);
        OP_SHR: exp_d = s1 >> (s2 % 32);
        OP_SRA: exp_d = DATA_W'($signed(s1) >>> (s2 % 32));
        OP_MOV: exp_d = s1;
        OP_EQ:  begin exp_c = s1 == s2; cmp = 1; end
        OP_NE:  begin exp_c = s1 != s2; cmp = 1; end
        OP_LT:  begin exp_c = $signed(s1) < $signed(s2); cmp = 1; end
        OP_LTU: begin exp_c = s1 < s2; cmp = 1; end
        OP_LD:  exp_d = mdin;
        default: alu = 0;
      endcase
      if (cmp) exp_d = {31'b0, exp_c};
      check("dst1", d_m, exp_d);
      check("dst_we", dwe_m, pin & (alu | cmp));
      check("pred_dst1", p1_m, exp_c);
      check("pred_dst2", p2_m, 64'(!exp_c));
      check("pred_we", pwe_m, pin & cmp);
      check("mem_addr", ma, 64'(DATA_W'(s1 + s2)));
      check("mem_data_out", mdo, s3);
      check("mem_re", re_m, pin & (op == OP_LD));
      check("mem_we", we_m, pin & (op == OP_ST));
      // an FU without memory access never loads or stores
      check("nomem_re", re_n, 1'b0);
      check("nomem_we", we_n, 1'b0);
      check("nomem_we_ld", dwe_n, pin & ((alu && op != OP_LD) | cmp));
      if (op != OP_LD) check("nomem_dst1", d_n, exp_d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
