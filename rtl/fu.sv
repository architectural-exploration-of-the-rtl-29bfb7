// fu: ADRES functional unit (non-pipelined, purely combinational).
//
// The FU takes up to three source operands (src1, src2, src3) and a guard
// predicate (pred_in) and produces one data result (dst1) and two predicate
// results (pred_dst1, pred_dst2), matching the port set of the document's
// data path figure: "All FUs have 1 destination and 3 source ports at most".
// Every FU can add and multiply; only FUs built with MEM_EN = 1 (the VLIW
// section) execute loads and stores, through the mem_* ports. This follows
// the document. The rest of the operation set (logic, shifts, compares) and
// the result encodings are this design's choice.
//
// Timing: everything is combinational; the owner registers the results at
// the next clock edge (the document's ADRESv0 core is not pipelined). The
// write enables dst_we / pred_we are already gated by pred_in, so a false
// guard turns the operation into a no-op, including a store. A compare drives
// pred_dst1 = condition and pred_dst2 = its complement and writes 0/1 on dst1.
// A load returns mem_data_in in the same cycle (zero-wait data memory).
module fu
  import adres_pkg::*;
#(
  parameter bit MEM_EN = 1'b0   // 1: load/store capable (VLIW section)
) (
  input  opcode_e           op,
  input  logic [DATA_W-1:0] src1,
  input  logic [DATA_W-1:0] src2,
  input  logic [DATA_W-1:0] src3,
  input  logic              pred_in,
  output logic [DATA_W-1:0] dst1,
  output logic              dst_we,
  output logic              pred_dst1,
  output logic              pred_dst2,
  output logic              pred_we,
  // data memory side
  output logic [DATA_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_data_out,
  input  logic [DATA_W-1:0] mem_data_in,
  output logic              mem_re,
  output logic              mem_we
);

  logic cond;
  logic is_alu, is_cmp;

  always_comb begin
    dst1   = '0;
    cond   = 1'b0;
    is_alu = 1'b1;
    is_cmp = 1'b0;
    unique case (op)
      OP_ADD: dst1 = src1 + src2;
      OP_SUB: dst1 = src1 - src2;
      OP_MUL: dst1 = src1 * src2;
      OP_AND: dst1 = src1 & src2;
      OP_OR:  dst1 = src1 | src2;
      OP_XOR: dst1 = src1 ^ src2;
      OP_SHL: dst1 = src1 << src2[4:0];
      OP_SHR: dst1 = src1 >> src2[4:0];
      OP_SRA: dst1 = $signed(src1) >>> src2[4:0];
      OP_MOV: dst1 = src1;
      OP_EQ:  begin cond = (src1 == src2); is_cmp = 1'b1; end
      OP_NE:  begin cond = (src1 != src2); is_cmp = 1'b1; end
      OP_LT:  begin cond = ($signed(src1) < $signed(src2)); is_cmp = 1'b1; end
      OP_LTU: begin cond = (src1 < src2); is_cmp = 1'b1; end
      OP_LD:  begin dst1 = mem_data_in; is_alu = MEM_EN; end
      default: is_alu = 1'b0;   // NOP, ST and control operations
    endcase
    if (is_cmp) dst1 = {{(DATA_W-1){1'b0}}, cond};
  end

  assign pred_dst1    = cond;
  assign pred_dst2    = ~cond;
  assign dst_we       = pred_in & is_alu;
  assign pred_we      = pred_in & is_cmp;
  assign mem_addr     = src1 + src2;
  assign mem_data_out = src3;
  assign mem_re       = MEM_EN & pred_in & (op == OP_LD);
  assign mem_we       = MEM_EN & pred_in & (op == OP_ST);

endmodule
