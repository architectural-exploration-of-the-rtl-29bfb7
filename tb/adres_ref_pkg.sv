// adres_ref_pkg: reference model of one FU operation, written independently
// of the RTL, for the testbenches of the ADRES array.
package adres_ref_pkg;
  import adres_pkg::*;

  typedef struct {
    logic [31:0] d;      // data result
    logic        c;      // compare condition
    logic        wr;     // writes a data result
    logic        cmp;    // writes predicates
  } ref_res_t;

  function automatic ref_res_t ref_fu(input opcode_e op, input logic [31:0] a,
                                      input logic [31:0] b, input bit mem_en,
                                      input logic [31:0] mdin);
    ref_res_t r;
    longint p;
    r.d = 0; r.c = 0; r.wr = 1; r.cmp = 0;
    p = longint'(a) * longint'(b);
    case (op)
      OP_ADD: r.d = a + b;
      OP_SUB: r.d = a - b;
      OP_MUL: r.d = p[31:0];
      OP_AND: r.d = a & b;
      OP_OR:  r.d = a | b;
      OP_XOR: r.d = a ^ b;
      OP_SHL: r.d = a << (b % 32);
      OP_SHR: r.d = a >> (b % 32);
      OP_SRA: r.d = 32'($signed(a) >>> (b % 32));
      OP_MOV: r.d = a;
      OP_EQ:  begin r.c = (a == b); r.cmp = 1; end
      OP_NE:  begin r.c = (a != b); r.cmp = 1; end
      OP_LT:  begin r.c = ($signed(a) < $signed(b)); r.cmp = 1; end
      OP_LTU: begin r.c = (a < b); r.cmp = 1; end
      OP_LD:  begin r.d = mdin; r.wr = mem_en; end
      default: r.wr = 0;
    endcase
    if (r.cmp) begin r.d = {31'b0, r.c}; r.wr = 0; end
    return r;
  endfunction

  // Operations a random test may pick.
  function automatic opcode_e rand_op();
    opcode_e ops [17] = '{OP_NOP, OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_SHL,
                          OP_SHR, OP_SRA, OP_MOV, OP_EQ, OP_NE, OP_LT, OP_LTU, OP_LD, OP_ST};
    return ops[$urandom_range(0, 16)];
  endfunction
endpackage
