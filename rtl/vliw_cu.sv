// vliw_cu: VLIW control unit: instruction fetch, dispatch, branch control
// and the VLIW/CGA mode controller.
//
// In VLIW mode the unit fetches one 4-slot instruction per cycle from the
// instruction cache at pc (imem_addr; the cache is assumed never to miss, so
// imem_rdata answers in the same cycle) and dispatches its four operations
// to the four VLIW FUs. Slot 0 may hold a control operation, evaluated here:
//   OP_BR   pc <= imm[PC_W-1:0] when the guard is true, else pc + 1
//   OP_CGA  start an array loop: the document's "CGA instruction in VLIW
//           mode that works as a function call"
//   OP_HALT stop fetching (halted = 1)
// The guard of slot 0 is the global PRF word read by slot 0 (slot0_pred)
// when pred_en is set. The other three slots of the same instruction
// execute normally.
//
// CGA operand (this design's encoding): imm[6:0] is the first context
// address in the configuration memories, imm[13:7] the number of contexts
// per loop iteration minus one (the initiation interval II of the modulo
// schedule, 1..128), and the DRF word read by slot 0 as src1 (slot0_src1)
// the number of iterations. A count of 0 skips the loop. During the loop
// cga_en = 1, ctx steps base, base+1, ..., base+II-1 and wraps, once per
// cycle, and all VLIW slots receive NOPs. After II x count cycles the unit
// returns to VLIW mode at pc + 1. The prologue and epilogue of a modulo
// schedule are expected to be folded into the count and contexts by the
// compiler.
module vliw_cu
  import adres_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // instruction cache
  output logic [PC_W-1:0]   imem_addr,
  input  vliw_instr_t       imem_rdata,
  // slot 0 operands needed for control operations
  input  logic [DATA_W-1:0] slot0_src1,
  input  logic              slot0_pred,
  // dispatch and mode control
  output vliw_instr_t       dispatch,
  output logic              cga_en,
  output logic [CM_AW-1:0]  ctx,
  output logic              halted
);

  typedef enum logic [1:0] {M_VLIW, M_CGA, M_HALT} mode_e;

  mode_e             mode;
  logic [PC_W-1:0]   pc;
  logic [CM_AW-1:0]  base, ctx_off, ii_m1;
  logic [DATA_W-1:0] iter_left;

  vliw_op_t op0;
  logic     guard;

  assign imem_addr = pc;
  assign op0       = imem_rdata[0];
  assign guard     = op0.pred_en ? slot0_pred : 1'b1;
  assign cga_en    = (mode == M_CGA);
  assign ctx       = base + ctx_off;
  assign halted    = (mode == M_HALT);
  assign dispatch  = (mode == M_VLIW) ? imem_rdata : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= M_VLIW;
      pc        <= '0;
      base      <= '0;
      ctx_off   <= '0;
      ii_m1     <= '0;
      iter_left <= '0;
    end else begin
      unique case (mode)
        M_VLIW: begin
          pc <= pc + 1'b1;
          if (guard) begin
            unique case (op0.op)
              OP_BR: pc <= op0.imm[PC_W-1:0];
              OP_CGA: if (slot0_src1 != '0) begin
                mode      <= M_CGA;
                pc        <= pc;
                base      <= op0.imm[CM_AW-1:0];
                ii_m1     <= op0.imm[2*CM_AW-1:CM_AW];
                ctx_off   <= '0;
                iter_left <= slot0_src1;
              end
              OP_HALT: begin
                mode <= M_HALT;
                pc   <= pc;
              end
              default: ;
            endcase
          end
        end
        M_CGA: begin
          if (ctx_off == ii_m1) begin
            ctx_off <= '0;
            if (iter_left == 1) begin
              mode <= M_VLIW;
              pc   <= pc + 1'b1;
            end
            iter_left <= iter_left - 1'b1;
          end else begin
            ctx_off <= ctx_off + 1'b1;
          end
        end
        default: ;   // halted
      endcase
    end
  end

  // The CGA loop always leaves with at least one iteration to run.
  a_cga_count : assert property (@(posedge clk) disable iff (!rst_n)
                                 mode == M_CGA |-> iter_left != '0);

endmodule
