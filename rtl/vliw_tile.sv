// vliw_tile: one FU of the VLIW section (row 0 of the array).
//
// The document's VLIW section has four FUs that talk through the global data
// and predicate register files and are the only FUs able to load and store;
// they are "operational in both VLIW and CGA mode". This tile holds one such
// FU, its source muxes, its output registers and its own 128-word
// configuration memory (its FU control unit for array mode). The global
// register files sit outside, in the top level; each tile owns three read
// ports and one write port of the global DRF and one read and one write port
// of the global PRF, which makes the document's 12 read / 4 write and 4 / 4
// port counts.
//
// VLIW mode (cga_en = 0): the operation vop dispatched by the VLIW control
// unit executes: src1 = DRF[src1], src2 = DRF[src2] or the sign-extended
// immediate, src3 = DRF[src3] (store data), guard = PRF[pred] if pred_en.
// Results go to DRF[dst]; compare results go to PRF[dst].
// CGA mode (cga_en = 1): the CM word at context ctx gives the operation,
// the source mux selections (global DRF port, own output register, the
// neighbours below and beside it, the diagonal tiles' register file data,
// immediate), the guard source and the global DRF/PRF addresses.
// In CGA mode the tile also takes part in the diagonal links of the
// selected interconnect: drf_wsel lets its global DRF write port store the
// output register of a diagonal FU (dg_res: NE, NW, SE, SW; only SE and SW
// exist for row 0) instead of its own result, and rf_b_data, the data of its
// global DRF read port B, is what the diagonal tiles below see as this
// tile's register file (reg_con1 and reg_con2 towards the global DRF).
// Both modes: results are combinational within the cycle and written at the
// rising edge; the output registers out_data/out_pred feed the neighbours.
// Loads and stores use the mem_* ports of a zero-wait data memory: mem_rdata
// must answer mem_addr in the same cycle.
//
// The instruction and configuration formats are this design's own.
module vliw_tile
  import adres_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  // configuration load
  input  logic                         cfg_we,
  input  logic [CM_AW-1:0]             cfg_addr,
  input  logic [CFG_W-1:0]             cfg_wdata,
  // mode control and VLIW dispatch
  input  logic                         cga_en,
  input  logic [CM_AW-1:0]             ctx,
  input  vliw_op_t                     vop,
  // global DRF ports
  output logic [2:0][GRF_AW-1:0]       drf_raddr,
  input  logic [2:0][DATA_W-1:0]       drf_rdata,
  output logic                         drf_we,
  output logic [GRF_AW-1:0]            drf_waddr,
  output logic [DATA_W-1:0]            drf_wdata,
  // global PRF ports
  output logic [GRF_AW-1:0]            prf_raddr,
  input  logic                         prf_rdata,
  output logic                         prf_we,
  output logic [GRF_AW-1:0]            prf_waddr,
  output logic                         prf_wdata,
  // interconnect
  input  nb_data_t                     nb_data,
  input  logic [3:0]                   nb_pred,
  input  logic [3:0][DATA_W-1:0]       dg_res,
  output logic [DATA_W-1:0]            rf_b_data,
  output logic [DATA_W-1:0]            out_data,
  output logic                         out_pred,
  // data memory
  output logic [DATA_W-1:0]            mem_addr,
  output logic [DATA_W-1:0]            mem_wdata,
  input  logic [DATA_W-1:0]            mem_rdata,
  output logic                         mem_re,
  output logic                         mem_we
);

  vliw_cfg_t cfg;

  cfg_mem #(.WIDTH(CFG_W), .DEPTH(CM_DEPTH)) u_cm (
    .clk, .we(cfg_we), .waddr(cfg_addr), .wdata(cfg_wdata),
    .en(cga_en), .raddr(ctx), .rdata(cfg));

  opcode_e           op;
  logic [DATA_W-1:0] src1, src2, src3;
  logic              pred_in;
  logic [DATA_W-1:0] dst1;
  logic              dst_we, pred_dst1, pred_dst2, pred_we;

  fu #(.MEM_EN(1'b1)) u_fu (
    .op, .src1, .src2, .src3, .pred_in,
    .dst1, .dst_we, .pred_dst1, .pred_dst2, .pred_we,
    .mem_addr, .mem_data_out(mem_wdata), .mem_data_in(mem_rdata),
    .mem_re, .mem_we);

  always_comb begin
    if (cga_en) begin
      op        = cfg.op;
      drf_raddr = cfg.drf_raddr;
      prf_raddr = cfg.prf_raddr;
      src1      = src_select(cfg.src1_sel, drf_rdata[0], '0, out_data, nb_data, cfg.imm);
      src2      = src_select(cfg.src2_sel, drf_rdata[1], '0, out_data, nb_data, cfg.imm);
      src3      = src_select(cfg.src3_sel, drf_rdata[2], '0, out_data, nb_data, cfg.imm);
      pred_in   = pred_select(cfg.pred_sel, prf_rdata, out_pred, nb_pred);
      unique case (cfg.drf_wsel)
        WSRC_NE: begin drf_wdata = dg_res[DG_NE]; drf_we = cfg.drf_we; end
        WSRC_NW: begin drf_wdata = dg_res[DG_NW]; drf_we = cfg.drf_we; end
        WSRC_SE: begin drf_wdata = dg_res[DG_SE]; drf_we = cfg.drf_we; end
        WSRC_SW: begin drf_wdata = dg_res[DG_SW]; drf_we = cfg.drf_we; end
        default: begin drf_wdata = dst1;          drf_we = cfg.drf_we & dst_we; end
      endcase
      drf_waddr = cfg.drf_waddr;
      prf_we    = cfg.prf_we & pred_we;
      prf_waddr = cfg.prf_waddr;
      prf_wdata = cfg.prf_wsel ? pred_dst2 : pred_dst1;
    end else begin
      op        = vop.op;
      drf_raddr = {vop.src3, vop.src2, vop.src1};
      prf_raddr = vop.pred;
      src1      = drf_rdata[0];
      src2      = vop.imm_en ? sext_imm(vop.imm) : drf_rdata[1];
      src3      = drf_rdata[2];
      pred_in   = vop.pred_en ? prf_rdata : 1'b1;
      drf_we    = dst_we & ~pred_we;   // compares write the PRF instead
      drf_wdata = dst1;
      drf_waddr = vop.dst;
      prf_we    = pred_we;
      prf_waddr = vop.dst;
      prf_wdata = pred_dst1;
    end
  end

  assign rf_b_data = drf_rdata[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data <= '0;
      out_pred <= 1'b0;
    end else begin
      if (dst_we)  out_data <= dst1;
      if (pred_we) out_pred <= pred_dst1;
    end
  end

endmodule
