// cga_tile: one FU of the CGA section with its local register files.
//
// Contents, following the document's data path figure and its reg_con_all
// interconnect: an FU (no load/store), a local DRF (16 x 32 bit, 2 read /
// 1 write), a local PRF (16 x 1 bit, 1 read / 1 write), an FU control unit,
// a DRF control unit and a PRF control unit, each driven by its own
// 128-word configuration memory, the source muxes in front of src1, src2
// and pred in, and output registers behind dst1 and pred dst1.
//
// How it works: in CGA mode (cga_en = 1) the mode controller broadcasts the
// context address ctx; the three CMs deliver that context's FU operation and
// mux selections, local DRF addresses and local PRF addresses. The FU
// computes within the cycle and at the rising edge
//   * the output registers take dst1 / pred dst1 if the guard was true;
//   * the local DRF writes either this FU's result (gated by the guard) or,
//     through the reg_con1 diagonal input, the output register of a
//     diagonal neighbour;
//   * the local PRF writes pred dst1 or pred dst2 (gated by the guard).
// Read port B of the local DRF also leaves the tile (rf_b_data) and feeds
// the source muxes of the four diagonal tiles (reg_con2).
// With cga_en = 0 all CMs read as zero: NOP, no register file writes.
//
// Interface: nb_data are the neighbour inputs in the order of adres_pkg
// (N, S, E, W, N2, S2, E2, W2 output registers, then NE, NW, SE, SW read
// port B data); nb_pred are the N, S, E, W predicate output registers;
// dg_res are the NE, NW, SE, SW FU output registers. cfg_we writes word
// cfg_wdata (low bits used) to the CM named by cfg_unit at cfg_addr.
//
// Which register the diagonal data comes from, the mux encodings and the
// configuration word layouts are this design's choices; the document shows
// the connections but not their timing or encoding.
module cga_tile
  import adres_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration load
  input  logic                  cfg_we,
  input  cfg_unit_e             cfg_unit,
  input  logic [CM_AW-1:0]      cfg_addr,
  input  logic [CFG_W-1:0]      cfg_wdata,
  // mode control
  input  logic                  cga_en,
  input  logic [CM_AW-1:0]      ctx,
  // interconnect
  input  nb_data_t              nb_data,
  input  logic [3:0]            nb_pred,
  input  logic [3:0][DATA_W-1:0] dg_res,
  output logic [DATA_W-1:0]     out_data,
  output logic                  out_pred,
  output logic [DATA_W-1:0]     rf_b_data
);

  cga_fu_cfg_t  fcfg;
  cga_drf_cfg_t dcfg;
  cga_prf_cfg_t pcfg;

  // ------------------------------------------------------- control units
  cfg_mem #(.WIDTH($bits(cga_fu_cfg_t)), .DEPTH(CM_DEPTH)) u_fu_cm (
    .clk, .we(cfg_we && cfg_unit == CU_FU), .waddr(cfg_addr),
    .wdata(cfg_wdata[$bits(cga_fu_cfg_t)-1:0]),
    .en(cga_en), .raddr(ctx), .rdata(fcfg));

  cfg_mem #(.WIDTH($bits(cga_drf_cfg_t)), .DEPTH(CM_DEPTH)) u_drf_cm (
    .clk, .we(cfg_we && cfg_unit == CU_DRF), .waddr(cfg_addr),
    .wdata(cfg_wdata[$bits(cga_drf_cfg_t)-1:0]),
    .en(cga_en), .raddr(ctx), .rdata(dcfg));

  cfg_mem #(.WIDTH($bits(cga_prf_cfg_t)), .DEPTH(CM_DEPTH)) u_prf_cm (
    .clk, .we(cfg_we && cfg_unit == CU_PRF), .waddr(cfg_addr),
    .wdata(cfg_wdata[$bits(cga_prf_cfg_t)-1:0]),
    .en(cga_en), .raddr(ctx), .rdata(pcfg));

  // ------------------------------------------------------ register files
  logic [1:0][DATA_W-1:0] drf_rdata;
  logic [DATA_W-1:0]      drf_wdata;
  logic                   drf_we;
  logic                   prf_rdata;
  logic                   prf_wdata;
  logic                   prf_we;

  regfile #(.WIDTH(DATA_W), .DEPTH(LRF_DEPTH), .NREAD(2), .NWRITE(1)) u_drf (
    .clk, .rst_n,
    .raddr({dcfg.raddr_b, dcfg.raddr_a}), .rdata(drf_rdata),
    .we(drf_we), .waddr(dcfg.waddr), .wdata(drf_wdata));

  regfile #(.WIDTH(1), .DEPTH(LRF_DEPTH), .NREAD(1), .NWRITE(1)) u_prf (
    .clk, .rst_n,
    .raddr(pcfg.raddr), .rdata(prf_rdata),
    .we(prf_we), .waddr(pcfg.waddr), .wdata(prf_wdata));

  assign rf_b_data = drf_rdata[1];

  // --------------------------------------------------------- source muxes
  logic [DATA_W-1:0] src1, src2;
  logic              pred_in;

  assign src1    = src_select(fcfg.src1_sel, drf_rdata[0], drf_rdata[1],
                              out_data, nb_data, fcfg.imm);
  assign src2    = src_select(fcfg.src2_sel, drf_rdata[0], drf_rdata[1],
                              out_data, nb_data, fcfg.imm);
  assign pred_in = pred_select(fcfg.pred_sel, prf_rdata, out_pred, nb_pred);

  // ------------------------------------------------------------------- FU
  logic [DATA_W-1:0] dst1;
  logic              dst_we, pred_dst1, pred_dst2, pred_we;
  logic [DATA_W-1:0] mem_addr_nc, mem_wdata_nc;
  logic              mem_re_nc, mem_we_nc;

  fu #(.MEM_EN(1'b0)) u_fu (
    .op(fcfg.op), .src1, .src2, .src3('0), .pred_in,
    .dst1, .dst_we, .pred_dst1, .pred_dst2, .pred_we,
    .mem_addr(mem_addr_nc), .mem_data_out(mem_wdata_nc),
    .mem_data_in('0), .mem_re(mem_re_nc), .mem_we(mem_we_nc));

  // ------------------------------------------- register file write paths
  always_comb begin
    drf_wdata = dst1;
    drf_we    = dcfg.we & dst_we;
    unique case (dcfg.wsel)
      WSRC_NE: begin drf_wdata = dg_res[DG_NE]; drf_we = dcfg.we; end
      WSRC_NW: begin drf_wdata = dg_res[DG_NW]; drf_we = dcfg.we; end
      WSRC_SE: begin drf_wdata = dg_res[DG_SE]; drf_we = dcfg.we; end
      WSRC_SW: begin drf_wdata = dg_res[DG_SW]; drf_we = dcfg.we; end
      default: ;
    endcase
  end

  assign prf_wdata = pcfg.wsel ? pred_dst2 : pred_dst1;
  assign prf_we    = pcfg.we & pred_we;

  // ----------------------------------------------------- output registers
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
