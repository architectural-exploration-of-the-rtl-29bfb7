// adres_top: the 4x4 ADRES instance "4x4_reg_con_all".
//
// ADRES couples a VLIW processor and a coarse-grained reconfigurable array
// (CGA) that share FUs. Row 0 of the 4x4 grid is the VLIW section: four
// load/store-capable FUs on a global DRF (64 x 32 bit, 12 read / 4 write
// ports) and a global PRF (64 x 1 bit, 4 read / 4 write ports), sequenced by
// the VLIW control unit from the instruction cache. Rows 1..3 are the CGA
// section: twelve FUs, each with a local DRF and PRF and three configuration
// memories. In VLIW mode only row 0 works. A CGA instruction switches to CGA
// mode: all sixteen FUs then execute one configuration context per cycle,
// read from their configuration memories at the context address broadcast
// by the mode controller, and the VLIW section resumes when the loop ends.
//
// Interconnect (reg_con_all, the instance the document selects): every FU's
// source muxes see
//   mesh       the output registers of its N, S, E and W neighbours,
//   mesh_plus  the output registers of the FUs two steps away N, S, E, W
//              (routing over the neighbour),
//   reg_con2   read port B of the local DRF of its four diagonal tiles,
// and every local DRF can be written from
//   reg_con1   the output registers of its four diagonal FUs.
// Predicate output registers go to the N, S, E and W neighbours. Links that
// would leave the grid do not exist (their mux inputs read 0). The row 0
// tiles have no local DRF: there the diagonal links end at the global DRF,
// which the document's selected instance also connects diagonally. A row 1
// FU's NE/NW input reads the global DRF read port B of that row 0 tile, and
// a row 0 tile can write the global DRF from its SE/SW FU's output register.
// Row 1..3 tiles otherwise reach the global DRF only through row 0.
//
// External interfaces (the document treats both memories as zero-miss and
// outside the core): imem_* is the instruction cache, read combinationally
// at imem_addr; dmem_* are four data memory ports, one per VLIW FU, also
// answered within the cycle. cfg_* loads configuration memory words: unit
// cfg_unit (FU, DRF or PRF control unit) of tile (cfg_row, cfg_col), word
// cfg_addr; a row 0 tile has a single CM, written for any cfg_unit.
// halted goes high after a HALT operation; cga_en and ctx show the mode.
module adres_top
  import adres_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  // configuration memory load
  input  logic                         cfg_we,
  input  logic [1:0]                   cfg_row,
  input  logic [1:0]                   cfg_col,
  input  cfg_unit_e                    cfg_unit,
  input  logic [CM_AW-1:0]             cfg_addr,
  input  logic [CFG_W-1:0]             cfg_wdata,
  // instruction cache
  output logic [PC_W-1:0]              imem_addr,
  input  vliw_instr_t                  imem_rdata,
  // data memory, one port per VLIW FU
  output logic [COLS-1:0][DATA_W-1:0]  dmem_addr,
  output logic [COLS-1:0][DATA_W-1:0]  dmem_wdata,
  input  logic [COLS-1:0][DATA_W-1:0]  dmem_rdata,
  output logic [COLS-1:0]              dmem_re,
  output logic [COLS-1:0]              dmem_we,
  // status
  output logic                         halted,
  output logic                         cga_en,
  output logic [CM_AW-1:0]             ctx
);

  // ------------------------------------------------ VLIW control unit
  vliw_instr_t                     dispatch;
  logic [3*COLS-1:0][GRF_AW-1:0]   gdrf_raddr;
  logic [3*COLS-1:0][DATA_W-1:0]   gdrf_rdata;
  logic [COLS-1:0]                 gdrf_we;
  logic [COLS-1:0][GRF_AW-1:0]     gdrf_waddr;
  logic [COLS-1:0][DATA_W-1:0]     gdrf_wdata;
  logic [COLS-1:0][GRF_AW-1:0]     gprf_raddr;
  logic [COLS-1:0]                 gprf_rdata;
  logic [COLS-1:0]                 gprf_we;
  logic [COLS-1:0][GRF_AW-1:0]     gprf_waddr;
  logic [COLS-1:0]                 gprf_wdata;

  vliw_cu u_cu (
    .clk, .rst_n,
    .imem_addr, .imem_rdata,
    .slot0_src1(gdrf_rdata[0]), .slot0_pred(gprf_rdata[0]),
    .dispatch, .cga_en, .ctx, .halted);

  // ------------------------------------------- global register files
  regfile #(.WIDTH(DATA_W), .DEPTH(GRF_DEPTH), .NREAD(3*COLS), .NWRITE(COLS)) u_gdrf (
    .clk, .rst_n,
    .raddr(gdrf_raddr), .rdata(gdrf_rdata),
    .we(gdrf_we), .waddr(gdrf_waddr), .wdata(gdrf_wdata));

  regfile #(.WIDTH(1), .DEPTH(GRF_DEPTH), .NREAD(COLS), .NWRITE(COLS)) u_gprf (
    .clk, .rst_n,
    .raddr(gprf_raddr), .rdata(gprf_rdata),
    .we(gprf_we), .waddr(gprf_waddr), .wdata(gprf_wdata));

  // ---------------------------------------------------- interconnect
  logic [DATA_W-1:0] out_data [ROWS][COLS];
  logic              out_pred [ROWS][COLS];
  logic [DATA_W-1:0] rfb_data [ROWS][COLS];

  nb_data_t              nb_data [ROWS][COLS];
  logic [3:0]            nb_pred [ROWS][COLS];
  logic [3:0][DATA_W-1:0] dg_res [ROWS][COLS];

  // Output register of tile (r, c), 0 outside the grid.
  function automatic logic [DATA_W-1:0] od(input int r, input int c);
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return '0;
    return out_data[r][c];
  endfunction

  function automatic logic op_(input int r, input int c);
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return 1'b0;
    return out_pred[r][c];
  endfunction

  function automatic logic [DATA_W-1:0] rb(input int r, input int c);
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return '0;
    return rfb_data[r][c];
  endfunction

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        nb_data[r][c][NB_N]  = od(r-1, c);
        nb_data[r][c][NB_S]  = od(r+1, c);
        nb_data[r][c][NB_E]  = od(r, c+1);
        nb_data[r][c][NB_W]  = od(r, c-1);
        nb_data[r][c][NB_N2] = od(r-2, c);
        nb_data[r][c][NB_S2] = od(r+2, c);
        nb_data[r][c][NB_E2] = od(r, c+2);
        nb_data[r][c][NB_W2] = od(r, c-2);
        nb_data[r][c][NB_NE] = rb(r-1, c+1);
        nb_data[r][c][NB_NW] = rb(r-1, c-1);
        nb_data[r][c][NB_SE] = rb(r+1, c+1);
        nb_data[r][c][NB_SW] = rb(r+1, c-1);
        nb_pred[r][c]        = {op_(r, c-1), op_(r, c+1), op_(r+1, c), op_(r-1, c)};
        dg_res[r][c][DG_NE]  = od(r-1, c+1);
        dg_res[r][c][DG_NW]  = od(r-1, c-1);
        dg_res[r][c][DG_SE]  = od(r+1, c+1);
        dg_res[r][c][DG_SW]  = od(r+1, c-1);
      end
    end
  end

  // ----------------------------------------------------------- tiles
  for (genvar c = 0; c < COLS; c++) begin : g_vliw
    logic sel;
    assign sel = cfg_we && cfg_row == 2'd0 && cfg_col == 2'(c);

    vliw_tile u_tile (
      .clk, .rst_n,
      .cfg_we(sel), .cfg_addr, .cfg_wdata,
      .cga_en, .ctx, .vop(dispatch[c]),
      .drf_raddr(gdrf_raddr[3*c +: 3]), .drf_rdata(gdrf_rdata[3*c +: 3]),
      .drf_we(gdrf_we[c]), .drf_waddr(gdrf_waddr[c]), .drf_wdata(gdrf_wdata[c]),
      .prf_raddr(gprf_raddr[c]), .prf_rdata(gprf_rdata[c]),
      .prf_we(gprf_we[c]), .prf_waddr(gprf_waddr[c]), .prf_wdata(gprf_wdata[c]),
      .nb_data(nb_data[0][c]), .nb_pred(nb_pred[0][c]), .dg_res(dg_res[0][c]),
      .rf_b_data(rfb_data[0][c]),
      .out_data(out_data[0][c]), .out_pred(out_pred[0][c]),
      .mem_addr(dmem_addr[c]), .mem_wdata(dmem_wdata[c]), .mem_rdata(dmem_rdata[c]),
      .mem_re(dmem_re[c]), .mem_we(dmem_we[c]));
  end

  for (genvar r = 1; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic sel;
      assign sel = cfg_we && cfg_row == 2'(r) && cfg_col == 2'(c);

      cga_tile u_tile (
        .clk, .rst_n,
        .cfg_we(sel), .cfg_unit, .cfg_addr, .cfg_wdata,
        .cga_en, .ctx,
        .nb_data(nb_data[r][c]), .nb_pred(nb_pred[r][c]), .dg_res(dg_res[r][c]),
        .out_data(out_data[r][c]), .out_pred(out_pred[r][c]),
        .rf_b_data(rfb_data[r][c]));
    end
  end

endmodule
