// adres_pkg: types and constants shared by the ADRES 4x4_reg_con_all instance.
//
// The array is a 4x4 grid of functional units (FUs). Row 0 is the VLIW
// section: four FUs that share the global data register file (DRF, 64 x 32
// bit, 12 read / 4 write ports) and the global predicate register file (PRF,
// 64 x 1 bit, 4 read / 4 write ports). Rows 1..3 are the coarse-grained array
// (CGA) section: each FU has its own local DRF (16 x 32 bit, 2 read / 1 write)
// and local PRF (16 x 1 bit, 1 read / 1 write). Sizes, port counts, the 32-bit
// data path, the 1-bit predicates and the 128-word configuration memories
// follow the document. The operation set, the instruction and configuration
// word layouts and the source-select encodings are this design's own choice:
// the document names none of them.
package adres_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned ROWS        = 4;    // array rows (row 0 = VLIW)
  localparam int unsigned COLS        = 4;    // array columns = VLIW issue width
  localparam int unsigned DATA_W      = 32;   // data path width
  localparam int unsigned GRF_DEPTH   = 64;   // global DRF / PRF words
  localparam int unsigned LRF_DEPTH   = 16;   // local DRF / PRF words
  localparam int unsigned CM_DEPTH    = 128;  // configuration memory words
  localparam int unsigned GRF_AW      = $clog2(GRF_DEPTH);
  localparam int unsigned LRF_AW      = $clog2(LRF_DEPTH);
  localparam int unsigned CM_AW       = $clog2(CM_DEPTH);
  localparam int unsigned PC_W        = 10;   // instruction address width
  localparam int unsigned IMM_W       = 16;

  // ------------------------------------------------------------ operations
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    OP_ADD  = 5'd1,
    OP_SUB  = 5'd2,
    OP_MUL  = 5'd3,
    OP_AND  = 5'd4,
    OP_OR   = 5'd5,
    OP_XOR  = 5'd6,
    OP_SHL  = 5'd7,
    OP_SHR  = 5'd8,
    OP_SRA  = 5'd9,
    OP_MOV  = 5'd10,  // dst = src1 (routing through an FU)
    OP_EQ   = 5'd11,  // compares write pred dst1 = cond, pred dst2 = !cond
    OP_NE   = 5'd12,
    OP_LT   = 5'd13,  // signed
    OP_LTU  = 5'd14,
    OP_LD   = 5'd15,  // dst = mem[src1 + src2]          (VLIW FUs only)
    OP_ST   = 5'd16,  // mem[src1 + src2] = src3          (VLIW FUs only)
    OP_BR   = 5'd24,  // slot 0, VLIW mode: pc = imm if guard true
    OP_CGA  = 5'd25,  // slot 0, VLIW mode: run a CGA loop, then pc + 1
    OP_HALT = 5'd26   // slot 0, VLIW mode: stop fetching
  } opcode_e;

  // ------------------------------------------- operand source selections
  // Inputs of an FU source mux. RFA/RFB are the two local DRF read ports of a
  // CGA tile; in a VLIW tile RFA is the global DRF read port of that operand.
  // N/S/E/W are the output registers of the mesh neighbours, N2/S2/E2/W2 those
  // of the FUs two steps away (mesh_plus), NE/NW/SE/SW the local DRF read
  // port B of the diagonal tiles (reg_con2).
  typedef enum logic [3:0] {
    SRC_RFA  = 4'd0,
    SRC_RFB  = 4'd1,
    SRC_SELF = 4'd2,
    SRC_N    = 4'd3,
    SRC_S    = 4'd4,
    SRC_E    = 4'd5,
    SRC_W    = 4'd6,
    SRC_N2   = 4'd7,
    SRC_S2   = 4'd8,
    SRC_E2   = 4'd9,
    SRC_W2   = 4'd10,
    SRC_NE   = 4'd11,
    SRC_NW   = 4'd12,
    SRC_SE   = 4'd13,
    SRC_SW   = 4'd14,
    SRC_IMM  = 4'd15
  } src_sel_e;

  // Index of each neighbour in the nb_data arrays (= src_sel - SRC_N).
  localparam int unsigned NB_N = 0, NB_S = 1, NB_E = 2, NB_W = 3;
  localparam int unsigned NB_N2 = 4, NB_S2 = 5, NB_E2 = 6, NB_W2 = 7;
  localparam int unsigned NB_NE = 8, NB_NW = 9, NB_SE = 10, NB_SW = 11;
  localparam int unsigned NB_NUM = 12;
  // Diagonal index order used by the reg_con1 write inputs: NE, NW, SE, SW.
  localparam int unsigned DG_NE = 0, DG_NW = 1, DG_SE = 2, DG_SW = 3;

  // Predicate input mux ("pred in" of the FU).
  typedef enum logic [2:0] {
    PSRC_TRUE  = 3'd0,
    PSRC_RF    = 3'd1,
    PSRC_SELF  = 3'd2,
    PSRC_N     = 3'd3,
    PSRC_S     = 3'd4,
    PSRC_E     = 3'd5,
    PSRC_W     = 3'd6,
    PSRC_FALSE = 3'd7
  } psrc_sel_e;

  // Local DRF write-data mux: own FU result or a diagonal FU (reg_con1).
  typedef enum logic [2:0] {
    WSRC_OWN = 3'd0,
    WSRC_NE  = 3'd1,
    WSRC_NW  = 3'd2,
    WSRC_SE  = 3'd3,
    WSRC_SW  = 3'd4
  } wsrc_sel_e;

  // ------------------------------------------------ VLIW instruction word
  typedef struct packed {
    opcode_e             op;
    logic [GRF_AW-1:0]   dst;      // DRF index, or PRF index for compares
    logic [GRF_AW-1:0]   src1;
    logic [GRF_AW-1:0]   src2;
    logic [GRF_AW-1:0]   src3;     // store data
    logic                imm_en;   // src2 = sign-extended imm
    logic [IMM_W-1:0]    imm;      // also branch target / CGA descriptor
    logic                pred_en;  // guard with PRF[pred]
    logic [GRF_AW-1:0]   pred;
  } vliw_op_t;

  typedef vliw_op_t [COLS-1:0] vliw_instr_t;

  // ------------------------------------------- configuration memory words
  // FU control unit of a CGA tile.
  typedef struct packed {
    opcode_e          op;
    src_sel_e         src1_sel;
    src_sel_e         src2_sel;
    psrc_sel_e        pred_sel;
    logic [IMM_W-1:0] imm;
  } cga_fu_cfg_t;

  // DRF control unit of a CGA tile.
  typedef struct packed {
    logic [LRF_AW-1:0] raddr_a;
    logic [LRF_AW-1:0] raddr_b;
    logic [LRF_AW-1:0] waddr;
    logic              we;
    wsrc_sel_e         wsel;
  } cga_drf_cfg_t;

  // PRF control unit of a CGA tile.
  typedef struct packed {
    logic [LRF_AW-1:0] raddr;
    logic [LRF_AW-1:0] waddr;
    logic              we;
    logic              wsel;     // 0: pred dst1, 1: pred dst2
  } cga_prf_cfg_t;

  // Configuration of a VLIW-section FU while the array runs in CGA mode.
  typedef struct packed {
    opcode_e              op;
    src_sel_e             src1_sel;
    src_sel_e             src2_sel;
    src_sel_e             src3_sel;
    psrc_sel_e            pred_sel;
    logic [IMM_W-1:0]     imm;
    logic [2:0][GRF_AW-1:0] drf_raddr;  // global DRF read address per operand
    logic [GRF_AW-1:0]    drf_waddr;
    logic                 drf_we;
    wsrc_sel_e            drf_wsel;   // own result or a diagonal FU (reg_con1)
    logic [GRF_AW-1:0]    prf_raddr;
    logic [GRF_AW-1:0]    prf_waddr;
    logic                 prf_we;
    logic                 prf_wsel;
  } vliw_cfg_t;

  localparam int unsigned CFG_W = $bits(vliw_cfg_t);  // widest CM word

  // Which control unit of a tile a configuration write goes to.
  typedef enum logic [1:0] {
    CU_FU  = 2'd0,
    CU_DRF = 2'd1,
    CU_PRF = 2'd2
  } cfg_unit_e;

  // Sign extension of an immediate to the data width.
  function automatic logic [DATA_W-1:0] sext_imm(input logic [IMM_W-1:0] imm);
    return {{(DATA_W-IMM_W){imm[IMM_W-1]}}, imm};
  endfunction

  typedef logic [NB_NUM-1:0][DATA_W-1:0] nb_data_t;

  // Operand source multiplexer of an FU input.
  function automatic logic [DATA_W-1:0] src_select(
      input src_sel_e          sel,
      input logic [DATA_W-1:0] rfa,
      input logic [DATA_W-1:0] rfb,
      input logic [DATA_W-1:0] self_out,
      input nb_data_t          nb,
      input logic [IMM_W-1:0]  imm);
    unique case (sel)
      SRC_RFA:  return rfa;
      SRC_RFB:  return rfb;
      SRC_SELF: return self_out;
      SRC_IMM:  return sext_imm(imm);
      default:  return nb[4'(sel) - 4'(SRC_N)];
    endcase
  endfunction

  // Predicate input multiplexer of an FU (nb order N, S, E, W).
  function automatic logic pred_select(
      input psrc_sel_e  sel,
      input logic       rf,
      input logic       self_out,
      input logic [3:0] nb);
    unique case (sel)
      PSRC_TRUE:  return 1'b1;
      PSRC_RF:    return rf;
      PSRC_SELF:  return self_out;
      PSRC_N:     return nb[0];
      PSRC_S:     return nb[1];
      PSRC_E:     return nb[2];
      PSRC_W:     return nb[3];
      default:    return 1'b0;
    endcase
  endfunction

endpackage
