// asip_pkg: types and constants shared by the ASIP datapath.
//
// The datapath couples a base processor register file (GPRF) that has two
// read ports and one write port with a custom-logic unit that owns a small
// file of implicit registers (IRs). Operands that do not fit through the two
// GPRF read ports travel into the IRs with an ext_Rin move, results that do
// not fit through the single write port come back with an ext_Rout move, and
// application-specific instructions (ASIs) read and write the IRs without
// naming them.
//
// The 2-read/1-write port counts follow the design description. The custom
// instruction word below (ci_t) is this design's own decoded format: the
// description names the ext_Rin, ext_Rout and ASI instructions but gives no
// encoding. Field widths follow a 32-register, 32-bit base processor.
package asip_pkg;

  // Port counts of the base register file (N_in read, N_out write).
  localparam int unsigned N_IN  = 2;
  localparam int unsigned N_OUT = 1;

  // Base processor register address width (32 registers).
  localparam int unsigned REG_AW = 5;

  // Width of an implicit-register index field; limits the IR count to 16.
  localparam int unsigned IR_IDX_W = 4;

  // Width of the ASI selector field (up to 256 custom instructions).
  localparam int unsigned ASI_ID_W = 8;

  // ASI numbers implemented by custom_logic.
  localparam logic [ASI_ID_W-1:0] ASI_FIG3 = 8'd0;

  // Kind of custom instruction issued to the extension unit.
  typedef enum logic [1:0] {
    CI_NONE     = 2'd0,  // not a custom instruction (base processor op)
    CI_EXT_RIN  = 2'd1,  // move up to two GPRF operands into IRs
    CI_EXT_ROUT = 2'd2,  // move one IR into a GPRF register
    CI_ASI      = 2'd3   // execute an application-specific instruction
  } ci_kind_e;

  // Decoded custom instruction.
  //   rs1, rs2  GPRF registers read on the two read ports
  //   rd        GPRF register written on the write port
  //   rs1_v     ext_Rin: lane 0 (rs1 -> IR[ir_idx]) is used
  //   rs2_v     ext_Rin: lane 1 (rs2 -> IR[ir_idx+1]) is used
  //   ir_idx    ext_Rin: first target IR; ext_Rout: source IR
  //   asi_id    ASI: which ASI to execute
  //   wr_rd     ASI: write the primary result to rd
  typedef struct packed {
    ci_kind_e              kind;
    logic [ASI_ID_W-1:0]   asi_id;
    logic [REG_AW-1:0]     rs1;
    logic [REG_AW-1:0]     rs2;
    logic [REG_AW-1:0]     rd;
    logic                  rs1_v;
    logic                  rs2_v;
    logic [IR_IDX_W-1:0]   ir_idx;
    logic                  wr_rd;
  } ci_t;

endpackage
