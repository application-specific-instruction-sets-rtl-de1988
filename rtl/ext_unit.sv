// ext_unit: custom instruction unit (the custom-logic side of the ASIP).
//
// Holds the implicit registers and the AFU and executes the three kinds of
// custom instruction, each in one cycle:
//   ext_Rin   rs1 -> IR[ir_idx] (if rs1_v), rs2 -> IR[ir_idx+1] (if rs2_v).
//             Both GPRF read ports are used, so one move carries up to two
//             operands; a lane with its valid bit clear is an empty slot.
//   ext_Rout  IR[ir_idx] -> GPRF rd through the single write port, so one
//             move returns one result.
//   ASI       the AFU reads opa/opb (GPRF ports) plus the IRs, writes its
//             primary result to rd when wr_rd is set and its extra results
//             to IRs.
// The instruction set and its one-cycle transfer latency follow the design
// description; the field layout (asip_pkg::ci_t) and the positional lane to
// IR mapping of ext_Rin are this design's choices.
//
// Interface: ci/ci_valid is the decoded instruction in the execute stage,
// dataa/datab the values of GPRF registers ci.rs1/ci.rs2. gprf_we/waddr/
// wdata is the request for the GPRF write port, valid in the same cycle.
// IR updates land at the rising clock edge. `error` flags an illegal ASI or
// an IR index out of range; the instruction then writes nothing.
module ext_unit
  import asip_pkg::*;
#(
  parameter int unsigned NUM_IREGS = 3,
  parameter int unsigned DATA_W    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ci_valid,
  input  ci_t               ci,
  input  logic [DATA_W-1:0] dataa,
  input  logic [DATA_W-1:0] datab,
  output logic              gprf_we,
  output logic [REG_AW-1:0] gprf_waddr,
  output logic [DATA_W-1:0] gprf_wdata,
  output logic [DATA_W-1:0] ir_q     [NUM_IREGS],
  output logic              ir_valid [NUM_IREGS],
  output logic              error
);

  logic              is_rin, is_rout, is_asi;
  logic              asi_we   [NUM_IREGS];
  logic [DATA_W-1:0] asi_wd   [NUM_IREGS];
  logic              ir_we    [NUM_IREGS];
  logic [DATA_W-1:0] ir_wdata [NUM_IREGS];
  logic [DATA_W-1:0] asi_result;
  logic              asi_result_valid, asi_illegal;
  logic              idx0_ok, idx1_ok;

  assign is_rin  = ci_valid && ci.kind == CI_EXT_RIN;
  assign is_rout = ci_valid && ci.kind == CI_EXT_ROUT;
  assign is_asi  = ci_valid && ci.kind == CI_ASI;

  // Index range checks for the lanes of a move.
  assign idx0_ok = 32'(ci.ir_idx) < NUM_IREGS;
  assign idx1_ok = 32'(ci.ir_idx) + 1 < NUM_IREGS;

  custom_logic #(.NUM_IREGS(NUM_IREGS), .DATA_W(DATA_W)) u_afu (
    .asi_valid    (is_asi),
    .asi_id       (ci.asi_id),
    .opa          (dataa),
    .opb          (datab),
    .ir_q         (ir_q),
    .result       (asi_result),
    .result_valid (asi_result_valid),
    .ir_we        (asi_we),
    .ir_wdata     (asi_wd),
    .illegal      (asi_illegal)
  );

  implicit_regs #(.NUM_IREGS(NUM_IREGS), .DATA_W(DATA_W)) u_irs (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (ir_we),
    .wdata (ir_wdata),
    .q     (ir_q),
    .valid (ir_valid)
  );

  // IR write sources: ext_Rin lanes or the AFU's extra results.
  always_comb begin
    for (int i = 0; i < NUM_IREGS; i++) begin
      ir_we[i]    = 1'b0;
      ir_wdata[i] = '0;
      if (is_rin && !error) begin
        if (ci.rs1_v && 32'(ci.ir_idx) == i) begin
          ir_we[i]    = 1'b1;
          ir_wdata[i] = dataa;
        end
        if (ci.rs2_v && 32'(ci.ir_idx) + 1 == i) begin
          ir_we[i]    = 1'b1;
          ir_wdata[i] = datab;
        end
      end else if (is_asi) begin
        ir_we[i]    = asi_we[i];
        ir_wdata[i] = asi_wd[i];
      end
    end
  end

  // GPRF write port request and error flag.
  always_comb begin
    gprf_we    = 1'b0;
    gprf_waddr = ci.rd;
    gprf_wdata = '0;
    error      = 1'b0;
    if (is_rin) begin
      error = (ci.rs1_v && !idx0_ok) || (ci.rs2_v && !idx1_ok);
    end else if (is_rout) begin
      error = !idx0_ok;
      if (idx0_ok) begin
        gprf_we    = 1'b1;
        gprf_wdata = ir_q[ci.ir_idx[$clog2(NUM_IREGS)-1:0]];
      end
    end else if (is_asi) begin
      error      = asi_illegal;
      gprf_we    = asi_result_valid && ci.wr_rd;
      gprf_wdata = asi_result;
    end
  end

endmodule
