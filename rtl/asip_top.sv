// asip_top: ASIP datapath with implicit registers.
//
// An extensible processor whose custom logic is fed through a register file
// with only two read ports and one write port. ASIs that need more operands
// or produce more results than the ports carry use implicit registers (IRs)
// inside the custom logic: ext_Rin moves copy up to two GPRF values into IRs
// per cycle, ext_Rout moves copy one IR back per cycle, and a result one ASI
// leaves in an IR can be consumed by the next ASI with no move at all.
//
// This module holds the GPRF (gprf) and the custom instruction unit
// (ext_unit). The base processor's own pipeline (fetch, decode, ALU, memory)
// is not part of it: its issue and write-back appear as ports. Each cycle the
// issue stage presents one decoded instruction `ci`:
//   - its rs1/rs2 always address the two GPRF read ports; the values are
//     returned on rdata_a/rdata_b for the base ALU;
//   - if ci_valid and ci.kind != CI_NONE, the custom unit executes it;
//   - base_we/base_waddr/base_wdata is the base pipeline's own write-back.
// The single GPRF write port is shared: a custom instruction that writes
// rd takes it, and the base pipeline must not write in the same cycle (an
// assertion checks this; if it happens anyway the custom write wins).
//
// ir_valid/ir_data show the implicit registers for observation.
//
// Timing: all instructions complete in one cycle. Read data are
// combinational; GPRF and IR writes land at the rising edge of clk.
module asip_top
  import asip_pkg::*;
#(
  parameter int unsigned NUM_IREGS = 3,
  parameter int unsigned DATA_W    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ci_valid,
  input  ci_t               ci,
  input  logic              base_we,
  input  logic [REG_AW-1:0] base_waddr,
  input  logic [DATA_W-1:0] base_wdata,
  output logic [DATA_W-1:0] rdata_a,
  output logic [DATA_W-1:0] rdata_b,
  output logic              ext_error,
  output logic [NUM_IREGS-1:0] ir_valid,
  output logic [DATA_W-1:0] ir_data [NUM_IREGS]
);

  logic [REG_AW-1:0] raddr [N_IN];
  logic [DATA_W-1:0] rdata [N_IN];
  logic              x_we, g_we;
  logic [REG_AW-1:0] x_waddr, g_waddr;
  logic [DATA_W-1:0] x_wdata, g_wdata;
  logic [DATA_W-1:0] ir_q  [NUM_IREGS];
  logic              ir_v  [NUM_IREGS];

  assign raddr[0] = ci.rs1;
  assign raddr[1] = ci.rs2;
  assign rdata_a  = rdata[0];
  assign rdata_b  = rdata[1];

  gprf #(.NUM_REGS(2 ** REG_AW), .DATA_W(DATA_W), .NUM_RD(N_IN)) u_gprf (
    .clk   (clk),
    .rst_n (rst_n),
    .raddr (raddr),
    .rdata (rdata),
    .we    (g_we),
    .waddr (g_waddr),
    .wdata (g_wdata)
  );

  ext_unit #(.NUM_IREGS(NUM_IREGS), .DATA_W(DATA_W)) u_ext (
    .clk        (clk),
    .rst_n      (rst_n),
    .ci_valid   (ci_valid),
    .ci         (ci),
    .dataa      (rdata[0]),
    .datab      (rdata[1]),
    .gprf_we    (x_we),
    .gprf_waddr (x_waddr),
    .gprf_wdata (x_wdata),
    .ir_q       (ir_q),
    .ir_valid   (ir_v),
    .error      (ext_error)
  );

  // The single GPRF write port.
  always_comb begin
    if (x_we) begin
      g_we    = 1'b1;
      g_waddr = x_waddr;
      g_wdata = x_wdata;
    end else begin
      g_we    = base_we;
      g_waddr = base_waddr;
      g_wdata = base_wdata;
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_IREGS; i++) begin
      ir_valid[i] = ir_v[i];
      ir_data[i]  = ir_q[i];
    end
  end

  // Only one write per cycle may use the GPRF write port.
  a_one_write : assert property (@(posedge clk) disable iff (!rst_n) !(x_we && base_we))
    else $error("asip_top: base write-back and custom instruction both write the GPRF");

endmodule
