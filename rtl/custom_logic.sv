// custom_logic: the application-specific functional unit (AFU).
//
// The AFU sits next to the ALU in the execute stage. Its input multiplexers
// present each ASI with its operands: the first two come from the two GPRF
// read ports, every further one is taken from an implicit register. Its
// output multiplexers send the primary result towards the GPRF write port
// and any further results into implicit registers.
//
// Operand binding (this design's choice, the description leaves it to the
// register allocator): extra input k of an ASI is read from IR[k], and extra
// output k is written to IR[k]. The allocator therefore places a value in the
// IR slot the consuming ASI expects, and a result left in IR[k] by one ASI
// can be consumed by the next ASI without any move.
//
// ASIs implemented:
//   ASI_FIG3 (0): a = opa, b = opb, c = IR[0], d = IR[1];
//                 result = e, IR[0] <= f        (see asi_fig3)
// Any other asi_id is reported on `illegal` and writes nothing.
// Only this ASI is defined, so the write requests for IR[1] and above stay
// zero; they are kept so that further ASIs can use them.
//
// Purely combinational; the IR writes it requests land at the next clock
// edge in implicit_regs.
module custom_logic
  import asip_pkg::*;
#(
  parameter int unsigned NUM_IREGS = 3,
  parameter int unsigned DATA_W    = 32
) (
  input  logic                asi_valid,
  input  logic [ASI_ID_W-1:0] asi_id,
  input  logic [DATA_W-1:0]   opa,
  input  logic [DATA_W-1:0]   opb,
  input  logic [DATA_W-1:0]   ir_q     [NUM_IREGS],
  output logic [DATA_W-1:0]   result,
  output logic                result_valid,
  output logic                ir_we    [NUM_IREGS],
  output logic [DATA_W-1:0]   ir_wdata [NUM_IREGS],
  output logic                illegal
);

  if (NUM_IREGS < 2) begin : g_chk
    $error("custom_logic: ASI_FIG3 needs at least two implicit registers");
  end

  logic [DATA_W-1:0] f3_e, f3_f;

  asi_fig3 #(.DATA_W(DATA_W)) u_fig3 (
    .a (opa),
    .b (opb),
    .c (ir_q[0]),
    .d (ir_q[1]),
    .e (f3_e),
    .f (f3_f)
  );

  always_comb begin
    result       = '0;
    result_valid = 1'b0;
    illegal      = 1'b0;
    for (int i = 0; i < NUM_IREGS; i++) begin
      ir_we[i]    = 1'b0;
      ir_wdata[i] = '0;
    end
    if (asi_valid) begin
      unique case (asi_id)
        ASI_FIG3: begin
          result       = f3_e;
          result_valid = 1'b1;
          ir_we[0]     = 1'b1;
          ir_wdata[0]  = f3_f;
        end
        default: illegal = 1'b1;
      endcase
    end
  end

endmodule
