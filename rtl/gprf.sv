// gprf: general purpose register file of the base processor.
//
// NUM_RD combinational read ports and one synchronous write port. The
// two-read/one-write organisation is the one the design is built around: it
// is what limits how many operands an ASI can receive or return in a single
// instruction, and every operand beyond it costs an ext_Rin or ext_Rout move.
// Register 0 reads as zero and ignores writes, as in the base processor
// family the design targets; this and the 32 x 32-bit size are this design's
// choices.
//
// Interface: raddr[i] -> rdata[i] combinationally in the same cycle; a write
// with we=1 lands at the rising edge of clk and is visible to reads in the
// next cycle (no write-to-read bypass). Reset clears every register.
module gprf #(
  parameter int unsigned NUM_REGS = 32,
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned NUM_RD   = 2,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [AW-1:0]     raddr [NUM_RD],
  output logic [DATA_W-1:0] rdata [NUM_RD],
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata
);

  logic [DATA_W-1:0] regs [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_RD; p++) begin
      rdata[p] = (raddr[p] == '0) ? '0 : regs[raddr[p]];
    end
  end

endmodule
