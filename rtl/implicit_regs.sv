// implicit_regs: the implicit register (IR) file inside the custom logic.
//
// NUM_IREGS registers of DATA_W bits. Every register has its own write
// enable and write data so that one instruction can fill several IRs at once
// (an ext_Rin move fills two, an ASI may leave several extra results). All
// registers are read in parallel: an ASI takes its extra operands from them
// without naming them in the instruction word, which is what makes them
// implicit. A valid bit per register shows whether it has been written since
// reset (the empty slots drawn in the allocation tables of the description).
//
// The default of three IRs is the largest count any benchmark of the design
// needs. Reset clears the data and valid bits (own choice).
//
// Timing: writes land at the rising edge of clk; q and valid show the stored
// values combinationally, so a value written in one cycle is read in the next.
module implicit_regs #(
  parameter int unsigned NUM_IREGS = 3,
  parameter int unsigned DATA_W    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we    [NUM_IREGS],
  input  logic [DATA_W-1:0] wdata [NUM_IREGS],
  output logic [DATA_W-1:0] q     [NUM_IREGS],
  output logic              valid [NUM_IREGS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_IREGS; i++) begin
        q[i]     <= '0;
        valid[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < NUM_IREGS; i++) begin
        if (we[i]) begin
          q[i]     <= wdata[i];
          valid[i] <= 1'b1;
        end
      end
    end
  end

endmodule
