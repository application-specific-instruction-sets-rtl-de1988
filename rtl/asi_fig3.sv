// asi_fig3: the worked-example ASI of the design description.
//
// A three-node template with four inputs and two outputs:
//   s = c + d
//   e = (a & b) + s
//   f = s
// The node operations (&, +, +), the operand names and the way they connect
// are the example's. Under the 2-read/1-write port limit, a and b arrive on
// the GPRF read ports, c and d must be moved into IRs beforehand, e leaves on
// the GPRF write port and f is parked in an IR to be moved out later.
//
// Purely combinational (a single-cycle ASI, as the example assumes a
// one-cycle hardware latency). Additions wrap modulo 2**DATA_W.
module asi_fig3 #(
  parameter int unsigned DATA_W = 32
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [DATA_W-1:0] c,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] e,
  output logic [DATA_W-1:0] f
);

  logic [DATA_W-1:0] sum_cd;

  always_comb begin
    sum_cd = c + d;
    e      = (a & b) + sum_cd;
    f      = sum_cd;
  end

endmodule
