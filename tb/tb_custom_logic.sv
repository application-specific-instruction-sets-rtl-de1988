// tb_custom_logic: self-checking test of the AFU's operand and result
// routing. For the example ASI it checks that a and b come from the GPRF
// ports, c and d from IR[0] and IR[1], that e is the primary result and f is
// written to IR[0] only. It also checks that nothing is written when no ASI
// is issued and that an unknown ASI number raises `illegal` and writes
// nothing.
module tb_custom_logic;
  import asip_pkg::*;
  localparam int unsigned N = 3;
  localparam int unsigned W = 32;

  logic                asi_valid;
  logic [ASI_ID_W-1:0] asi_id;
  logic [W-1:0]        opa, opb;
  logic [W-1:0]        ir_q     [N];
  logic [W-1:0]        result;
  logic                result_valid;
  logic                ir_we    [N];
  logic [W-1:0]        ir_wdata [N];
  logic                illegal;
  int checks = 0, failures = 0;

  custom_logic #(.NUM_IREGS(N), .DATA_W(W)) dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      logic [W-1:0] exp_f;
      opa = $urandom; opb = $urandom;
      for (int i = 0; i < N; i++) ir_q[i] = $urandom;
      asi_id    = (n % 5 == 4) ? ASI_ID_W'($urandom_range(1, 255)) : ASI_FIG3;
      asi_valid = (n % 7 != 6);
      #1;
      exp_f = ir_q[0] + ir_q[1];
      if (!asi_valid) begin
        chk(!result_valid && !illegal, "idle: no result");
        for (int i = 0; i < N; i++) chk(!ir_we[i], "idle: no IR write");
      end else if (asi_id == ASI_FIG3) begin
        chk(result_valid && !illegal, "fig3: result valid");
        chk(result == (opa & opb) + exp_f, "fig3: e");
        chk(ir_we[0] && ir_wdata[0] == exp_f, "fig3: f to IR0");
        for (int i = 1; i < N; i++) chk(!ir_we[i], "fig3: other IRs untouched");
      end else begin
        chk(illegal && !result_valid, "unknown ASI flagged");
        for (int i = 0; i < N; i++) chk(!ir_we[i], "unknown ASI: no IR write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
