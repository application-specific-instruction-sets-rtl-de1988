// tb_implicit_regs: self-checking test of the implicit register file.
// Drives random per-register write enables and data and compares the stored
// values and valid bits against a reference model each cycle. Checks that
// reset empties every register and that several registers can be written in
// the same cycle.
module tb_implicit_regs;
  localparam int unsigned N = 3;
  localparam int unsigned W = 32;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         we    [N];
  logic [W-1:0] wdata [N];
  logic [W-1:0] q     [N];
  logic         valid [N];
  logic [W-1:0] ref_q [N];
  logic         ref_v [N];
  int checks = 0, failures = 0;
  int multi = 0;

  implicit_regs #(.NUM_IREGS(N), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    for (int i = 0; i < N; i++) begin
      we[i] = 1'b0; wdata[i] = '0; ref_q[i] = '0; ref_v[i] = 1'b0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (q[i] !== ref_q[i] || valid[i] !== ref_v[i]) begin
          failures++;
          $display("FAIL IR%0d: got %h/%b expected %h/%b", i, q[i], valid[i], ref_q[i], ref_v[i]);
        end
      end
      begin
        int cnt = 0;
        for (int i = 0; i < N; i++) begin
          we[i]    = ($urandom_range(0, 2) == 0);
          wdata[i] = $urandom;
          cnt += int'(we[i]);
        end
        if (cnt > 1) multi++;
      end
      @(posedge clk);
      for (int i = 0; i < N; i++) if (we[i]) begin
        ref_q[i] = wdata[i]; ref_v[i] = 1'b1;
      end
    end
    checks++;
    if (multi == 0) begin
      failures++;
      $display("FAIL no multi-register write happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
