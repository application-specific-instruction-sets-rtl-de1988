// tb_gprf: self-checking test of the 2-read/1-write register file.
// Writes random values to random registers while reading on both ports and
// compares against a reference array kept in the testbench. Checks that
// register 0 stays zero, that a write is visible only from the next cycle,
// and that both read ports work independently in the same cycle.
module tb_gprf;
  localparam int unsigned NUM_REGS = 32;
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned AW       = 5;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [AW-1:0]     raddr [2];
  logic [DATA_W-1:0] rdata [2];
  logic              we;
  logic [AW-1:0]     waddr;
  logic [DATA_W-1:0] wdata;
  logic [DATA_W-1:0] ref_q [NUM_REGS];
  int checks = 0, failures = 0;

  gprf #(.NUM_REGS(NUM_REGS), .DATA_W(DATA_W), .NUM_RD(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [DATA_W-1:0] got, input logic [DATA_W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; waddr = '0; wdata = '0;
    raddr[0] = '0; raddr[1] = '0;
    for (int i = 0; i < NUM_REGS; i++) ref_q[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // After reset all registers read zero.
    for (int i = 0; i < NUM_REGS; i++) begin
      raddr[0] = AW'(i); raddr[1] = AW'(NUM_REGS - 1 - i);
      #1 check(rdata[0], '0, "reset port0");
      check(rdata[1], '0, "reset port1");
    end
    // Random traffic.
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      we       = ($urandom_range(0, 3) != 0);
      waddr    = AW'($urandom_range(0, NUM_REGS - 1));
      wdata    = $urandom;
      raddr[0] = (n % 7 == 0) ? waddr : AW'($urandom_range(0, NUM_REGS - 1));
      raddr[1] = AW'($urandom_range(0, NUM_REGS - 1));
      #1;
      // Reads see the old value during the write cycle.
      check(rdata[0], ref_q[raddr[0]], "port0");
      check(rdata[1], ref_q[raddr[1]], "port1");
      @(posedge clk);
      if (we && waddr != 0) ref_q[waddr] = wdata;
      #1;
      raddr[1] = waddr;
      #1 check(rdata[1], ref_q[waddr], "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
