// tb_asip_top: end-to-end test of the ASIP datapath at its default size
// (32 x 32-bit GPRF, three implicit registers).
//
// A reference model of the GPRF and the IRs runs alongside the design; every
// cycle the testbench compares both read ports and all IRs with it.
// Phases:
//   1. Base write-back loads operands into the GPRF.
//   2. The worked example: ext_Rin(c,d); ASI(a,b) -> e; ext_Rout(f). With two
//      read ports and one write port the four-input, two-output ASI costs
//      ceil(4/2)-1 = 1 extra move in and ceil(2/1)-1 = 1 extra move out, so
//      the sequence must take exactly 3 cycles.
//   3. Operand reuse: a second ASI finds c (the previous f) and d already in
//      the IRs and runs with no move at all; ext_Rin with an empty slot
//      refreshes only d.
//   4. A random instruction stream with the same model.
// Each mechanism (two-lane ext_Rin, ext_Rin with an empty slot, ext_Rout,
// ASI writing the GPRF, ASI writing only IRs, ASI reusing IR contents,
// base write-back, illegal instruction) is counted; one that never happened
// counts as a failure.
module tb_asip_top;
  import asip_pkg::*;
  localparam int unsigned N = 3;
  localparam int unsigned W = 32;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              ci_valid;
  ci_t               ci;
  logic              base_we;
  logic [REG_AW-1:0] base_waddr;
  logic [W-1:0]      base_wdata;
  logic [W-1:0]      rdata_a, rdata_b;
  logic              ext_error;
  logic [N-1:0]      ir_valid;
  logic [W-1:0]      ir_data [N];

  asip_top dut (.*);

  always #5 clk = ~clk;

  // Reference state.
  logic [W-1:0] m_gpr [32];
  logic [W-1:0] m_ir  [N];
  logic         m_irv [N];
  bit           ir_moved_since_asi;
  int checks = 0, failures = 0, cycles = 0;
  int c_rin2 = 0, c_rin_empty = 0, c_rout = 0, c_asi_wr = 0, c_asi_ir = 0;
  int c_reuse = 0, c_base = 0, c_err = 0;

  always @(posedge clk) cycles++;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic ci_t mk(ci_kind_e k, logic [REG_AW-1:0] rs1, logic [REG_AW-1:0] rs2,
                             logic [REG_AW-1:0] rd, logic v1, logic v2,
                             logic [IR_IDX_W-1:0] idx, logic wr);
    ci_t c;
    c = '0;
    c.kind = k; c.rs1 = rs1; c.rs2 = rs2; c.rd = rd; c.rs1_v = v1; c.rs2_v = v2;
    c.ir_idx = idx; c.wr_rd = wr; c.asi_id = ASI_FIG3;
    return c;
  endfunction

  // Issue one instruction for one cycle, check the combinational outputs
  // against the model, then update the model at the clock edge.
  task automatic issue(input logic v, input ci_t c, input logic bwe,
                       input logic [REG_AW-1:0] bwa, input logic [W-1:0] bwd);
    logic [W-1:0] a, b;
    logic         xwe, err;
    logic [W-1:0] xwd;
    @(negedge clk);
    ci_valid = v; ci = c; base_we = bwe; base_waddr = bwa; base_wdata = bwd;
    #1;
    a = (c.rs1 == 0) ? '0 : m_gpr[c.rs1];
    b = (c.rs2 == 0) ? '0 : m_gpr[c.rs2];
    chk(rdata_a == a, "read port a");
    chk(rdata_b == b, "read port b");
    for (int i = 0; i < N; i++) chk(ir_data[i] == m_ir[i] && ir_valid[i] == m_irv[i], $sformatf("IR%0d", i));
    xwe = 1'b0; xwd = '0; err = 1'b0;
    if (v) begin
      case (c.kind)
        CI_EXT_RIN: begin
          int k;
          k = int'(c.ir_idx);
          err = (c.rs1_v && k >= N) || (c.rs2_v && k + 1 >= N);
          if (!err) begin
            if (c.rs1_v && c.rs2_v) c_rin2++;
            if (c.rs1_v != c.rs2_v) c_rin_empty++;
          end
        end
        CI_EXT_ROUT: begin
          err = int'(c.ir_idx) >= N;
          if (!err) begin xwe = 1'b1; xwd = m_ir[c.ir_idx]; c_rout++; end
        end
        CI_ASI: begin
          err = c.asi_id != ASI_FIG3;
          if (!err) begin
            xwe = c.wr_rd;
            xwd = (a & b) + m_ir[0] + m_ir[1];
            if (c.wr_rd) c_asi_wr++; else c_asi_ir++;
            if (!ir_moved_since_asi && m_irv[0] && m_irv[1]) c_reuse++;
          end
        end
        default: ;
      endcase
    end
    if (err) c_err++;
    chk(ext_error == err, "error flag");
    @(posedge clk);
    // Model update.
    if (v && !err) begin
      case (c.kind)
        CI_EXT_RIN: begin
          if (c.rs1_v) begin m_ir[c.ir_idx] = a; m_irv[c.ir_idx] = 1'b1; end
          if (c.rs2_v) begin m_ir[c.ir_idx + 1] = b; m_irv[c.ir_idx + 1] = 1'b1; end
          ir_moved_since_asi = 1'b1;
        end
        CI_ASI: begin
          m_ir[0] = m_ir[0] + m_ir[1]; m_irv[0] = 1'b1;
          ir_moved_since_asi = 1'b0;
        end
        default: ;
      endcase
    end
    if (xwe) begin
      if (c.rd != 0) m_gpr[c.rd] = xwd;
    end else if (bwe) begin
      if (bwa != 0) m_gpr[bwa] = bwd;
      c_base++;
    end
  endtask

  task automatic idle();
    issue(1'b0, '0, 1'b0, '0, '0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    logic [W-1:0] va, vb, vc, vd, ve, vf;
    rst_n = 1'b0; ci_valid = 1'b0; ci = '0; base_we = 1'b0; base_waddr = '0; base_wdata = '0;
    for (int i = 0; i < 32; i++) m_gpr[i] = '0;
    for (int i = 0; i < N; i++) begin m_ir[i] = '0; m_irv[i] = 1'b0; end
    ir_moved_since_asi = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Phase 1: base write-back loads a, b, c, d into r1..r4.
    va = 32'h0000_F0F3; vb = 32'h0000_0F3F; vc = 32'd1000; vd = 32'd234;
    issue(1'b0, '0, 1'b1, 5'd1, va);
    issue(1'b0, '0, 1'b1, 5'd2, vb);
    issue(1'b0, '0, 1'b1, 5'd3, vc);
    issue(1'b0, '0, 1'b1, 5'd4, vd);

    // Phase 2: the worked example, three cycles.
    t0 = cycles;
    issue(1'b1, mk(CI_EXT_RIN, 5'd3, 5'd4, 5'd0, 1'b1, 1'b1, 4'd0, 1'b0), 1'b0, '0, '0);
    issue(1'b1, mk(CI_ASI,     5'd1, 5'd2, 5'd5, 1'b0, 1'b0, 4'd0, 1'b1), 1'b0, '0, '0);
    issue(1'b1, mk(CI_EXT_ROUT, 5'd0, 5'd0, 5'd6, 1'b0, 1'b0, 4'd0, 1'b0), 1'b0, '0, '0);
    chk(cycles - t0 == 3, $sformatf("example takes 3 cycles, took %0d", cycles - t0));
    // Read back e (r5) and f (r6) through the base read ports.
    ve = (va & vb) + vc + vd; vf = vc + vd;
    issue(1'b0, mk(CI_NONE, 5'd5, 5'd6, 5'd0, 1'b0, 1'b0, 4'd0, 1'b0), 1'b0, '0, '0);
    chk(rdata_a == ve && rdata_b == vf, "example results e and f");

    // Phase 3: reuse. IR0 holds f and IR1 holds d: a second ASI needs no move.
    issue(1'b1, mk(CI_ASI, 5'd1, 5'd2, 5'd7, 1'b0, 1'b0, 4'd0, 1'b1), 1'b0, '0, '0);
    issue(1'b0, mk(CI_NONE, 5'd7, 5'd0, 5'd0, 1'b0, 1'b0, 4'd0, 1'b0), 1'b0, '0, '0);
    chk(rdata_a == (va & vb) + vf + vd, "reused-operand ASI result");
    // Refresh only d from r2 (empty first slot), then an ASI that keeps its
    // primary result in the datapath and leaves only the IR result.
    issue(1'b1, mk(CI_EXT_RIN, 5'd0, 5'd2, 5'd0, 1'b0, 1'b1, 4'd0, 1'b0), 1'b0, '0, '0);
    issue(1'b1, mk(CI_ASI, 5'd1, 5'd2, 5'd8, 1'b0, 1'b0, 4'd0, 1'b0), 1'b0, '0, '0);
    issue(1'b1, mk(CI_EXT_ROUT, 5'd0, 5'd0, 5'd9, 1'b0, 1'b0, 4'd0, 1'b0), 1'b0, '0, '0);
    issue(1'b0, mk(CI_NONE, 5'd9, 5'd8, 5'd0, 1'b0, 1'b0, 4'd0, 1'b0), 1'b0, '0, '0);
    chk(rdata_a == vf + vd + vb, "IR-only result moved out");
    chk(rdata_b == '0, "rd untouched when wr_rd is clear");
    // The third IR.
    issue(1'b1, mk(CI_EXT_RIN, 5'd1, 5'd2, 5'd0, 1'b1, 1'b1, 4'd1, 1'b0), 1'b0, '0, '0);
    issue(1'b1, mk(CI_EXT_ROUT, 5'd0, 5'd0, 5'd10, 1'b0, 1'b0, 4'd2, 1'b0), 1'b0, '0, '0);
    issue(1'b0, mk(CI_NONE, 5'd10, 5'd0, 5'd0, 1'b0, 1'b0, 4'd0, 1'b0), 1'b0, '0, '0);
    chk(rdata_a == vb, "IR2 round trip");
    // Illegal: unknown ASI and a move past the last IR.
    begin
      ci_t c;
      c = mk(CI_ASI, 5'd1, 5'd2, 5'd11, 1'b0, 1'b0, 4'd0, 1'b1);
      c.asi_id = 8'd77;
      issue(1'b1, c, 1'b0, '0, '0);
      issue(1'b1, mk(CI_EXT_RIN, 5'd1, 5'd2, 5'd0, 1'b1, 1'b1, 4'd2, 1'b0), 1'b0, '0, '0);
    end

    // Phase 4: random stream.
    for (int n = 0; n < 3000; n++) begin
      ci_t c;
      logic v, bwe;
      c        = '0;
      v        = ($urandom_range(0, 4) != 0);
      c.kind   = ci_kind_e'($urandom_range(0, 3));
      c.rs1    = REG_AW'($urandom);
      c.rs2    = REG_AW'($urandom);
      c.rd     = REG_AW'($urandom);
      c.rs1_v  = ($urandom_range(0, 3) != 0);
      c.rs2_v  = ($urandom_range(0, 3) != 0);
      c.ir_idx = IR_IDX_W'(($urandom_range(0, 15) == 0) ? 5 : $urandom_range(0, N - 1));
      c.asi_id = ($urandom_range(0, 15) == 0) ? 8'd9 : ASI_FIG3;
      c.wr_rd  = ($urandom_range(0, 3) != 0);
      // The base pipeline writes back only when no custom instruction is in
      // the write stage.
      bwe = (!v || c.kind == CI_NONE || c.kind == CI_EXT_RIN) && ($urandom_range(0, 1) == 1);
      issue(v, c, bwe, REG_AW'($urandom), $urandom);
    end
    idle();

    $display("mechanisms: ext_Rin2=%0d ext_Rin_empty=%0d ext_Rout=%0d asi_wr=%0d asi_ir_only=%0d reuse=%0d base_wb=%0d illegal=%0d",
             c_rin2, c_rin_empty, c_rout, c_asi_wr, c_asi_ir, c_reuse, c_base, c_err);
    chk(c_rin2 > 0, "two-lane ext_Rin happened");
    chk(c_rin_empty > 0, "ext_Rin with empty slot happened");
    chk(c_rout > 0, "ext_Rout happened");
    chk(c_asi_wr > 0, "ASI with GPRF write happened");
    chk(c_asi_ir > 0, "ASI with IR-only result happened");
    chk(c_reuse > 0, "ASI reusing IR contents happened");
    chk(c_base > 0, "base write-back happened");
    chk(c_err > 0, "illegal instruction happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
