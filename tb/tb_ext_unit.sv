// tb_ext_unit: self-checking test of the custom instruction unit.
// Issues a random mix of ext_Rin (with one or two lanes, empty slots and
// out-of-range targets), ext_Rout, example ASIs and idle cycles, with random
// GPRF operand values, and compares the GPRF write request, the error flag
// and the implicit registers against a reference model each cycle. Every
// instruction must complete in the cycle it is issued.
module tb_ext_unit;
  import asip_pkg::*;
  localparam int unsigned N = 3;
  localparam int unsigned W = 32;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              ci_valid;
  ci_t               ci;
  logic [W-1:0]      dataa, datab;
  logic              gprf_we;
  logic [REG_AW-1:0] gprf_waddr;
  logic [W-1:0]      gprf_wdata;
  logic [W-1:0]      ir_q     [N];
  logic              ir_valid [N];
  logic              error;

  logic [W-1:0] ref_ir [N];
  logic         ref_v  [N];
  int checks = 0, failures = 0;
  int n_rin2 = 0, n_rout = 0, n_asi = 0, n_err = 0;

  ext_unit #(.NUM_IREGS(N), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; ci_valid = 1'b0; ci = '0; dataa = '0; datab = '0;
    for (int i = 0; i < N; i++) begin ref_ir[i] = '0; ref_v[i] = 1'b0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      logic         exp_we, exp_err;
      logic [W-1:0] exp_wd;
      logic [W-1:0] nxt_ir [N];
      logic         nxt_v  [N];
      @(negedge clk);
      // Compare the IR state against the model.
      for (int i = 0; i < N; i++) begin
        chk(ir_q[i] == ref_ir[i] && ir_valid[i] == ref_v[i], $sformatf("IR%0d state", i));
      end
      ci          = '0;
      ci_valid    = ($urandom_range(0, 7) != 0);
      ci.kind     = ci_kind_e'($urandom_range(0, 3));
      ci.rs1      = REG_AW'($urandom);
      ci.rs2      = REG_AW'($urandom);
      ci.rd       = REG_AW'($urandom);
      ci.rs1_v    = ($urandom_range(0, 3) != 0);
      ci.rs2_v    = ($urandom_range(0, 3) != 0);
      ci.ir_idx   = IR_IDX_W'(($urandom_range(0, 9) == 0) ? $urandom_range(N, 15) : $urandom_range(0, N - 1));
      ci.asi_id   = ($urandom_range(0, 9) == 0) ? ASI_ID_W'($urandom_range(1, 255)) : ASI_FIG3;
      ci.wr_rd    = ($urandom_range(0, 3) != 0);
      dataa       = $urandom;
      datab       = $urandom;
      // Reference model.
      exp_we = 1'b0; exp_wd = '0; exp_err = 1'b0;
      for (int i = 0; i < N; i++) begin nxt_ir[i] = ref_ir[i]; nxt_v[i] = ref_v[i]; end
      if (ci_valid) begin
        case (ci.kind)
          CI_EXT_RIN: begin
            int k;
            k = int'(ci.ir_idx);
            exp_err = (ci.rs1_v && k >= N) || (ci.rs2_v && k + 1 >= N);
            if (!exp_err) begin
              if (ci.rs1_v) begin nxt_ir[k] = dataa; nxt_v[k] = 1'b1; end
              if (ci.rs2_v) begin nxt_ir[k+1] = datab; nxt_v[k+1] = 1'b1; end
              if (ci.rs1_v && ci.rs2_v) n_rin2++;
            end
          end
          CI_EXT_ROUT: begin
            int k;
            k = int'(ci.ir_idx);
            exp_err = (k >= N);
            if (!exp_err) begin exp_we = 1'b1; exp_wd = ref_ir[k]; n_rout++; end
          end
          CI_ASI: begin
            if (ci.asi_id == ASI_FIG3) begin
              exp_we    = ci.wr_rd;
              exp_wd    = ci.wr_rd ? (dataa & datab) + ref_ir[0] + ref_ir[1] : '0;
              nxt_ir[0] = ref_ir[0] + ref_ir[1];
              nxt_v[0]  = 1'b1;
              n_asi++;
            end else begin
              exp_err = 1'b1;
            end
          end
          default: ;
        endcase
      end
      if (exp_err) n_err++;
      #1;
      chk(gprf_we == exp_we, "gprf_we");
      if (exp_we) begin
        chk(gprf_wdata == exp_wd, "gprf_wdata");
        chk(gprf_waddr == ci.rd, "gprf_waddr");
      end
      chk(error == exp_err, "error flag");
      @(posedge clk);
      for (int i = 0; i < N; i++) begin ref_ir[i] = nxt_ir[i]; ref_v[i] = nxt_v[i]; end
    end
    chk(n_rin2 > 0 && n_rout > 0 && n_asi > 0 && n_err > 0, "all instruction kinds exercised");
    $display("ext_Rin(2 lanes)=%0d ext_Rout=%0d ASI=%0d errors=%0d", n_rin2, n_rout, n_asi, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
