// tb_asi_fig3: self-checking test of the example ASI (e = (a&b)+(c+d),
// f = c+d). Applies directed corner values and random operands and compares
// both outputs with values computed in the testbench.
module tb_asi_fig3;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, c, d, e, f;
  int checks = 0, failures = 0;

  asi_fig3 #(.DATA_W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, tb, tc, td);
    logic [W-1:0] exp_f, exp_e;
    a = ta; b = tb; c = tc; d = td;
    #1;
    exp_f = W'(64'(tc) + 64'(td));
    exp_e = W'(64'(ta & tb) + 64'(exp_f));
    checks += 2;
    if (e !== exp_e) begin failures++; $display("FAIL e: %h %h %h %h -> %h exp %h", ta, tb, tc, td, e, exp_e); end
    if (f !== exp_f) begin failures++; $display("FAIL f: %h %h %h %h -> %h exp %h", ta, tb, tc, td, f, exp_f); end
  endtask

  initial begin
    apply(32'd0, 32'd0, 32'd0, 32'd0);
    apply(32'hF0F0_F0F0, 32'hFF00_FF00, 32'd1, 32'd2);    // e = F000F000 + 3
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'd1);  // wrap of c+d
    apply(32'd7, 32'd12, 32'd3, 32'd4);                   // (7&12)=4, +7 = 11
    for (int n = 0; n < 500; n++) apply($urandom, $urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
