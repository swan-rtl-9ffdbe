// tb_swan_canary_checker - three comparators over eight sources. Equal
// operands never flag; a difference on an enabled comparator sets its
// mismatch flag and the alarm one clock later and both stay set until
// reset; a disabled comparator never flags.
module tb_swan_canary_checker;
  localparam int unsigned N_CHK = 3, N_SRC = 8, SEL_W = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_SRC-1:0] src;
  logic [N_CHK*SEL_W-1:0] sel_a, sel_b;
  logic [N_CHK-1:0] en, mism;
  logic alarm;
  int checks = 0, failures = 0;

  swan_canary_checker #(.N_CHK(N_CHK), .N_SRC(N_SRC), .SEL_W(SEL_W)) dut (
    .clk(clk), .rst_n(rst_n), .src(src), .sel_a(sel_a), .sel_b(sel_b), .en(en),
    .mismatch(mism), .alarm(alarm));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (mism=%b alarm=%b)", what, mism, alarm); end
  endtask

  initial begin
    logic v;
    // comparator 0: src1 vs src2, 1: src3 vs src4, 2 (disabled): src5 vs src6
    sel_a = {3'd5, 3'd3, 3'd1};
    sel_b = {3'd6, 3'd4, 3'd2};
    en    = 3'b011;
    src   = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // identical canary copies, comparator 2 operands differ but it is off
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      v = 1'($urandom);
      src = {1'b0, ~v, v, v, v, v, v, 1'b0};
      @(posedge clk); #1;
      check(mism == 3'b000 && !alarm, "no flag while copies agree");
    end
    // one-cycle disagreement on comparator 1
    @(negedge clk) src = 8'b0001_0000;
    @(posedge clk); #1;
    check(mism == 3'b010 && alarm, "mismatch on comparator 1 flagged next clock");
    @(negedge clk) src = '0;
    repeat (5) @(posedge clk);
    #1;
    check(mism == 3'b010 && alarm, "flags are sticky");
    @(negedge clk) src = 8'b0000_0100;
    @(posedge clk); #1;
    check(mism == 3'b011, "second region flagged");
    @(negedge clk) rst_n = 1'b0;
    #1;
    check(mism == 3'b000 && !alarm, "reset clears the flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
