// tb_swan_reg_set - a set of five flops with random D selects: after each
// rising edge every flop must hold the source its crossbar picked in the
// cycle before; reset clears all flops.
module tb_swan_reg_set;
  localparam int unsigned SIZE = 5, N_SRC = 10, SEL_W = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_SRC-1:0] src;
  logic [SIZE*SEL_W-1:0] sel;
  logic [SIZE-1:0] q, exp;
  int checks = 0, failures = 0;

  swan_reg_set #(.SIZE(SIZE), .N_SRC(N_SRC), .SEL_W(SEL_W))
    dut (.clk(clk), .rst_n(rst_n), .src(src), .sel(sel), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    src = '1;
    sel = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL: reset q=%b", q); end
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 400; r++) begin
      @(negedge clk);
      src = N_SRC'($urandom);
      sel = (SIZE*SEL_W)'($urandom);
      for (int k = 0; k < SIZE; k++) begin
        idx = int'(sel[k*SEL_W +: SEL_W]);
        exp[k] = (idx < N_SRC) ? src[idx] : 1'b0;
      end
      @(posedge clk);
      #1;
      checks++;
      if (q !== exp) begin failures++; $display("FAIL: q=%b expected %b", q, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
