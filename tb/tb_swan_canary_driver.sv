// tb_swan_canary_driver - the canary LFSR must be maximal length: starting
// from its seed it visits 2^W-1 distinct non-zero states and returns to
// the seed exactly after 2^W-1 clocks. Checked for W = 8 and W = 5.
module tb_swan_canary_driver;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] s8;
  logic [4:0] s5;
  int checks = 0, failures = 0;

  swan_canary_driver #(.W(8)) dut8 (.clk(clk), .rst_n(rst_n), .state(s8));
  swan_canary_driver #(.W(5), .SEED(5'h13)) dut5 (.clk(clk), .rst_n(rst_n), .state(s5));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    automatic bit seen8 [256];
    automatic bit seen5 [32];
    automatic int dup8 = 0, dup5 = 0, zero = 0;
    repeat (2) @(posedge clk);
    #1;
    check(s8 == 8'h01 && s5 == 5'h13, "reset loads the seed");
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 255; i++) begin
      if (seen8[s8]) dup8++;
      seen8[s8] = 1'b1;
      if (i < 31) begin
        if (seen5[s5]) dup5++;
        seen5[s5] = 1'b1;
        if (i > 0) check(!(s5 == 5'h13), "5-bit LFSR period shorter than 31");
      end
      if (i == 31) check(s5 == 5'h13, "5-bit LFSR back to seed after 31 clocks");
      if (s8 == 0 || s5 == 0) zero++;
      @(posedge clk);
      #1;
    end
    check(s8 == 8'h01, "8-bit LFSR back to seed after 255 clocks");
    check(dup8 == 0, "8-bit LFSR states all distinct");
    check(dup5 == 0, "5-bit LFSR states all distinct");
    check(zero == 0, "LFSR never reaches the all-zero state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
