// tb_swan_xbar - self-checking test of one programmable crossbar input.
// Sweeps every select value (including ones past the source count) over
// random source patterns with a partial ALLOW mask; the expected bit is the
// selected source when it is wired, otherwise 0.
module tb_swan_xbar;
  localparam int unsigned N_SRC = 11, SEL_W = 4;
  localparam logic [N_SRC-1:0] ALLOW = 11'b101_1011_0111;
  logic [N_SRC-1:0] src;
  logic [SEL_W-1:0] sel;
  logic y, exp;
  int checks = 0, failures = 0;

  swan_xbar #(.N_SRC(N_SRC), .SEL_W(SEL_W), .ALLOW(ALLOW)) dut (.src(src), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      src = N_SRC'($urandom);
      for (int s = 0; s < (1 << SEL_W); s++) begin
        sel = SEL_W'(s);
        #1;
        exp = (s < N_SRC && ALLOW[s]) ? src[s] : 1'b0;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL: src=%b sel=%0d y=%b expected %b", src, s, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
