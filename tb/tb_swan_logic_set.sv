// tb_swan_logic_set - a set of four AO21 blocks with random fuse selects:
// every block must compute (a & b) | c of the sources its crossbars pick,
// with sources outside ALLOW reading as 0.
module tb_swan_logic_set;
  localparam int unsigned SIZE = 4, N_SRC = 12, SEL_W = 4;
  localparam logic [N_SRC-1:0] ALLOW = 12'b0111_1111_1111;
  logic [N_SRC-1:0] src;
  logic [3*SIZE*SEL_W-1:0] sel;
  logic [SIZE-1:0] y;
  int checks = 0, failures = 0;

  swan_logic_set #(.FN(swan_pkg::BLK_AO21), .SIZE(SIZE), .N_SRC(N_SRC), .SEL_W(SEL_W), .ALLOW(ALLOW))
    dut (.src(src), .sel(sel), .y(y));

  function automatic logic pick(logic [N_SRC-1:0] s, int idx);
    return (idx < N_SRC && ALLOW[idx]) ? s[idx] : 1'b0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ia, ib, ic;
    logic exp;
    for (int r = 0; r < 500; r++) begin
      src = N_SRC'($urandom);
      sel = (3*SIZE*SEL_W)'({$urandom, $urandom});
      #1;
      for (int k = 0; k < SIZE; k++) begin
        ia = int'(sel[(3*k)*SEL_W +: SEL_W]);
        ib = int'(sel[(3*k+1)*SEL_W +: SEL_W]);
        ic = int'(sel[(3*k+2)*SEL_W +: SEL_W]);
        exp = (pick(src, ia) & pick(src, ib)) | pick(src, ic);
        checks++;
        if (y[k] !== exp) begin
          failures++;
          $display("FAIL: block %0d y=%b expected %b", k, y[k], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
