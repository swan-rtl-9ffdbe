// tb_swan_logic_block - checks every primitive logic block function against
// its truth table over all eight input combinations.
module tb_swan_logic_block;
  import swan_pkg::*;
  localparam int NF = 8;
  localparam blk_fn_e FNS [NF] = '{BLK_AND2, BLK_OR2, BLK_XOR2, BLK_NAND2,
                                   BLK_MUX2, BLK_AO21, BLK_OA21, BLK_AOI21};
  // Truth tables, index = {c, b, a}.
  localparam logic [7:0] TT [NF] = '{8'b1000_1000, 8'b1110_1110, 8'b0110_0110, 8'b0111_0111,
                                     8'b1100_1010, 8'b1111_1000, 8'b1110_0000, 8'b0000_0111};
  logic a, b, c;
  logic [NF-1:0] y;
  int checks = 0, failures = 0;

  for (genvar f = 0; f < NF; f++) begin : g_fn
    swan_logic_block #(.FN(FNS[f])) dut (.a(a), .b(b), .c(c), .y(y[f]));
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {c, b, a} = 3'(v);
      #1;
      for (int f = 0; f < NF; f++) begin
        checks++;
        if (y[f] !== TT[f][v]) begin
          failures++;
          $display("FAIL: fn %0d cba=%03b y=%b expected %b", f, v[2:0], y[f], TT[f][v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
