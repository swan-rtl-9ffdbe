// swan_logic_set - a set of identical primitive logic blocks.
//
// SIZE copies of one primitive logic block, each with its own three
// one-time programmable input crossbars. Because every copy can take its
// inputs from any source the set is wired to, any copy can play the role of
// any logical block of this type in the protected netlist: the copies are
// indistinguishable until the fuses are set. SIZE is the number of physical
// locations a logical block of the set can be mapped to (larger for
// camouflaged sets that carry security-critical signals).
//
// Interface: src - the sources visible to this set (N_SRC bits, numbered as
// in swan_pkg); sel - 3*SIZE fuse selects, block k input i at
// (3*k+i)*SEL_W; y - block outputs.
// Timing: purely combinational.
module swan_logic_set #(
  parameter swan_pkg::blk_fn_e FN    = swan_pkg::BLK_AO21,
  parameter int unsigned       SIZE  = 6,
  parameter int unsigned       N_SRC = 16,
  parameter int unsigned       SEL_W = 4,
  parameter logic [N_SRC-1:0]  ALLOW = '1
) (
  input  logic [N_SRC-1:0]        src,
  input  logic [3*SIZE*SEL_W-1:0] sel,
  output logic [SIZE-1:0]         y
);

  for (genvar k = 0; k < SIZE; k++) begin : g_blk
    logic [2:0] in;
    for (genvar i = 0; i < 3; i++) begin : g_in
      swan_xbar #(.N_SRC(N_SRC), .SEL_W(SEL_W), .ALLOW(ALLOW)) u_xbar (
        .src (src),
        .sel (sel[(3*k+i)*SEL_W +: SEL_W]),
        .y   (in[i])
      );
    end
    swan_logic_block #(.FN(FN)) u_blk (
      .a (in[0]),
      .b (in[1]),
      .c (in[2]),
      .y (y[k])
    );
  end

endmodule
