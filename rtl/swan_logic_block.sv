// swan_logic_block - one primitive logic block of a SWAN fabric.
//
// A primitive logic block is an indivisible cluster of a few gates with a
// fixed function; a fabric holds many identical copies of each cluster type,
// so that one logical block of the protected design can be placed on any
// copy. Unused copies become canaries. FN picks the cluster (swan_pkg::blk_fn_e);
// which clusters exist is this design's choice, standing in for the
// clusters a generator would mine from the protected netlist.
//
// Interface: a, b, c inputs (unused ones are ignored by the function), y.
// Timing: purely combinational.
module swan_logic_block #(
  parameter swan_pkg::blk_fn_e FN = swan_pkg::BLK_AO21
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output wire  y
);

  assign y = swan_pkg::blk_eval(FN, a, b, c);

endmodule
