// swan_xbar - one input of a one-time programmable crossbar.
//
// Every input of every primitive logic block, register, fabric output and
// canary comparator in a SWAN fabric is fed by one of these. It selects one
// source out of the fabric's common source numbering (see swan_pkg) using a
// select word held in fuses. ALLOW marks the sources that this crossbar is
// physically wired to: the fabric generator connects a block set to all and
// only the groups that could drive it, so disallowed sources carry no mux
// leg (synthesis removes them) and a select that points at one, or past
// N_SRC, yields constant 0.
//
// The mux itself is this design's own realisation of "fused crossbar": a
// plain one-hot compare per allowed source.
//
// Interface: src (N_SRC source bits), sel (fuse select), y (selected bit).
// Timing: purely combinational.
module swan_xbar #(
  parameter int unsigned      N_SRC = 8,
  parameter int unsigned      SEL_W = 3,
  parameter logic [N_SRC-1:0] ALLOW = '1
) (
  input  logic [N_SRC-1:0] src,
  input  logic [SEL_W-1:0] sel,
  output logic             y
);

  always_comb begin
    y = 1'b0;
    for (int unsigned i = 0; i < N_SRC; i++) begin
      if (ALLOW[i] && (32'(sel) == i)) y = src[i];
    end
  end

endmodule
