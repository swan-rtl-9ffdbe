// swan_reg_set - a set of identical state flip-flops.
//
// State of the protected logic (the privilege register is the typical case)
// lives in a set of SIZE identical flip-flops, each fed by its own
// one-time programmable D crossbar that can reach every source of the
// fabric. Any flop can therefore hold any logical register bit, and the
// flops not used by the configuration serve as canary stages.
// Flops clear to 0 on reset: reset behaviour is this design's choice.
//
// Interface: src (N_SRC fabric sources), sel (SIZE fuse selects, flop k at
// k*SEL_W), q (flop outputs).
// Timing: q updates on the rising clock edge after D is selected.
module swan_reg_set #(
  parameter int unsigned SIZE  = 6,
  parameter int unsigned N_SRC = 16,
  parameter int unsigned SEL_W = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_SRC-1:0]      src,
  input  logic [SIZE*SEL_W-1:0] sel,
  output logic [SIZE-1:0]       q
);

  logic [SIZE-1:0] d;

  for (genvar k = 0; k < SIZE; k++) begin : g_ff
    swan_xbar #(.N_SRC(N_SRC), .SEL_W(SEL_W)) u_xbar (
      .src (src),
      .sel (sel[k*SEL_W +: SEL_W]),
      .y   (d[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
