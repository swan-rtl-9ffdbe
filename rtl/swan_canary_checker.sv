// swan_canary_checker - compares canary chains and raises the alarm.
//
// N_CHK comparators. Each takes two operands through its own one-time
// programmable crossbars (normally the outputs of two copies of the same
// canary chain stage) and an enable fuse. Copies of a chain are identical
// and share the canary driver, so an enabled comparator that ever sees its
// operands differ has found a modified block. The per-comparator mismatch
// flags tell which region of the fabric was hit; canary_alarm is their OR
// and feeds the programmer's recovery logic.
// Registering the compare and keeping the flags until reset ("sticky") are
// this design's choices, so that a single-cycle trojan pulse is not lost.
//
// Interface: src (fabric sources), sel_a/sel_b (fuse selects, comparator k
// at k*SEL_W), en (comparator enable fuses), mismatch (sticky flags), alarm.
// Timing: a mismatch is flagged on the clock edge after it is visible.
module swan_canary_checker #(
  parameter int unsigned N_CHK = 4,
  parameter int unsigned N_SRC = 16,
  parameter int unsigned SEL_W = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_SRC-1:0]       src,
  input  logic [N_CHK*SEL_W-1:0] sel_a,
  input  logic [N_CHK*SEL_W-1:0] sel_b,
  input  logic [N_CHK-1:0]       en,
  output logic [N_CHK-1:0]       mismatch,
  output logic                   alarm
);

  logic [N_CHK-1:0] op_a, op_b, diff;

  for (genvar k = 0; k < N_CHK; k++) begin : g_cmp
    swan_xbar #(.N_SRC(N_SRC), .SEL_W(SEL_W)) u_xa (
      .src (src), .sel (sel_a[k*SEL_W +: SEL_W]), .y (op_a[k])
    );
    swan_xbar #(.N_SRC(N_SRC), .SEL_W(SEL_W)) u_xb (
      .src (src), .sel (sel_b[k*SEL_W +: SEL_W]), .y (op_b[k])
    );
  end

  assign diff = en & (op_a ^ op_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mismatch <= '0;
      alarm    <= 1'b0;
    end else begin
      mismatch <= mismatch | diff;
      alarm    <= alarm | (|diff);
    end
  end

endmodule
