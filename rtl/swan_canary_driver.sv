// swan_canary_driver - the LFSR that drives all canary chains.
//
// Canaries are chains of unused fabric blocks that all receive the same
// inputs, so untampered copies always agree. The common driver is a
// maximal-length Fibonacci LFSR of W bits: it walks through all 2^W-1
// non-zero patterns, exercising each canary over its whole input space,
// and keeps running as long as the chip is clocked, so latent triggers
// are caught too. The width is a parameter (the fabric sizes it); the seed
// and the Fibonacci form are this design's choices.
//
// Interface: state - the W LFSR bits, offered to the crossbars as sources.
// Timing: advances one step per rising clock edge; reset loads SEED.
module swan_canary_driver #(
  parameter int unsigned   W    = 8,
  parameter logic [W-1:0]  SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] state
);

  localparam logic [W-1:0] TAPS = W'(swan_pkg::lfsr_taps(W));

  logic fb;
  assign fb = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= SEED;
    else        state <= {state[W-2:0], fb};
  end

  initial begin
    assert (W >= 3 && W <= 16) else $error("swan_canary_driver: W must be 3..16");
    assert (SEED != '0) else $error("swan_canary_driver: SEED must be non-zero");
  end

endmodule
