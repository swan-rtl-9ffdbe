// swan_guess_bench - trojan trials on one fabric size.
//
// Testbench helper. Holds a swan_fabric whose camouflaged MUX set and flop
// set have SM copies each, and plays TRIALS chips: each trial gets a fresh
// random configuration (swan_map_pkg), is checked against the reference
// model for 30 clean cycles, then has copy 0 of the MUX set forced to 1 for
// 200 cycles.
// ANALYTIC = 0, blind guess: the trojan always fires. A trial where the
// configuration put the privilege logic on copy 0 must show escalation
// without an alarm; any other trial must raise the canary alarm and keep
// correct outputs.
// ANALYTIC = 1, fuse-reading trojan: it fires only if the fuses of copy 0's
// select input point into the OA21 set, as the real privilege MUX's do and
// a canary's never do. It must never raise the alarm, and must succeed
// exactly on the trials where copy 0 carries the privilege logic.
// Results are reported on the ports when done goes high.
module swan_guess_bench #(
  parameter int SM     = 6,
  parameter int TRIALS = 96,
  parameter bit ANALYTIC = 1'b0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   hits,
  output int   detects
);
  import swan_map_pkg::*;

  localparam int unsigned N_IN = 8, N_OUT = 4, LFSR_W = 8;
  localparam int unsigned N_REG = SM, N_CHK = 2 * SM;
  localparam int unsigned N_BLK = 3 + 3 + SM + 3;
  localparam int unsigned N_SRC = 2 + N_IN + LFSR_W + N_REG + N_BLK;
  localparam int unsigned SEL_W = $clog2(N_SRC);
  localparam int unsigned CFG_W = (3 * N_BLK + N_REG + N_OUT + 2 * N_CHK) * SEL_W + N_CHK;

  logic rst_n;
  logic [CFG_W-1:0] cfg;
  logic [N_IN-1:0]  pin;
  logic [N_OUT-1:0] pout;
  logic             alarm;
  logic [N_CHK-1:0] mism;

  swan_fabric #(.SECURE_MAPPINGS(SM), .N_REG(N_REG), .N_CHK(N_CHK)) dut (
    .clk (clk), .rst_n (rst_n), .cfg (cfg), .pin (pin), .pout (pout),
    .canary_alarm (alarm), .canary_mismatch (mism)
  );

  swan_mapper m;
  logic priv;

  // The analytical trojan's fuse monitor: select of input c of MUX copy 0.
  function automatic bit fuse_says_target();
    int sel;
    sel = int'(cfg[swan_pkg::cfg_blk_off(m.first[2], 2, SEL_W) +: SEL_W]);
    return sel >= m.s_blk(1, 0) && sel < m.s_blk(1, m.size[1]);
  endfunction
  int   priv_diff, out_diff;

  task automatic run(int n);
    logic [3:0] exp;
    priv_diff = 0;
    out_diff  = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      pin = N_IN'($urandom);
      #1;
      exp = ref_out(pin, priv, m.k);
      if (pout[0] != exp[0]) priv_diff++;
      if (pout != exp) out_diff++;
      @(posedge clk);
      priv = ref_next(pin, priv);
    end
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL (%0d copies): %s", SM, what); end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0; hits = 0; detects = 0;
    rst_n = 1'b0; pin = '0; cfg = '0;
    m = new(N_IN, LFSR_W, N_REG, N_OUT, N_CHK, 3, SM, 4'b0100);
    for (int t = 0; t < TRIALS; t++) begin
      m.build((t == 0) ? 0 : -1, -1);
      cfg = m.cfg[CFG_W-1:0];
      rst_n = 1'b0;
      pin = '0;
      priv = 1'b0;
      repeat (2) @(posedge clk);
      @(negedge clk) rst_n = 1'b1;
      run(30);
      check(out_diff == 0 && !alarm, $sformatf("trial %0d clean run", t));
      if (!ANALYTIC || fuse_says_target()) force dut.g_set[2].u_set.g_blk[0].u_blk.y = 1'b1;
      run(200);
      if (ANALYTIC && !fuse_says_target()) begin
        check(!alarm && out_diff == 0 && m.perm[2][0] != 0, $sformatf("trial %0d: dormant trojan", t));
      end else if (m.perm[2][0] == 0) begin
        check(priv_diff > 0 && !alarm, $sformatf("trial %0d: hit on the mapped copy (diff %0d alarm %b mism %b)", t, priv_diff, alarm, mism));
        hits++;
      end else begin
        check(alarm && out_diff == 0, $sformatf("trial %0d: trojan on a canary detected", t));
        detects++;
      end
      release dut.g_set[2].u_set.g_blk[0].u_blk.y;
    end
    done = 1'b1;
  end
endmodule
