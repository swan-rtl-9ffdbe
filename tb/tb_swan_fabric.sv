// tb_swan_fabric - self-checking test of the SWAN fabric at its defaults.
//
// Drives the configuration word directly (no fuses). For several random
// configurations built by swan_map_pkg it checks, cycle by cycle, that the
// fabric computes the example privilege logic exactly like the reference
// model (functionally equivalent placements), that the side-channel output
// follows the configuration constant, and that no canary fires. It then
// forces one physical copy of the camouflaged MUX set to 1, as a trojan
// would, once where that copy is a canary (the alarm and exactly the
// comparators watching that copy must fire) and once where it carries the
// privilege logic (privilege corrupted, no canary fires).
module tb_swan_fabric;
  import swan_map_pkg::*;

  localparam int unsigned N_IN = 8, N_OUT = 4, N_REG = 6, LFSR_W = 8, N_CHK = 12;
  localparam int unsigned N_BLK = 3 + 3 + 6 + 3;
  localparam int unsigned N_SRC = 2 + N_IN + LFSR_W + N_REG + N_BLK;
  localparam int unsigned SEL_W = $clog2(N_SRC);
  localparam int unsigned CFG_W = (3 * N_BLK + N_REG + N_OUT + 2 * N_CHK) * SEL_W + N_CHK;
  localparam int unsigned TROJAN_LOC = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CFG_W-1:0] cfg;
  logic [N_IN-1:0]  pin;
  logic [N_OUT-1:0] pout;
  logic             alarm;
  logic [N_CHK-1:0] mism;
  int checks = 0, failures = 0;
  int n_cfg = 0, n_k0 = 0, n_k1 = 0, n_detect = 0, n_hit = 0;

  swan_fabric dut (
    .clk (clk), .rst_n (rst_n), .cfg (cfg), .pin (pin), .pout (pout),
    .canary_alarm (alarm), .canary_mismatch (mism)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  swan_mapper m;
  logic priv;
  int   priv_diff;

  // Run n cycles of random inputs against the reference model.
  task automatic run(int n, bit expect_equal);
    logic [3:0] exp;
    priv_diff = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      pin = 8'($urandom);
      #1;
      exp = ref_out(pin, priv, m.k);
      if (expect_equal) check(pout == exp, $sformatf("pout %b expected %b", pout, exp));
      else if (pout[0] != exp[0]) priv_diff++;
      @(posedge clk);
      priv = ref_next(pin, priv);
    end
  endtask

  task automatic apply(int loc2, int k_sel);
    m.build(loc2, k_sel);
    cfg = m.cfg[CFG_W-1:0];
    rst_n = 1'b0;
    pin = '0;
    priv = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  endtask

  initial begin
    m = new(N_IN, LFSR_W, N_REG, N_OUT, N_CHK, 3, 6, 4'b0100);
    check(m.n_src == N_SRC && m.sel_w == SEL_W, "geometry");
    // 1) functional equivalence across random placements
    for (int c = 0; c < 8; c++) begin
      apply(-1, c % 2);
      n_cfg++;
      if (m.k) n_k1++; else n_k0++;
      run(200, 1'b1);
      check(!alarm && mism == '0, "no canary alarm on an untampered fabric");
    end
    // 2) trojan on a canary copy of the secure MUX set
    apply(0, 0);
    run(20, 1'b1);
    force dut.g_set[2].u_set.g_blk[TROJAN_LOC].u_blk.y = 1'b1;
    run(200, 1'b1);
    check(alarm == 1'b1, "trojan on a canary raises the alarm");
    check(64'(mism) == m.cmps_on(2, TROJAN_LOC),
          $sformatf("mismatch flags %b point at the hit copy (expected %b)", mism, m.cmps_on(2, TROJAN_LOC)));
    if (alarm) n_detect++;
    release dut.g_set[2].u_set.g_blk[TROJAN_LOC].u_blk.y;
    // 3) trojan on the copy that carries the privilege logic
    apply(TROJAN_LOC, 0);
    run(20, 1'b1);
    force dut.g_set[2].u_set.g_blk[TROJAN_LOC].u_blk.y = 1'b1;
    run(200, 1'b0);
    check(priv_diff > 0, "trojan on the mapped copy escalates privilege");
    check(!alarm, "trojan on the mapped copy is not seen by canaries");
    if (priv_diff > 0) n_hit++;
    release dut.g_set[2].u_set.g_blk[TROJAN_LOC].u_blk.y;
    // every mechanism happened
    check(n_cfg >= 2, "several configurations");
    check(n_k0 > 0 && n_k1 > 0, "both side-channel constants");
    check(n_detect > 0, "canary detection");
    check(n_hit > 0, "trojan hit on target");
    $display("configs=%0d k0=%0d k1=%0d detections=%0d hits=%0d", n_cfg, n_k0, n_k1, n_detect, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
