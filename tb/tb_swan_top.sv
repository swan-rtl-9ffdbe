// tb_swan_top - end-to-end test of SWAN-protected chips at default size.
//
// Twelve copies of swan_top (default parameters) stand for twelve chips
// from one wafer lot. A trusted party gives each a different random
// configuration through its fuse port and blows the lock fuse; a later
// attempt to re-program is ignored. All chips then run the same random
// workload on the example privilege logic of swan_map_pkg and must match
// the reference model, each with its own side-channel constant, with no
// canary alarm. Finally the same trojan is switched on in every chip, as a
// fab would plant it: physical copy 0 of the camouflaged MUX set is forced
// to 1 (privilege escalation). Per chip the outcome follows from its
// configuration: where copy 0 carries the privilege logic the attack
// succeeds unseen, everywhere else copy 0 is a canary and the alarm fires.
// Counted mechanisms: fuse programming, lock rejection, distinct
// configurations, both side-channel constants, canary detections, attack
// successes.
module tb_swan_top;
  import swan_map_pkg::*;

  localparam int NCHIP = 12;
  localparam int unsigned N_IN = 8, N_OUT = 4, N_REG = 6, LFSR_W = 8, N_CHK = 12;
  localparam int unsigned N_BLK = 3 + 3 + 6 + 3;
  localparam int unsigned N_SRC = 2 + N_IN + LFSR_W + N_REG + N_BLK;
  localparam int unsigned SEL_W = $clog2(N_SRC);
  localparam int unsigned CFG_W = (3 * N_BLK + N_REG + N_OUT + 2 * N_CHK) * SEL_W + N_CHK;
  localparam int unsigned N_WORD = (CFG_W + 31) / 32;
  localparam int unsigned AW = $clog2(N_WORD);

  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_en = 1'b0, prog_lock = 1'b0;
  logic [AW-1:0] prog_addr = '0;
  logic [31:0] prog_data [NCHIP];
  logic [N_IN-1:0] pin = '0;
  logic [N_OUT-1:0] pout [NCHIP];
  logic [N_CHK-1:0] mism [NCHIP];
  logic [NCHIP-1:0] alarm, locked;
  logic trojan_on = 1'b0;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NCHIP; i++) begin : g_chip
    swan_top dut (
      .clk (clk), .rst_n (rst_n),
      .prog_en (prog_en), .prog_addr (prog_addr), .prog_data (prog_data[i]),
      .prog_lock (prog_lock), .cfg_locked (locked[i]),
      .pin (pin), .pout (pout[i]),
      .canary_alarm (alarm[i]), .canary_mismatch (mism[i])
    );
    // the fab's trojan: same physical place on every chip
    initial begin
      wait (trojan_on);
      force dut.u_fabric.g_set[2].u_set.g_blk[0].u_blk.y = 1'b1;
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  swan_mapper m [NCHIP];
  logic priv [NCHIP];
  int priv_diff [NCHIP];
  int out_diff [NCHIP];

  task automatic run(int n);
    logic [3:0] exp;
    for (int c = 0; c < NCHIP; c++) begin priv_diff[c] = 0; out_diff[c] = 0; end
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      pin = N_IN'($urandom);
      #1;
      for (int c = 0; c < NCHIP; c++) begin
        exp = ref_out(pin, priv[c], m[c].k);
        if (pout[c][0] != exp[0]) priv_diff[c]++;
        if (pout[c] != exp) out_diff[c]++;
      end
      @(posedge clk);
      for (int c = 0; c < NCHIP; c++) priv[c] = ref_next(pin, priv[c]);
    end
  endtask

  initial begin
    automatic int n_k0 = 0, n_k1 = 0, n_hit = 0, n_detect = 0, n_distinct = 0, n_lock = 0, n_prog = 0;
    automatic int n_hit_exp = 0;
    logic [CFG_W-1:0] fuse_before [NCHIP];
    for (int c = 0; c < NCHIP; c++) prog_data[c] = '0;
    // trusted party: one random configuration per chip
    for (int c = 0; c < NCHIP; c++) begin
      m[c] = new(N_IN, LFSR_W, N_REG, N_OUT, N_CHK, 3, 6, 4'b0100);
      m[c].build((c == 0) ? 0 : (c == 1) ? 1 : -1, (c < 2) ? c : -1);
      if (m[c].k) n_k1++; else n_k0++;
      if (m[c].perm[2][0] == 0) n_hit_exp++;
    end
    for (int c = 0; c < NCHIP; c++) begin
      bit same;
      same = 1'b0;
      for (int d = 0; d < c; d++) if (m[d].cfg[CFG_W-1:0] == m[c].cfg[CFG_W-1:0]) same = 1'b1;
      if (!same) n_distinct++;
    end
    repeat (2) @(posedge clk);
    for (int w = 0; w < int'(N_WORD); w++) begin
      @(negedge clk);
      prog_en = 1'b1;
      prog_addr = AW'(w);
      for (int c = 0; c < NCHIP; c++) prog_data[c] = m[c].cfg[32*w +: 32];
      n_prog++;
    end
    @(negedge clk);
    prog_en = 1'b0;
    prog_lock = 1'b1;
    @(negedge clk);
    prog_lock = 1'b0;
    check(&locked, "all chips locked");
    for (int c = 0; c < NCHIP; c++) begin
      fuse_before[c] = g_fuses(c);
      check(fuse_before[c] == m[c].cfg[CFG_W-1:0], $sformatf("chip %0d fuses hold its configuration", c));
    end
    // re-programming after the lock must be ignored
    @(negedge clk);
    prog_en = 1'b1;
    prog_addr = '0;
    for (int c = 0; c < NCHIP; c++) prog_data[c] = '1;
    @(negedge clk);
    prog_en = 1'b0;
    for (int c = 0; c < NCHIP; c++) begin
      check(g_fuses(c) == fuse_before[c], $sformatf("chip %0d ignores writes after lock", c));
      if (g_fuses(c) == fuse_before[c]) n_lock++;
    end
    // power-on of the configured chips; fuses survive reset
    for (int c = 0; c < NCHIP; c++) priv[c] = 1'b0;
    @(negedge clk) rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(300);
    for (int c = 0; c < NCHIP; c++) begin
      check(out_diff[c] == 0, $sformatf("chip %0d computes the protected logic (%0d bad cycles)", c, out_diff[c]));
      check(!alarm[c], $sformatf("chip %0d: no canary alarm without a trojan", c));
    end
    // the trojan wakes up
    trojan_on = 1'b1;
    run(300);
    for (int c = 0; c < NCHIP; c++) begin
      if (m[c].perm[2][0] == 0) begin
        check(priv_diff[c] > 0 && !alarm[c], $sformatf("chip %0d: trojan on the mapped copy escalates unseen", c));
        if (priv_diff[c] > 0 && !alarm[c]) n_hit++;
      end else begin
        check(alarm[c] && out_diff[c] == 0, $sformatf("chip %0d: trojan on a canary is detected, logic unharmed", c));
        check(64'(mism[c]) == m[c].cmps_on(2, 0), $sformatf("chip %0d: mismatch flags locate the hit copy", c));
        if (alarm[c]) n_detect++;
      end
    end
    $display("chips=%0d distinct_configs=%0d fuse_words=%0d lock_rejects=%0d k0=%0d k1=%0d attacks_succeeded=%0d (expected %0d) detected=%0d",
             NCHIP, n_distinct, n_prog, n_lock, n_k0, n_k1, n_hit, n_hit_exp, n_detect);
    check(n_distinct >= 2, "several distinct configurations");
    check(n_prog > 0 && n_lock > 0, "fuse programming and lock");
    check(n_k0 > 0 && n_k1 > 0, "both side-channel constants");
    check(n_detect > 0, "canary detection happened");
    check(n_hit > 0, "trojan success happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fuse contents of chip c
  function automatic logic [CFG_W-1:0] g_fuses(int c);
    logic [CFG_W-1:0] f [NCHIP];
    f[0] = g_chip[0].dut.u_fuses.fuses;   f[1] = g_chip[1].dut.u_fuses.fuses;
    f[2] = g_chip[2].dut.u_fuses.fuses;   f[3] = g_chip[3].dut.u_fuses.fuses;
    f[4] = g_chip[4].dut.u_fuses.fuses;   f[5] = g_chip[5].dut.u_fuses.fuses;
    f[6] = g_chip[6].dut.u_fuses.fuses;   f[7] = g_chip[7].dut.u_fuses.fuses;
    f[8] = g_chip[8].dut.u_fuses.fuses;   f[9] = g_chip[9].dut.u_fuses.fuses;
    f[10] = g_chip[10].dut.u_fuses.fuses; f[11] = g_chip[11].dut.u_fuses.fuses;
    return f[c];
  endfunction
endmodule
