// tb_swan_analytic_attack - fuse-reading trojan against fabrics with 3, 6
// and 12 copies of the camouflaged MUX set and the flop set.
//
// The trojan sits on physical copy 0 and first reads the fuses that select
// that copy's inputs; it fires only when they show the privilege logic.
// Each swan_guess_bench plays 96 chips with random configurations. The
// trojan must never trip a canary, must succeed exactly on the chips whose
// configuration put the target on copy 0, and must stay dormant on all
// others; each size must see at least one success. The share of chips
// compromised, near 1/3, 1/6 and 1/12, is printed.
module tb_swan_analytic_attack;
  logic clk = 1'b0;
  logic [2:0] done;
  int c [3], f [3], h [3], d [3];
  int checks, failures;

  always #5 clk = ~clk;

  swan_guess_bench #(.SM(3),  .ANALYTIC(1'b1)) b3  (.clk(clk), .done(done[0]), .checks(c[0]), .failures(f[0]), .hits(h[0]), .detects(d[0]));
  swan_guess_bench #(.SM(6),  .ANALYTIC(1'b1)) b6  (.clk(clk), .done(done[1]), .checks(c[1]), .failures(f[1]), .hits(h[1]), .detects(d[1]));
  swan_guess_bench #(.SM(12), .ANALYTIC(1'b1)) b12 (.clk(clk), .done(done[2]), .checks(c[2]), .failures(f[2]), .hits(h[2]), .detects(d[2]));

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    localparam int SZ [3] = '{3, 6, 12};
    wait (&done);
    #1;
    checks = 0;
    failures = 0;
    for (int i = 0; i < 3; i++) begin
      checks += c[i] + 2;
      failures += f[i];
      if (h[i] == 0) begin failures++; $display("FAIL: no successful attack with %0d copies", SZ[i]); end
      if (d[i] != 0) begin failures++; $display("FAIL: fuse-reading trojan seen by canaries with %0d copies", SZ[i]); end
      $display("%0d copies: %0d of 96 chips compromised (%0.1f%%), %0d canary detections",
               SZ[i], h[i], 100.0 * h[i] / 96, d[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
