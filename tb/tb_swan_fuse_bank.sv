// tb_swan_fuse_bank - one-time programmable fuse model: bits start at 0,
// writes can only blow fuses (OR in), words past the bank are ignored, and
// after the lock fuse is blown nothing changes any more.
module tb_swan_fuse_bank;
  localparam int unsigned FUSE_W = 70;
  logic clk = 1'b0;
  logic prog_en = 1'b0, prog_lock = 1'b0;
  logic [1:0] prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic [FUSE_W-1:0] fuses;
  logic locked;
  logic [95:0] model;
  int checks = 0, failures = 0;

  swan_fuse_bank #(.FUSE_W(FUSE_W)) dut (
    .clk(clk), .prog_en(prog_en), .prog_addr(prog_addr), .prog_data(prog_data),
    .prog_lock(prog_lock), .fuses(fuses), .locked(locked));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(int a, logic [31:0] d, bit lock);
    @(negedge clk);
    prog_en = 1'b1; prog_addr = 2'(a); prog_data = d; prog_lock = lock;
    @(negedge clk);
    prog_en = 1'b0; prog_lock = 1'b0;
  endtask

  initial begin
    model = '0;
    @(posedge clk); #1;
    check(fuses == '0 && !locked, "fuses start unblown");
    for (int i = 0; i < 40; i++) begin
      int a;
      logic [31:0] d;
      a = $urandom_range(0, 3);
      d = $urandom & $urandom;
      write(a, d, 1'b0);
      if (a < 3) model[32*a +: 32] |= d;
      check(fuses == model[FUSE_W-1:0], $sformatf("fuses %h expected %h", fuses, model[FUSE_W-1:0]));
    end
    write(0, 32'h0, 1'b1);
    check(locked, "lock fuse blown");
    for (int i = 0; i < 10; i++) begin
      write(i % 3, 32'hFFFF_FFFF, 1'b0);
      check(fuses == model[FUSE_W-1:0], "no change after lock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
