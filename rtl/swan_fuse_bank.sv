// swan_fuse_bank - behavioural model of the one-time programmable fuses.
//
// Behavioural model, not synthesizable logic: in silicon the fuses are a
// process-specific one-time programmable macro (eFuse or antifuse cells
// embedded in the crossbars). The model keeps their observable behaviour:
// every fuse starts unblown (0) at manufacture and is not affected by the
// functional reset; a programming write can only blow fuses (bits go 0 -> 1,
// never back); blowing the lock fuse makes the configuration final, after
// which programming writes are ignored. Collecting all fuses behind one
// 32-bit word port, and the lock fuse, are this design's choices.
//
// Interface: prog_en with prog_addr/prog_data blows the 1 bits of prog_data
// in word prog_addr; prog_lock blows the lock fuse; fuses is the FUSE_W-bit
// configuration; locked reports the lock fuse.
// Timing: a write takes effect at the rising clock edge where it is
// presented and is visible on fuses right after it.
module swan_fuse_bank #(
  parameter int unsigned FUSE_W  = 64,
  localparam int unsigned N_WORD = (FUSE_W + 31) / 32,
  localparam int unsigned AW     = (N_WORD < 2) ? 1 : $clog2(N_WORD)
) (
  input  logic              clk,
  input  logic              prog_en,
  input  logic [AW-1:0]     prog_addr,
  input  logic [31:0]       prog_data,
  input  logic              prog_lock,
  output logic [FUSE_W-1:0] fuses,
  output logic              locked
);

  logic [32*N_WORD-1:0] fuse_cell;
  logic                 lock_cell;

  initial begin
    fuse_cell      = '0;
    lock_cell = 1'b0;
  end

  always @(posedge clk) begin
    if (!lock_cell) begin
      if (prog_en && (32'(prog_addr) < N_WORD)) begin
        fuse_cell[32*prog_addr +: 32] <= fuse_cell[32*prog_addr +: 32] | prog_data;
      end
      if (prog_lock) lock_cell <= 1'b1;
    end
  end

  assign fuses  = fuse_cell[FUSE_W-1:0];
  assign locked = lock_cell;

endmodule
