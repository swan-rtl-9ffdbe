// swan_top - one SWAN-protected region: fuse bank plus programmable fabric.
//
// A chip carries this region in place of its security-critical logic.
// After manufacturing, a trusted party picks one of the many functionally
// equivalent configurations at random, writes it into the one-time
// programmable fuses and blows the lock fuse. Until then the fabric's
// blocks are interchangeable, so whoever builds the chip cannot tell which
// physical gate will carry a given security signal; spare gates run as
// canaries and a trojan that disturbs one trips canary_alarm.
// The parameters are those of swan_fabric; the defaults give camouflaged
// sets and state flops 6 locations per logical block and the other sets 3.
//
// Interface: prog_* - fuse programming port (32-bit words, bits only set),
// cfg_locked - configuration final; pin/pout - the protected logic's
// inputs and outputs; canary_alarm/canary_mismatch - checker results for
// the recovery logic that the protected design supplies.
// Timing: as swan_fabric; fuse writes act on the next rising clock edge.
module swan_top #(
  parameter int unsigned                        N_IN            = 8,
  parameter int unsigned                        N_OUT           = 4,
  parameter int unsigned                        N_SETS          = 4,
  parameter swan_pkg::blk_fn_e [N_SETS-1:0]     SET_FN          = {swan_pkg::BLK_XOR2, swan_pkg::BLK_MUX2,
                                                                   swan_pkg::BLK_OA21, swan_pkg::BLK_AO21},
  parameter int unsigned                        MAPPINGS        = 3,
  parameter int unsigned                        SECURE_MAPPINGS = 6,
  parameter logic [N_SETS-1:0]                  SECURE_SETS     = N_SETS'(4),
  parameter logic [N_SETS-1:0][N_SETS-1:0]      SET_DRIVERS     = '1,
  parameter int unsigned                        N_REG           = 6,
  parameter int unsigned                        LFSR_W          = 8,
  parameter int unsigned                        N_CHK           = 12,
  localparam int unsigned N_BLK   = swan_pkg::set_first(N_SETS, 32'(SECURE_SETS), MAPPINGS, SECURE_MAPPINGS),
  localparam int unsigned N_SRC   = 2 + N_IN + LFSR_W + N_REG + N_BLK,
  localparam int unsigned SEL_W   = swan_pkg::sel_width(N_SRC),
  localparam int unsigned CFG_W   = swan_pkg::cfg_width(N_BLK, N_REG, N_OUT, N_CHK, SEL_W),
  localparam int unsigned FUSE_AW = (((CFG_W + 31) / 32) < 2) ? 1 : $clog2((CFG_W + 31) / 32)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               prog_en,
  input  logic [FUSE_AW-1:0] prog_addr,
  input  logic [31:0]        prog_data,
  input  logic               prog_lock,
  output logic               cfg_locked,
  input  logic [N_IN-1:0]    pin,
  output logic [N_OUT-1:0]   pout,
  output logic               canary_alarm,
  output logic [N_CHK-1:0]   canary_mismatch
);

  logic [CFG_W-1:0] cfg;

  swan_fuse_bank #(.FUSE_W(CFG_W)) u_fuses (
    .clk       (clk),
    .prog_en   (prog_en),
    .prog_addr (prog_addr),
    .prog_data (prog_data),
    .prog_lock (prog_lock),
    .fuses     (cfg),
    .locked    (cfg_locked)
  );

  swan_fabric #(
    .N_IN            (N_IN),
    .N_OUT           (N_OUT),
    .N_SETS          (N_SETS),
    .SET_FN          (SET_FN),
    .MAPPINGS        (MAPPINGS),
    .SECURE_MAPPINGS (SECURE_MAPPINGS),
    .SECURE_SETS     (SECURE_SETS),
    .SET_DRIVERS     (SET_DRIVERS),
    .N_REG           (N_REG),
    .LFSR_W          (LFSR_W),
    .N_CHK           (N_CHK)
  ) u_fabric (
    .clk             (clk),
    .rst_n           (rst_n),
    .cfg             (cfg),
    .pin             (pin),
    .pout            (pout),
    .canary_alarm    (canary_alarm),
    .canary_mismatch (canary_mismatch)
  );

endmodule
