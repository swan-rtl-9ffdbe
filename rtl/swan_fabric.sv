// swan_fabric - a SWAN one-time programmable, LUT-free fabric.
//
// The fabric replaces a security-critical netlist. It is built from:
//   * N_SETS sets of identical primitive logic blocks (swan_logic_set).
//     Set s holds copies of cluster SET_FN[s]; an ordinary set has MAPPINGS
//     copies, a camouflaged set (bit s of SECURE_SETS) has SECURE_MAPPINGS,
//     so a logical block of the protected netlist can sit in any of that
//     many physical places;
//   * one set of N_REG identical flip-flops for the netlist's state
//     (swan_reg_set), treated as camouflaged;
//   * N_OUT output crossbars that pick the fabric outputs;
//   * the canary driver LFSR (swan_canary_driver) and the canary checker
//     (swan_canary_checker) with N_CHK comparators.
// Every block input is a fuse-programmed crossbar over one common source
// numbering (swan_pkg): constants 0 and 1 (the configuration-defined
// constants), the fabric inputs, the LFSR bits, the flip-flops and the
// block outputs. A set sees the outputs of lower-numbered sets only,
// further restricted by SET_DRIVERS[s][j] (set j may drive set s), which
// is how the generator wires each group to all and only its possible
// drivers; this ordering also keeps the fabric free of combinational loops.
// The flip-flops, outputs and comparators can reach every source.
//
// A configuration (cfg, normally from fuses) places the protected netlist
// on some of the copies, wires the spare copies into identical canary
// chains fed by the LFSR, and enables comparators between the chain copies.
// The defaults hold four sets (0: AO21, 1: OA21, 2: MUX2 camouflaged,
// 3: XOR2). The 3 and 6 copies per logical block follow the architecture's
// operating points; the sets, block clusters, source ordering and all other
// sizes are this design's own choices.
//
// Interface: cfg (CFG_W configuration bits, layout in swan_pkg), pin/pout
// (the protected logic's inputs and outputs), canary_alarm and
// canary_mismatch (sticky checker results).
// Timing: pin to pout is combinational through the mapped blocks; state
// advances on each rising clock edge; the alarm follows a canary mismatch
// by one clock.
module swan_fabric #(
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
  localparam int unsigned N_BLK  = swan_pkg::set_first(N_SETS, 32'(SECURE_SETS), MAPPINGS, SECURE_MAPPINGS),
  localparam int unsigned BASE_W = 2 + N_IN + LFSR_W + N_REG,
  localparam int unsigned N_SRC  = BASE_W + N_BLK,
  localparam int unsigned SEL_W  = swan_pkg::sel_width(N_SRC),
  localparam int unsigned CFG_W  = swan_pkg::cfg_width(N_BLK, N_REG, N_OUT, N_CHK, SEL_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CFG_W-1:0] cfg,
  input  logic [N_IN-1:0]  pin,
  output logic [N_OUT-1:0] pout,
  output logic             canary_alarm,
  output logic [N_CHK-1:0] canary_mismatch
);

  localparam int unsigned REG_OFF = swan_pkg::cfg_reg_off(0, N_BLK, SEL_W);
  localparam int unsigned OUT_OFF = swan_pkg::cfg_out_off(0, N_BLK, N_REG, SEL_W);
  localparam int unsigned CHK_OFF = swan_pkg::cfg_chk_off(0, 0, N_BLK, N_REG, N_OUT, SEL_W);
  localparam int unsigned EN_OFF  = swan_pkg::cfg_en_off(0, N_BLK, N_REG, N_OUT, N_CHK, SEL_W);

  function automatic int unsigned size_of(int unsigned s);
    return swan_pkg::set_size(s, 32'(SECURE_SETS), MAPPINGS, SECURE_MAPPINGS);
  endfunction
  function automatic int unsigned first_of(int unsigned s);
    return swan_pkg::set_first(s, 32'(SECURE_SETS), MAPPINGS, SECURE_MAPPINGS);
  endfunction

  // Sources set s is wired to: everything below the blocks, plus the
  // blocks of each lower set j that SET_DRIVERS allows.
  function automatic logic [N_SRC-1:0] allow_mask(int unsigned s);
    logic [N_SRC-1:0] m;
    m = '0;
    for (int unsigned i = 0; i < BASE_W; i++) m[i] = 1'b1;
    for (int unsigned j = 0; j < s; j++) begin
      if (SET_DRIVERS[s][j]) begin
        for (int unsigned k = 0; k < size_of(j); k++) m[BASE_W + first_of(j) + k] = 1'b1;
      end
    end
    return m;
  endfunction

  logic [LFSR_W-1:0] lfsr;
  logic [N_REG-1:0]  reg_q;
  logic [BASE_W-1:0] base_src;
  logic [N_SRC-1:0]  all_src;

  assign base_src = {reg_q, lfsr, pin, 1'b1, 1'b0};

  swan_canary_driver #(.W(LFSR_W)) u_driver (
    .clk   (clk),
    .rst_n (rst_n),
    .state (lfsr)
  );

  // Block sets in order; set s sees the sources below it.
  for (genvar s = 0; s < N_SETS; s++) begin : g_set
    localparam int unsigned VIS_W = BASE_W + first_of(s);
    localparam int unsigned SZ    = size_of(s);
    localparam int unsigned CO    = swan_pkg::cfg_blk_off(first_of(s), 0, SEL_W);
    localparam logic [N_SRC-1:0] MASK = allow_mask(s);
    logic [VIS_W-1:0] vis;
    logic [SZ-1:0]    y;
    if (s == 0) begin : g_first
      assign vis = base_src;
    end else begin : g_next
      assign vis = {g_set[s-1].y, g_set[s-1].vis};
    end
    swan_logic_set #(
      .FN    (SET_FN[s]),
      .SIZE  (SZ),
      .N_SRC (VIS_W),
      .SEL_W (SEL_W),
      .ALLOW (MASK[VIS_W-1:0])
    ) u_set (
      .src (vis),
      .sel (cfg[CO +: 3*SZ*SEL_W]),
      .y   (y)
    );
  end

  assign all_src = {g_set[N_SETS-1].y, g_set[N_SETS-1].vis};

  swan_reg_set #(.SIZE(N_REG), .N_SRC(N_SRC), .SEL_W(SEL_W)) u_regs (
    .clk   (clk),
    .rst_n (rst_n),
    .src   (all_src),
    .sel   (cfg[REG_OFF +: N_REG*SEL_W]),
    .q     (reg_q)
  );

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    swan_xbar #(.N_SRC(N_SRC), .SEL_W(SEL_W)) u_xbar (
      .src (all_src),
      .sel (cfg[OUT_OFF + o*SEL_W +: SEL_W]),
      .y   (pout[o])
    );
  end

  // Comparator k operand a at select 2k, operand b at 2k+1.
  logic [N_CHK*SEL_W-1:0] chk_sel_a, chk_sel_b;
  for (genvar k = 0; k < N_CHK; k++) begin : g_chksel
    assign chk_sel_a[k*SEL_W +: SEL_W] = cfg[CHK_OFF + (2*k)*SEL_W +: SEL_W];
    assign chk_sel_b[k*SEL_W +: SEL_W] = cfg[CHK_OFF + (2*k+1)*SEL_W +: SEL_W];
  end

  swan_canary_checker #(.N_CHK(N_CHK), .N_SRC(N_SRC), .SEL_W(SEL_W)) u_checker (
    .clk      (clk),
    .rst_n    (rst_n),
    .src      (all_src),
    .sel_a    (chk_sel_a),
    .sel_b    (chk_sel_b),
    .en       (cfg[EN_OFF +: N_CHK]),
    .mismatch (canary_mismatch),
    .alarm    (canary_alarm)
  );

  initial begin
    assert (N_SETS <= 32) else $error("swan_fabric: at most 32 block sets");
    assert (MAPPINGS >= 1 && SECURE_MAPPINGS >= MAPPINGS)
      else $error("swan_fabric: camouflaged sets need at least MAPPINGS copies");
  end

endmodule
