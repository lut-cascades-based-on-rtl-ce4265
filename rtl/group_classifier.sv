// group_classifier: classifier for one group of rules, decomposed by the
// Cartesian product method.
//
// Five field-function cascades (SA, DA, SP, DP, PRT) turn each header field
// into a segment index; the indices of the shorter cascades are delayed so
// that all five arrive together. Their concatenation {SA, DA, SP, DP, PRT}
// is the key of the Cartesian-product cascade, whose M1-monotone output is
// turned into a rule number by the translation memory. Every function is an
// evmdd_cascade with k = K.
//
// Timing: a header entered at cycle 0 gives its rule number at cycle
// LATENCY = LF + LCP + 1, where LF is the latency of the longest field
// cascade (17 cycles for 32-bit addresses with k = 2) and LCP that of the
// Cartesian-product cascade. Write bubbles whose grp equals GRP are passed
// to the field cascades at cycle 0 and, delayed by LF and LF + LCP, to the
// product cascade and the translation memory, so a bubble always travels
// with the packets entered in its cycle.
//
// The index widths are parameters. The defaults are this design's estimate
// for the large (9600-rule) group; the real widths depend on the rule set.
module group_classifier
  import pc_pkg::*;
#(
  parameter logic        GRP       = 1'b0,
  parameter int unsigned K         = K_DEF,
  parameter int unsigned LANES     = 2,
  parameter int unsigned SA_IDX_W  = 10,
  parameter int unsigned DA_IDX_W  = 10,
  parameter int unsigned SP_IDX_W  = 6,
  parameter int unsigned DP_IDX_W  = 7,
  parameter int unsigned PRT_IDX_W = 3,
  parameter int unsigned CP_RAIL_W = 10,
  parameter int unsigned CP_IDX_W  = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid [LANES],
  input  header_t           in_hdr   [LANES],
  input  wr_bubble_t        wb_in,
  output logic              out_valid [LANES],
  output logic [RULE_W-1:0] out_rule  [LANES]
);

  localparam int unsigned CP_IN  = SA_IDX_W + DA_IDX_W + SP_IDX_W + DP_IDX_W + PRT_IDX_W;
  localparam int unsigned L_SA   = cascade_latency(SA_W, K);
  localparam int unsigned L_DA   = cascade_latency(DA_W, K);
  localparam int unsigned L_SP   = cascade_latency(SP_W, K);
  localparam int unsigned L_DP   = cascade_latency(DP_W, K);
  localparam int unsigned L_PRT  = cascade_latency(PRT_W, K);
  localparam int unsigned LF     = max2(max2(L_SA, L_DA), max2(max2(L_SP, L_DP), L_PRT));
  localparam int unsigned L_CP   = cascade_latency(CP_IN, K);
  localparam int unsigned LATENCY = LF + L_CP + 1;

  wr_bubble_t wb_g, wb_cp, wb_tr;

  always_comb begin
    wb_g       = wb_in;
    wb_g.valid = wb_in.valid && (wb_in.grp == GRP);
  end

  delay_line #(.W($bits(wr_bubble_t)), .DEPTH(LF)) u_wb_cp (
    .clk(clk), .rst_n(rst_n), .d(wb_g), .q(wb_cp));
  delay_line #(.W($bits(wr_bubble_t)), .DEPTH(L_CP)) u_wb_tr (
    .clk(clk), .rst_n(rst_n), .d(wb_cp), .q(wb_tr));

  // ---------------- field functions ----------------
  logic [SA_W-1:0]      k_sa  [LANES];
  logic [DA_W-1:0]      k_da  [LANES];
  logic [SP_W-1:0]      k_sp  [LANES];
  logic [DP_W-1:0]      k_dp  [LANES];
  logic [PRT_W-1:0]     k_prt [LANES];
  logic                 v_sa [LANES], v_da [LANES], v_sp [LANES], v_dp [LANES], v_prt [LANES];
  logic [SA_IDX_W-1:0]  i_sa  [LANES];
  logic [DA_IDX_W-1:0]  i_da  [LANES];
  logic [SP_IDX_W-1:0]  i_sp  [LANES];
  logic [DP_IDX_W-1:0]  i_dp  [LANES];
  logic [PRT_IDX_W-1:0] i_prt [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_split
    assign k_sa[l]  = in_hdr[l].sa;
    assign k_da[l]  = in_hdr[l].da;
    assign k_sp[l]  = in_hdr[l].sp;
    assign k_dp[l]  = in_hdr[l].dp;
    assign k_prt[l] = in_hdr[l].prt;
  end

  evmdd_cascade #(.N_IN(SA_W), .K(K), .RAIL_W(SA_IDX_W), .IDX_W(SA_IDX_W),
                  .LANES(LANES), .TGT(TGT_SA)) u_sa (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_key(k_sa), .wb_in(wb_g),
    .out_valid(v_sa), .out_idx(i_sa));
  evmdd_cascade #(.N_IN(DA_W), .K(K), .RAIL_W(DA_IDX_W), .IDX_W(DA_IDX_W),
                  .LANES(LANES), .TGT(TGT_DA)) u_da (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_key(k_da), .wb_in(wb_g),
    .out_valid(v_da), .out_idx(i_da));
  evmdd_cascade #(.N_IN(SP_W), .K(K), .RAIL_W(SP_IDX_W), .IDX_W(SP_IDX_W),
                  .LANES(LANES), .TGT(TGT_SP)) u_sp (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_key(k_sp), .wb_in(wb_g),
    .out_valid(v_sp), .out_idx(i_sp));
  evmdd_cascade #(.N_IN(DP_W), .K(K), .RAIL_W(DP_IDX_W), .IDX_W(DP_IDX_W),
                  .LANES(LANES), .TGT(TGT_DP)) u_dp (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_key(k_dp), .wb_in(wb_g),
    .out_valid(v_dp), .out_idx(i_dp));
  evmdd_cascade #(.N_IN(PRT_W), .K(K), .RAIL_W(PRT_IDX_W), .IDX_W(PRT_IDX_W),
                  .LANES(LANES), .TGT(TGT_PRT)) u_prt (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_key(k_prt), .wb_in(wb_g),
    .out_valid(v_prt), .out_idx(i_prt));

  // ---------------- alignment ----------------
  logic              cp_v   [LANES];
  logic [CP_IN-1:0]  cp_key [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_align
    logic [SA_IDX_W-1:0]  a_sa;
    logic [DA_IDX_W-1:0]  a_da;
    logic [SP_IDX_W-1:0]  a_sp;
    logic [DP_IDX_W-1:0]  a_dp;
    logic [PRT_IDX_W-1:0] a_prt;
    delay_line #(.W(1), .DEPTH(LF - L_SA)) u_v (
      .clk(clk), .rst_n(rst_n), .d(v_sa[l]), .q(cp_v[l]));
    delay_line #(.W(SA_IDX_W), .DEPTH(LF - L_SA)) u_a_sa (
      .clk(clk), .rst_n(rst_n), .d(i_sa[l]), .q(a_sa));
    delay_line #(.W(DA_IDX_W), .DEPTH(LF - L_DA)) u_a_da (
      .clk(clk), .rst_n(rst_n), .d(i_da[l]), .q(a_da));
    delay_line #(.W(SP_IDX_W), .DEPTH(LF - L_SP)) u_a_sp (
      .clk(clk), .rst_n(rst_n), .d(i_sp[l]), .q(a_sp));
    delay_line #(.W(DP_IDX_W), .DEPTH(LF - L_DP)) u_a_dp (
      .clk(clk), .rst_n(rst_n), .d(i_dp[l]), .q(a_dp));
    delay_line #(.W(PRT_IDX_W), .DEPTH(LF - L_PRT)) u_a_prt (
      .clk(clk), .rst_n(rst_n), .d(i_prt[l]), .q(a_prt));
    assign cp_key[l] = {a_sa, a_da, a_sp, a_dp, a_prt};
  end

  // ---------------- Cartesian product function ----------------
  logic                cp_ov  [LANES];
  logic [CP_IDX_W-1:0] cp_idx [LANES];

  evmdd_cascade #(.N_IN(CP_IN), .K(K), .RAIL_W(CP_RAIL_W), .IDX_W(CP_IDX_W),
                  .LANES(LANES), .TGT(TGT_CP)) u_cp (
    .clk(clk), .rst_n(rst_n), .in_valid(cp_v), .in_key(cp_key), .wb_in(wb_cp),
    .out_valid(cp_ov), .out_idx(cp_idx));

  translation_mem #(.IDX_W(CP_IDX_W), .RULE_NUM_W(RULE_W), .LANES(LANES)) u_trans (
    .clk(clk), .rst_n(rst_n), .wb_in(wb_tr), .in_valid(cp_ov), .in_idx(cp_idx),
    .out_valid(out_valid), .out_rule(out_rule));

endmodule
