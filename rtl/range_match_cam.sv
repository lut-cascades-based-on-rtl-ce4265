// range_match_cam: a CAM holding a single rule, used to answer for the rule
// being updated while the LUT cascades are rewritten. Four range_detectors
// cover SA, DA, SP and DP; a one-entry binary CAM compares PRT exactly. When
// all five fields match and an entry is stored, match is 1 and rule is the
// stored rule number; otherwise match is 0 and rule is the default rule 0.
//
// set loads a rule in one clock; clear invalidates it in one clock (clear
// wins if both are given). Lookups are combinational, one per lane.
module range_match_cam
  import pc_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              set,
  input  logic              clear,
  input  cam_rule_t         rule_in,
  input  header_t           key   [LANES],
  output logic              match [LANES],
  output logic [RULE_W-1:0] rule  [LANES]
);

  logic              vld_q;
  logic [PRT_W-1:0]  prt_q;
  logic [RULE_W-1:0] rule_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q  <= 1'b0;
      prt_q  <= '0;
      rule_q <= '0;
    end else if (clear) begin
      vld_q  <= 1'b0;
    end else if (set) begin
      vld_q  <= 1'b1;
      prt_q  <= rule_in.prt;
      rule_q <= rule_in.rule;
    end
  end

  logic [SA_W-1:0] k_sa [LANES];
  logic [DA_W-1:0] k_da [LANES];
  logic [SP_W-1:0] k_sp [LANES];
  logic [DP_W-1:0] k_dp [LANES];
  logic            m_sa [LANES], m_da [LANES], m_sp [LANES], m_dp [LANES];
  logic            load;

  assign load = set && !clear;

  for (genvar l = 0; l < LANES; l++) begin : g_key
    assign k_sa[l] = key[l].sa;
    assign k_da[l] = key[l].da;
    assign k_sp[l] = key[l].sp;
    assign k_dp[l] = key[l].dp;
  end

  range_detector #(.W(SA_W), .LANES(LANES)) u_sa (
    .clk(clk), .rst_n(rst_n), .load(load), .lo_in(rule_in.sa_lo), .hi_in(rule_in.sa_hi),
    .key(k_sa), .match(m_sa));
  range_detector #(.W(DA_W), .LANES(LANES)) u_da (
    .clk(clk), .rst_n(rst_n), .load(load), .lo_in(rule_in.da_lo), .hi_in(rule_in.da_hi),
    .key(k_da), .match(m_da));
  range_detector #(.W(SP_W), .LANES(LANES)) u_sp (
    .clk(clk), .rst_n(rst_n), .load(load), .lo_in(rule_in.sp_lo), .hi_in(rule_in.sp_hi),
    .key(k_sp), .match(m_sp));
  range_detector #(.W(DP_W), .LANES(LANES)) u_dp (
    .clk(clk), .rst_n(rst_n), .load(load), .lo_in(rule_in.dp_lo), .hi_in(rule_in.dp_hi),
    .key(k_dp), .match(m_dp));

  for (genvar l = 0; l < LANES; l++) begin : g_match
    logic hit;
    assign hit      = vld_q && m_sa[l] && m_da[l] && m_sp[l] && m_dp[l] &&
                      (key[l].prt == prt_q);
    assign match[l] = hit;
    assign rule[l]  = hit ? rule_q : '0;
  end

endmodule
