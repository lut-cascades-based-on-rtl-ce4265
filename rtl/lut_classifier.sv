// lut_classifier: one complete packet classifier built from LUT cascades.
// The rule set is split into two groups (in the reference configuration a
// large group of 9600 rules and a small one of 216); each group is a
// group_classifier and the maximum selector picks the higher rule number of
// the two, which is the highest-priority matching rule (rule 0 is the
// default and matches everything).
//
// LANES headers per clock share the memories through their read ports (two
// for a dual-port block RAM). A header entered at cycle 0 gives its rule at
// cycle LATENCY = max(group latencies) + 1; the faster group is delayed to
// match. Write bubbles go to both groups, each taking those with its grp.
module lut_classifier
  import pc_pkg::*;
#(
  parameter int unsigned K            = K_DEF,
  parameter int unsigned LANES        = 2,
  // group 0: the large group
  parameter int unsigned G0_SA_IDX_W  = 10,
  parameter int unsigned G0_DA_IDX_W  = 10,
  parameter int unsigned G0_SP_IDX_W  = 6,
  parameter int unsigned G0_DP_IDX_W  = 7,
  parameter int unsigned G0_PRT_IDX_W = 3,
  parameter int unsigned G0_CP_RAIL_W = 10,
  parameter int unsigned G0_CP_IDX_W  = 14,
  // group 1: the small group
  parameter int unsigned G1_SA_IDX_W  = 8,
  parameter int unsigned G1_DA_IDX_W  = 8,
  parameter int unsigned G1_SP_IDX_W  = 5,
  parameter int unsigned G1_DP_IDX_W  = 6,
  parameter int unsigned G1_PRT_IDX_W = 3,
  parameter int unsigned G1_CP_RAIL_W = 8,
  parameter int unsigned G1_CP_IDX_W  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid [LANES],
  input  header_t           in_hdr   [LANES],
  input  wr_bubble_t        wb_in,
  output logic              out_valid [LANES],
  output logic [RULE_W-1:0] out_rule  [LANES],
  output logic              out_grp   [LANES]   // group that gave the rule
);

  localparam int unsigned GL0 = group_latency(K, G0_SA_IDX_W + G0_DA_IDX_W + G0_SP_IDX_W +
                                                 G0_DP_IDX_W + G0_PRT_IDX_W);
  localparam int unsigned GL1 = group_latency(K, G1_SA_IDX_W + G1_DA_IDX_W + G1_SP_IDX_W +
                                                 G1_DP_IDX_W + G1_PRT_IDX_W);
  localparam int unsigned GL  = max2(GL0, GL1);
  localparam int unsigned LATENCY = GL + 1;

  logic              v0 [LANES], v1 [LANES];
  logic [RULE_W-1:0] r0 [LANES], r1 [LANES];

  group_classifier #(
    .GRP(1'b0), .K(K), .LANES(LANES),
    .SA_IDX_W(G0_SA_IDX_W), .DA_IDX_W(G0_DA_IDX_W), .SP_IDX_W(G0_SP_IDX_W),
    .DP_IDX_W(G0_DP_IDX_W), .PRT_IDX_W(G0_PRT_IDX_W),
    .CP_RAIL_W(G0_CP_RAIL_W), .CP_IDX_W(G0_CP_IDX_W)
  ) u_g0 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_hdr(in_hdr), .wb_in(wb_in),
    .out_valid(v0), .out_rule(r0));

  group_classifier #(
    .GRP(1'b1), .K(K), .LANES(LANES),
    .SA_IDX_W(G1_SA_IDX_W), .DA_IDX_W(G1_DA_IDX_W), .SP_IDX_W(G1_SP_IDX_W),
    .DP_IDX_W(G1_DP_IDX_W), .PRT_IDX_W(G1_PRT_IDX_W),
    .CP_RAIL_W(G1_CP_RAIL_W), .CP_IDX_W(G1_CP_IDX_W)
  ) u_g1 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_hdr(in_hdr), .wb_in(wb_in),
    .out_valid(v1), .out_rule(r1));

  for (genvar l = 0; l < LANES; l++) begin : g_sel
    logic              va, vb_unused;
    logic [RULE_W-1:0] ra, rb;
    logic [RULE_W-1:0] sel_val [2];
    logic [RULE_W-1:0] mx;
    logic              mi;

    delay_line #(.W(1 + RULE_W), .DEPTH(GL - GL0)) u_al0 (
      .clk(clk), .rst_n(rst_n), .d({v0[l], r0[l]}), .q({va, ra}));
    delay_line #(.W(1 + RULE_W), .DEPTH(GL - GL1)) u_al1 (
      .clk(clk), .rst_n(rst_n), .d({v1[l], r1[l]}), .q({vb_unused, rb}));

    assign sel_val[0] = ra;
    assign sel_val[1] = rb;

    max_selector #(.N(2), .W(RULE_W)) u_max (
      .in_val(sel_val), .out_val(mx), .out_idx(mi));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid[l] <= 1'b0;
        out_rule[l]  <= '0;
        out_grp[l]   <= 1'b0;
      end else begin
        out_valid[l] <= va;
        out_rule[l]  <= mx;
        out_grp[l]   <= mi;
      end
    end
  end

endmodule
