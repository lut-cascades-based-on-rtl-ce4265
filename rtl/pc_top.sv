// pc_top: two-parallel 5-tuple packet classifier with on-line update.
//
// N_CLS copies of lut_classifier, each taking LANES headers per clock (the
// two ports of its dual-port memories), give N_CLS*LANES = 4 lookups per
// clock: at 500 MHz and one 40-byte packet per lookup, 640 Gb/s. Beside
// them sit the parts that make updates possible without stopping traffic:
// a single-rule range_match_cam, and per lane a priority_encoder and a
// result_mux that return the CAM's rule instead of the cascades' whenever
// the CAM matches. The update_sequencer executes host commands: load the
// CAM, write cascade memories through write bubbles, then clear the CAM.
//
// Lanes: lane i belongs to classifier i / LANES. A write bubble is sent to
// every classifier at once and takes the place of a lookup on the first lane
// of each, so hdr_ready is 0 on lanes 0, LANES, ... in a cycle that carries a
// bubble (a header offered then is not taken); other lanes are always ready.
//
// Timing: a header taken at cycle 0 gives res_valid/res_rule at cycle
// LATENCY = classifier latency + 1 (39 clocks with the default widths). The
// CAM is looked up at entry and its answer travels with the header.
//
// The host PC and its JTAG-UART link are outside this design; their command
// stream is the cmd_* port.
module pc_top
  import pc_pkg::*;
#(
  parameter int unsigned N_CLS        = 2,
  parameter int unsigned LANES        = 2,
  parameter int unsigned K            = K_DEF,
  parameter int unsigned G0_SA_IDX_W  = 10,
  parameter int unsigned G0_DA_IDX_W  = 10,
  parameter int unsigned G0_SP_IDX_W  = 6,
  parameter int unsigned G0_DP_IDX_W  = 7,
  parameter int unsigned G0_PRT_IDX_W = 3,
  parameter int unsigned G0_CP_RAIL_W = 10,
  parameter int unsigned G0_CP_IDX_W  = 14,
  parameter int unsigned G1_SA_IDX_W  = 8,
  parameter int unsigned G1_DA_IDX_W  = 8,
  parameter int unsigned G1_SP_IDX_W  = 5,
  parameter int unsigned G1_DP_IDX_W  = 6,
  parameter int unsigned G1_PRT_IDX_W = 3,
  parameter int unsigned G1_CP_RAIL_W = 8,
  parameter int unsigned G1_CP_IDX_W  = 8,
  localparam int unsigned NL          = N_CLS * LANES
) (
  input  logic              clk,
  input  logic              rst_n,
  // headers
  input  logic              hdr_valid [NL],
  input  header_t           hdr       [NL],
  output logic              hdr_ready [NL],
  // results
  output logic              res_valid   [NL],
  output logic [RULE_W-1:0] res_rule    [NL],
  output logic              res_cam_hit [NL],
  // host update commands
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  cmd_t              cmd,
  output logic              update_busy,
  output logic              update_done
);

  localparam int unsigned GL0 = group_latency(K, G0_SA_IDX_W + G0_DA_IDX_W + G0_SP_IDX_W +
                                                 G0_DP_IDX_W + G0_PRT_IDX_W);
  localparam int unsigned GL1 = group_latency(K, G1_SA_IDX_W + G1_DA_IDX_W + G1_SP_IDX_W +
                                                 G1_DP_IDX_W + G1_PRT_IDX_W);
  localparam int unsigned CL      = max2(GL0, GL1) + 1;
  localparam int unsigned LATENCY = CL + 1;

  // ---------------- update sequencer ----------------
  wr_bubble_t wb;
  logic       cam_set, cam_clear;
  cam_rule_t  cam_rule_in;

  update_sequencer #(.DRAIN(LATENCY)) u_seq (
    .clk(clk), .rst_n(rst_n), .cmd_valid(cmd_valid), .cmd_ready(cmd_ready), .cmd(cmd),
    .wb_out(wb), .cam_set(cam_set), .cam_clear(cam_clear), .cam_rule(cam_rule_in),
    .update_done(update_done), .busy(update_busy));

  // ---------------- lane admission ----------------
  logic take [NL];
  for (genvar i = 0; i < NL; i++) begin : g_adm
    if (i % LANES == 0) begin : g_port_a
      assign hdr_ready[i] = !wb.valid;
    end else begin : g_port_b
      assign hdr_ready[i] = 1'b1;
    end
    assign take[i] = hdr_valid[i] && hdr_ready[i];
  end

  // ---------------- range-matching CAM ----------------
  logic              cam_match [NL];
  logic [RULE_W-1:0] cam_rule  [NL];

  range_match_cam #(.LANES(NL)) u_cam (
    .clk(clk), .rst_n(rst_n), .set(cam_set), .clear(cam_clear), .rule_in(cam_rule_in),
    .key(hdr), .match(cam_match), .rule(cam_rule));

  // ---------------- LUT cascade classifiers ----------------
  logic              cls_valid [NL];
  logic [RULE_W-1:0] cls_rule  [NL];

  for (genvar c = 0; c < N_CLS; c++) begin : g_cls
    logic              v_in  [LANES];
    header_t           h_in  [LANES];
    logic              v_out [LANES];
    logic [RULE_W-1:0] r_out [LANES];
    logic              g_out [LANES];

    for (genvar l = 0; l < LANES; l++) begin : g_ln
      assign v_in[l] = take[c*LANES + l];
      assign h_in[l] = hdr[c*LANES + l];
      assign cls_valid[c*LANES + l] = v_out[l];
      assign cls_rule[c*LANES + l]  = r_out[l];
    end

    lut_classifier #(
      .K(K), .LANES(LANES),
      .G0_SA_IDX_W(G0_SA_IDX_W), .G0_DA_IDX_W(G0_DA_IDX_W), .G0_SP_IDX_W(G0_SP_IDX_W),
      .G0_DP_IDX_W(G0_DP_IDX_W), .G0_PRT_IDX_W(G0_PRT_IDX_W),
      .G0_CP_RAIL_W(G0_CP_RAIL_W), .G0_CP_IDX_W(G0_CP_IDX_W),
      .G1_SA_IDX_W(G1_SA_IDX_W), .G1_DA_IDX_W(G1_DA_IDX_W), .G1_SP_IDX_W(G1_SP_IDX_W),
      .G1_DP_IDX_W(G1_DP_IDX_W), .G1_PRT_IDX_W(G1_PRT_IDX_W),
      .G1_CP_RAIL_W(G1_CP_RAIL_W), .G1_CP_IDX_W(G1_CP_IDX_W)
    ) u_cls (
      .clk(clk), .rst_n(rst_n), .in_valid(v_in), .in_hdr(h_in), .wb_in(wb),
      .out_valid(v_out), .out_rule(r_out), .out_grp(g_out));
  end

  // ---------------- priority encoder + multiplexer ----------------
  for (genvar i = 0; i < NL; i++) begin : g_out
    logic              m_d;
    logic [RULE_W-1:0] r_d;
    logic              pe_idx, pe_any;
    logic [RULE_W-1:0] mux_in [2];
    logic [RULE_W-1:0] mux_out;

    delay_line #(.W(1 + RULE_W), .DEPTH(CL)) u_cam_d (
      .clk(clk), .rst_n(rst_n), .d({cam_match[i], cam_rule[i]}), .q({m_d, r_d}));

    priority_encoder #(.N(2)) u_pe (
      .req({cls_valid[i], m_d}), .idx(pe_idx), .any(pe_any));

    assign mux_in[0] = r_d;
    assign mux_in[1] = cls_rule[i];

    result_mux #(.N(2), .W(RULE_W)) u_mux (
      .in_val(mux_in), .sel(pe_idx), .out_val(mux_out));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        res_valid[i]   <= 1'b0;
        res_rule[i]    <= '0;
        res_cam_hit[i] <= 1'b0;
      end else begin
        res_valid[i]   <= cls_valid[i] && pe_any;
        res_rule[i]    <= mux_out;
        res_cam_hit[i] <= cls_valid[i] && m_d;
      end
    end
  end

endmodule
