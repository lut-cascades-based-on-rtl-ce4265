// evmdd_cascade: pipelined LUT cascade with adders realising one
// M1-monotone increasing function given as an EVMDD(k).
//
// The N_IN-bit key is cut into U = ceil(N_IN/K) super variables, the most
// significant first (zero-padded at the top). Stage j is one LUT: its
// address is {rails from stage j-1, super variable j}; its word is
// {rails to stage j+1, Arail weight}. The rails name the EVMDD node the key
// has reached, the weight is the value of the edge taken. An adder per stage
// (a DSP block on an FPGA) sums the weights; the sum after the last stage is
// the function value, e.g. a field index or the Cartesian-product index.
// Rails per stage come from pc_pkg::rail_out_w (at most RAIL_W, fewer near
// the top of the cascade); the first LUT has only the super variable as
// address and the last LUT stores only a weight.
//
// Timing: one key per lane per clock, LANES lanes sharing every LUT through
// the read ports of lut_ram. A key presented at cycle 0 gives its index at
// cycle LATENCY = U + 1 (out_valid marks it).
//
// Update: write bubbles. wb_in is entered together with the keys of cycle
// 0 and moves one stage per clock; when it reaches the stage it names (and
// its target matches TGT) it writes that LUT, write-before-read, so keys
// entered before it see the old word and keys entered with or after it see
// the new one. The pipeline organisation, the adders and write-before-read
// update follow the classifier this RTL implements; the word layout and the
// bubble format are this design's own.
module evmdd_cascade
  import pc_pkg::*;
#(
  parameter int unsigned N_IN   = 16,
  parameter int unsigned K      = 2,
  parameter int unsigned RAIL_W = 6,
  parameter int unsigned IDX_W  = 6,
  parameter int unsigned LANES  = 2,
  parameter wb_target_e  TGT    = TGT_SP
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid [LANES],
  input  logic [N_IN-1:0]  in_key   [LANES],
  input  wr_bubble_t       wb_in,
  output logic             out_valid [LANES],
  output logic [IDX_W-1:0] out_idx   [LANES]
);

  localparam int unsigned U       = n_stages(N_IN, K);
  localparam int unsigned XP      = U * K;
  localparam int unsigned LATENCY = U + 1;

  logic [XP-1:0]     key_d [LANES][U];     // key delayed j cycles
  logic              v_d   [LANES][U+2];   // valid delayed i cycles
  wr_bubble_t        wb_d  [U];            // bubble at stage j
  logic [RAIL_W-1:0] rail  [LANES][U];     // rails out of stage j
  logic [IDX_W-1:0]  wgt   [LANES][U];     // weight out of stage j
  logic [IDX_W-1:0]  acc   [LANES][U];     // running sum after stage j

  for (genvar l = 0; l < LANES; l++) begin : g_in
    assign key_d[l][0] = XP'(in_key[l]);
    assign v_d[l][0]   = in_valid[l];
  end
  assign wb_d[0] = wb_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++)
        for (int i = 1; i < U + 2; i++) v_d[l][i] <= 1'b0;
      for (int j = 1; j < U; j++) wb_d[j] <= '0;
    end else begin
      for (int l = 0; l < LANES; l++)
        for (int i = 1; i < U + 2; i++) v_d[l][i] <= v_d[l][i-1];
      for (int j = 1; j < U; j++) wb_d[j] <= wb_d[j-1];
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      for (int j = 1; j < U; j++) key_d[l][j] <= key_d[l][j-1];
      acc[l][0] <= wgt[l][0];
      for (int j = 1; j < U; j++) acc[l][j] <= acc[l][j-1] + wgt[l][j];
    end
  end

  for (genvar j = 0; j < U; j++) begin : g_stage
    localparam int unsigned RIN  = rail_in_w(j, U, K, RAIL_W);
    localparam int unsigned ROUT = rail_out_w(j, U, K, RAIL_W);
    localparam int unsigned AW   = K + RIN;
    localparam int unsigned DW   = ROUT + IDX_W;

    logic          we;
    logic [AW-1:0] raddr [LANES];
    logic [DW-1:0] rdata [LANES];

    assign we = wb_d[j].valid && (wb_d[j].tgt == TGT) &&
                (wb_d[j].stage == WB_STAGE_W'(j));

    for (genvar l = 0; l < LANES; l++) begin : g_lane
      logic [K-1:0] xk;
      assign xk = key_d[l][j][XP-1-K*j -: K];
      if (j == 0) begin : g_root
        assign raddr[l] = xk;
      end else begin : g_inner
        assign raddr[l] = {rail[l][j-1][RIN-1:0], xk};
      end
      assign wgt[l][j] = rdata[l][IDX_W-1:0];
      if (ROUT > 0) begin : g_rails
        assign rail[l][j] = RAIL_W'(rdata[l][DW-1:IDX_W]);
      end else begin : g_norails
        assign rail[l][j] = '0;
      end
    end

    lut_ram #(.AW(AW), .DW(DW), .LANES(LANES)) u_lut (
      .clk   (clk),
      .we    (we),
      .waddr (wb_d[j].addr[AW-1:0]),
      .wdata (wb_d[j].data[DW-1:0]),
      .raddr (raddr),
      .rdata (rdata)
    );
  end

  for (genvar l = 0; l < LANES; l++) begin : g_out
    assign out_valid[l] = v_d[l][LATENCY];
    assign out_idx[l]   = acc[l][U-1];
  end

endmodule
