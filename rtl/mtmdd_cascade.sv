// mtmdd_cascade: pipelined LUT cascade for a multi-terminal MDD(k), the
// conventional realisation of a field function that the EVMDD(k) cascade
// with adders improves on. It is kept as a reference point for memory
// comparisons; the classifier itself uses evmdd_cascade.
//
// The N_IN-bit key is cut into U = ceil(N_IN/K) super variables, the most
// significant first (zero-padded at the top). Stage j is one LUT whose
// address is {rails from stage j-1, super variable j} and whose word is the
// rails to stage j+1: the number of the MTMDD node the key has reached. The
// last LUT stores the terminal itself, i.e. the function value (IDX_W bits).
// There are no adders: all the value information travels on the rails, so
// in general an MTMDD needs more rails than an EVMDD of the same function,
// whose nodes may share sub-functions that differ by a constant.
// Rails per stage come from pc_pkg::rail_out_w as in evmdd_cascade.
//
// Timing: one key per lane per clock; a key presented at cycle 0 gives its
// value at cycle LATENCY = U (out_valid marks it), one cycle earlier than
// evmdd_cascade because there is no final adder register.
//
// Update: the same write bubbles as evmdd_cascade (stage, address, data,
// write-before-read). The cascade structure and the LUT size
// 2^(k + r_in) * r_out follow the conventional method; the word layout, the
// bubble format and the rail narrowing are this design's own choice.
module mtmdd_cascade
  import pc_pkg::*;
#(
  parameter int unsigned N_IN   = 16,
  parameter int unsigned K      = 2,
  parameter int unsigned RAIL_W = 8,
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
  localparam int unsigned LATENCY = U;

  logic [XP-1:0]     key_d [LANES][U];     // key delayed j cycles
  logic              v_d   [LANES][U+1];   // valid delayed i cycles
  wr_bubble_t        wb_d  [U];            // bubble at stage j
  logic [RAIL_W-1:0] rail  [LANES][U];     // rails out of stage j

  for (genvar l = 0; l < LANES; l++) begin : g_in
    assign key_d[l][0] = XP'(in_key[l]);
    assign v_d[l][0]   = in_valid[l];
  end
  assign wb_d[0] = wb_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++)
        for (int i = 1; i < U + 1; i++) v_d[l][i] <= 1'b0;
      for (int j = 1; j < U; j++) wb_d[j] <= '0;
    end else begin
      for (int l = 0; l < LANES; l++)
        for (int i = 1; i < U + 1; i++) v_d[l][i] <= v_d[l][i-1];
      for (int j = 1; j < U; j++) wb_d[j] <= wb_d[j-1];
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++)
      for (int j = 1; j < U; j++) key_d[l][j] <= key_d[l][j-1];
  end

  for (genvar j = 0; j < U; j++) begin : g_stage
    localparam int unsigned RIN  = rail_in_w(j, U, K, RAIL_W);
    localparam int unsigned ROUT = rail_out_w(j, U, K, RAIL_W);
    localparam int unsigned AW   = K + RIN;
    localparam int unsigned DW   = (j == U - 1) ? IDX_W : ROUT;

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
      if (j == U - 1) begin : g_term
        assign rail[l][j]  = '0;
        assign out_idx[l]  = rdata[l];
      end else begin : g_rails
        assign rail[l][j] = RAIL_W'(rdata[l]);
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
  end

endmodule
