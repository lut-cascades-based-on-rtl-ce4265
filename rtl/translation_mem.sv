// translation_mem: turns the M1-monotone index produced by the
// Cartesian-product cascade back into the rule number it stands for.
// The Cartesian-product function is made M1-monotone by renumbering its
// terminal values in order of appearance; this table (2^IDX_W words of
// RULE_NUM_W bits) holds the original rule number of each renumbered value.
// One lookup per lane per clock, result one cycle later. It is written by
// write bubbles with target TGT_TRANS (address = index, data = rule).
module translation_mem
  import pc_pkg::*;
#(
  parameter int unsigned IDX_W      = 14,
  parameter int unsigned RULE_NUM_W = RULE_W,
  parameter int unsigned LANES      = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  wr_bubble_t            wb_in,
  input  logic                  in_valid  [LANES],
  input  logic [IDX_W-1:0]      in_idx    [LANES],
  output logic                  out_valid [LANES],
  output logic [RULE_NUM_W-1:0] out_rule  [LANES]
);

  logic we;
  assign we = wb_in.valid && (wb_in.tgt == TGT_TRANS);

  lut_ram #(.AW(IDX_W), .DW(RULE_NUM_W), .LANES(LANES)) u_mem (
    .clk   (clk),
    .we    (we),
    .waddr (wb_in.addr[IDX_W-1:0]),
    .wdata (wb_in.data[RULE_NUM_W-1:0]),
    .raddr (in_idx),
    .rdata (out_rule)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int l = 0; l < LANES; l++) out_valid[l] <= 1'b0;
    else        for (int l = 0; l < LANES; l++) out_valid[l] <= in_valid[l];
  end

endmodule
