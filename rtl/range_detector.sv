// range_detector: one field of the range-matching CAM. Two registers hold
// the bounds lo and hi of the stored rule's interval; per lane, two
// comparators and an AND gate give match = (lo <= key <= hi). A prefix
// (SA, DA) is stored as the interval it covers. The bounds are loaded in a
// single clock by load. After reset lo = all ones and hi = 0, an empty
// interval, so nothing matches. The match output is combinational.
module range_detector #(
  parameter int unsigned W     = 32,
  parameter int unsigned LANES = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] lo_in,
  input  logic [W-1:0] hi_in,
  input  logic [W-1:0] key   [LANES],
  output logic         match [LANES]
);

  logic [W-1:0] lo_q, hi_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_q <= '1;
      hi_q <= '0;
    end else if (load) begin
      lo_q <= lo_in;
      hi_q <= hi_in;
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_cmp
    assign match[l] = (key[l] >= lo_q) && (key[l] <= hi_q);
  end

endmodule
