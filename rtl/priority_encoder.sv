// priority_encoder: N request lines, request 0 has the highest priority.
// idx is the number of the highest-priority request that is set and any
// tells whether one is set (idx = 0 when none is). In the classifier
// request 0 is the range-matching CAM's match and request 1 the always
// valid cascade result, so the CAM's rule is chosen whenever it matches.
// Combinational.
module priority_encoder #(
  parameter int unsigned N  = 2,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  output logic [IW-1:0] idx,
  output logic          any
);

  always_comb begin
    idx = '0;
    any = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        idx = IW'(i);
        any = 1'b1;
      end
    end
  end

endmodule
