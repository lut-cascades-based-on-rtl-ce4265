// max_selector: combinational maximum of N rule numbers. Rules are
// numbered so that a larger number has a higher priority and the default
// rule is 0, so when several rule groups match, the largest number is the
// answer. out_idx tells which input won (lowest index on a tie).
module max_selector #(
  parameter int unsigned N  = 2,
  parameter int unsigned W  = 14,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [W-1:0]  in_val [N],
  output logic [W-1:0]  out_val,
  output logic [IW-1:0] out_idx
);

  always_comb begin
    out_val = in_val[0];
    out_idx = '0;
    for (int i = 1; i < N; i++) begin
      if (in_val[i] > out_val) begin
        out_val = in_val[i];
        out_idx = IW'(i);
      end
    end
  end

endmodule
