// result_mux: N-input multiplexer of W-bit rule numbers, steered by the
// priority encoder. A select beyond N-1 gives 0 (the default rule).
// Combinational.
module result_mux #(
  parameter int unsigned N  = 2,
  parameter int unsigned W  = 14,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [W-1:0]  in_val [N],
  input  logic [IW-1:0] sel,
  output logic [W-1:0]  out_val
);

  always_comb begin
    out_val = '0;
    for (int i = 0; i < N; i++) begin
      if (sel == IW'(i)) out_val = in_val[i];
    end
  end

endmodule
