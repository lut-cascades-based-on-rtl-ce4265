// tb_result_mux: a 3-input multiplexer with random data and every select
// value, including the out-of-range one that must give 0.
module tb_result_mux;
  localparam int unsigned N = 3, W = 14;
  logic [W-1:0] in_val [N];
  logic [1:0]   sel;
  logic [W-1:0] out_val;

  result_mux #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [W-1:0] e;
      for (int i = 0; i < N; i++) in_val[i] = W'($urandom);
      sel = 2'(t % 4);
      e = (sel < N) ? in_val[sel] : '0;
      #1;
      checks++;
      if (out_val !== e) begin
        failures++;
        if (failures < 10) $display("ERROR sel %0d: %h exp %h", sel, out_val, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
