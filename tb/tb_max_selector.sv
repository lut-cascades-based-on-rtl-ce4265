// tb_max_selector: random rule numbers (with ties and zeros) on three
// inputs; the output must be the largest and the index the first input
// holding it.
module tb_max_selector;
  localparam int unsigned N = 3, W = 14;
  logic [W-1:0] in_val [N];
  logic [W-1:0] out_val;
  logic [1:0]   out_idx;

  max_selector #(.N(N), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [W-1:0] m;
      int mi;
      for (int i = 0; i < N; i++)
        in_val[i] = ($urandom_range(0, 3) == 0) ? '0 : W'($urandom_range(0, 20));
      m = 0; mi = 0;
      for (int i = 0; i < N; i++) if (in_val[i] > m) begin m = in_val[i]; mi = i; end
      #1;
      checks++;
      if (out_val !== m || out_idx !== 2'(mi)) begin
        failures++;
        if (failures < 10) $display("ERROR %0d %0d %0d -> %0d/%0d exp %0d/%0d",
          in_val[0], in_val[1], in_val[2], out_val, out_idx, m, mi);
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
