// tb_range_detector: nothing matches after reset; then random intervals are
// loaded and keys at, just inside and just outside the bounds and random
// keys are checked on both lanes against lo <= key <= hi.
module tb_range_detector;
  localparam int unsigned W = 16, LANES = 2;
  logic clk = 0, rst_n = 0;
  logic         load;
  logic [W-1:0] lo_in, hi_in;
  logic [W-1:0] key   [LANES];
  logic         match [LANES];

  range_detector #(.W(W), .LANES(LANES)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] lo, hi;

  task automatic check_key(input int l, input logic [W-1:0] k, input bit loaded);
    bit e;
    key[l] = k;
    #1;
    e = loaded && (k >= lo) && (k <= hi);
    checks++;
    if (match[l] !== e) begin
      failures++;
      if (failures < 10) $display("ERROR [%0d,%0d] key %0d: %b", lo, hi, k, match[l]);
    end
  endtask

  initial begin
    load = 0; lo_in = '0; hi_in = '0; key[0] = '0; key[1] = '0;
    lo = 0; hi = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) check_key(t % 2, W'($urandom), 0);
    for (int r = 0; r < 100; r++) begin
      @(negedge clk);
      lo = W'($urandom); hi = W'($urandom);
      if (lo > hi && $urandom_range(0, 3) != 0) begin logic [W-1:0] s = lo; lo = hi; hi = s; end
      lo_in = lo; hi_in = hi; load = 1;
      @(negedge clk);
      load = 0; lo_in = W'($urandom); hi_in = W'($urandom);
      for (int l = 0; l < LANES; l++) begin
        check_key(l, lo, 1); check_key(l, hi, 1);
        check_key(l, lo - 1, 1); check_key(l, hi + 1, 1);
        for (int t = 0; t < 10; t++) check_key(l, W'($urandom), 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
