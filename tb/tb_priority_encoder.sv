// tb_priority_encoder: all request patterns of a 5-input encoder; idx must
// be the lowest set request and any its OR.
module tb_priority_encoder;
  localparam int unsigned N = 5;
  logic [N-1:0] req;
  logic [2:0]   idx;
  logic         any;

  priority_encoder #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    for (int r = 0; r < 2**N; r++) begin
      int e = 0;
      req = N'(r);
      for (int i = N - 1; i >= 0; i--) if (r[i]) e = i;
      #1;
      checks++;
      if (any !== (r != 0) || idx !== 3'(e)) begin
        failures++;
        $display("ERROR req %b: idx %0d any %b", req, idx, any);
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
