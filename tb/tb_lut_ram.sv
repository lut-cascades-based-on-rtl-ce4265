// tb_lut_ram: checks the LUT memory against a reference array: zero
// contents after start-up, one-cycle registered reads on both ports,
// write-before-read when a port reads the address being written, and
// random write/read traffic.
module tb_lut_ram;
  localparam int unsigned AW = 6, DW = 12, LANES = 2;
  logic clk = 0;
  logic          we;
  logic [AW-1:0] waddr;
  logic [DW-1:0] wdata;
  logic [AW-1:0] raddr [LANES];
  logic [DW-1:0] rdata [LANES];

  lut_ram #(.AW(AW), .DW(DW), .LANES(LANES)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [2**AW];
  logic [DW-1:0] exp_rd [LANES];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) ref_mem[i] = '0;
    we = 0; waddr = '0; wdata = '0;
    raddr[0] = '0; raddr[1] = '0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 2) == 0);
      waddr = AW'($urandom);
      wdata = DW'($urandom);
      for (int l = 0; l < LANES; l++)
        raddr[l] = ($urandom_range(0, 3) == 0) ? waddr : AW'($urandom);
      for (int l = 0; l < LANES; l++)
        exp_rd[l] = (we && raddr[l] == waddr) ? wdata : ref_mem[raddr[l]];
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (rdata[l] !== exp_rd[l]) begin
          failures++;
          if (failures < 10) $display("ERROR port %0d addr %0d: %h exp %h", l, raddr[l], rdata[l], exp_rd[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
