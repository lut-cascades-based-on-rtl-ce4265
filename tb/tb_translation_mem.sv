// tb_translation_mem: writes a random index-to-rule table through write
// bubbles (and one bubble for another target that must be ignored), then
// looks up random indices on both lanes and checks rule and valid one clock
// later.
module tb_translation_mem;
  import pc_pkg::*;
  localparam int unsigned IDX_W = 6, LANES = 2;
  logic clk = 0, rst_n = 0;
  wr_bubble_t        wb_in;
  logic              in_valid  [LANES];
  logic [IDX_W-1:0]  in_idx    [LANES];
  logic              out_valid [LANES];
  logic [RULE_W-1:0] out_rule  [LANES];

  translation_mem #(.IDX_W(IDX_W), .RULE_NUM_W(RULE_W), .LANES(LANES)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [RULE_W-1:0] tbl [2**IDX_W];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wb_in = '0;
    for (int l = 0; l < LANES; l++) begin in_valid[l] = 0; in_idx[l] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2**IDX_W; i++) begin
      tbl[i] = RULE_W'($urandom);
      @(negedge clk);
      wb_in = '0; wb_in.valid = 1; wb_in.tgt = TGT_TRANS;
      wb_in.addr = WB_ADDR_W'(i); wb_in.data = WB_DATA_W'(tbl[i]);
    end
    @(negedge clk);
    wb_in = '0; wb_in.valid = 1; wb_in.tgt = TGT_CP; wb_in.addr = 5; wb_in.data = '1;
    @(negedge clk);
    wb_in = '0;
    for (int t = 0; t < 500; t++) begin
      logic [IDX_W-1:0] ix [LANES];
      logic v [LANES];
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        ix[l] = IDX_W'($urandom); v[l] = ($urandom_range(0, 3) != 0);
        in_idx[l] = ix[l]; in_valid[l] = v[l];
      end
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (out_valid[l] !== v[l] || (v[l] && out_rule[l] !== tbl[ix[l]])) begin
          failures++;
          if (failures < 10) $display("ERROR lane %0d idx %0d: %0d exp %0d", l, ix[l], out_rule[l], tbl[ix[l]]);
        end
      end
      for (int l = 0; l < LANES; l++) in_valid[l] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
