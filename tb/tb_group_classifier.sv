// tb_group_classifier: one rule group at its default widths. Random rule
// sets are drawn until one fits the group's index widths, the host model
// turns it into field, Cartesian-product and translation tables, the tables
// are written through write bubbles, and random headers (half of them
// inside some rule) are classified on both lanes. Each result is compared
// with a direct search of the rule list for the highest matching rule and
// must appear exactly LATENCY = 17 + 19 + 1 = 37 clocks after entry. A
// bubble for the other group must be ignored.
module tb_group_classifier;
  import pc_pkg::*;
  import evmdd_host_pkg::*;

  localparam int unsigned LANES = 2, LAT = 37;
  localparam int unsigned IW [5] = '{10, 10, 6, 7, 3};

  logic clk = 0, rst_n = 0;
  logic              in_valid [LANES];
  header_t           in_hdr   [LANES];
  wr_bubble_t        wb_in;
  logic              out_valid [LANES];
  logic [RULE_W-1:0] out_rule  [LANES];

  group_classifier #(.GRP(1'b0)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_default = 0, n_hit = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int unsigned val; longint due; } exp_t;
  exp_t exp_q [LANES][$];
  tb_rule_t rs[$];

  for (genvar l = 0; l < LANES; l++) begin : g_mon
    always @(posedge clk) if (rst_n && out_valid[l]) begin
      if (exp_q[l].size() == 0) begin
        failures++; $display("ERROR lane %0d: unexpected result", l);
      end else begin
        automatic exp_t e = exp_q[l].pop_front();
        checks++;
        if (e.val == 0) n_default++; else n_hit++;
        if (out_rule[l] != RULE_W'(e.val) || cycle != e.due) begin
          failures++;
          if (failures < 10) $display("ERROR lane %0d: rule %0d exp %0d, cycle %0d exp %0d",
                                      l, out_rule[l], e.val, cycle, e.due);
        end
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_wr_t hw[$];
    bit ok;
    wb_in = '0;
    for (int l = 0; l < LANES; l++) begin in_valid[l] = 0; in_hdr[l] = '0; end
    do begin
      rs.delete(); hw.delete(); ok = 1;
      for (int i = 0; i < 6; i++) rs.push_back(random_rule(100 + 7 * i));
      build_group(1'b0, K_DEF, IW, 10, 14, rs, hw, ok);
    end while (!ok);
    $display("group: %0d rules, %0d memory writes", rs.size(), hw.size());
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (hw[i]) begin
      @(negedge clk);
      wb_in.valid = 1; wb_in.grp = hw[i].grp; wb_in.tgt = hw[i].tgt;
      wb_in.stage = WB_STAGE_W'(hw[i].stage);
      wb_in.addr = WB_ADDR_W'(hw[i].addr); wb_in.data = WB_DATA_W'(hw[i].data);
    end
    // a bubble for group 1 that would corrupt the translation table here
    @(negedge clk);
    wb_in.valid = 1; wb_in.grp = 1'b1; wb_in.tgt = TGT_TRANS; wb_in.addr = 0; wb_in.data = 5;
    @(negedge clk);
    wb_in = '0;
    repeat (60) @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        automatic header_t h = random_header(rs, $urandom_range(0, 1));
        in_valid[l] = ($urandom_range(0, 4) != 0);
        in_hdr[l] = h;
        if (in_valid[l]) exp_q[l].push_back('{classify(rs, h), cycle + LAT});
      end
    end
    @(negedge clk);
    for (int l = 0; l < LANES; l++) in_valid[l] = 0;
    repeat (LAT + 5) @(negedge clk);
    for (int l = 0; l < LANES; l++) if (exp_q[l].size() != 0) begin
      failures++; $display("ERROR lane %0d: results missing", l);
    end
    if (n_default == 0 || n_hit == 0) begin
      failures++; $display("ERROR: default %0d / rule hits %0d", n_default, n_hit);
    end
    $display("default results %0d, rule hits %0d", n_default, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
