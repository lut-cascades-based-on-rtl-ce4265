// tb_lut_classifier: one classifier with both rule groups at their default
// widths. A large group and a small group of random rules (numbers drawn so
// that each group holds some of the highest ones) are loaded through write
// bubbles; random headers on both lanes are then checked against the
// highest matching rule of the whole set, at LATENCY = 38 clocks. The
// maximum selector must be seen picking each group, and the default rule
// must occur.
module tb_lut_classifier;
  import pc_pkg::*;
  import evmdd_host_pkg::*;

  localparam int unsigned LANES = 2, LAT = 38;
  localparam int unsigned IW0 [5] = '{10, 10, 6, 7, 3};
  localparam int unsigned IW1 [5] = '{8, 8, 5, 6, 3};

  logic clk = 0, rst_n = 0;
  logic              in_valid [LANES];
  header_t           in_hdr   [LANES];
  wr_bubble_t        wb_in;
  logic              out_valid [LANES];
  logic [RULE_W-1:0] out_rule  [LANES];
  logic              out_grp   [LANES];

  lut_classifier dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_default = 0, n_g0 = 0, n_g1 = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int unsigned val; longint due; } exp_t;
  exp_t exp_q [LANES][$];
  tb_rule_t rs0[$], rs1[$], all_rules[$];

  for (genvar l = 0; l < LANES; l++) begin : g_mon
    always @(posedge clk) if (rst_n && out_valid[l]) begin
      if (exp_q[l].size() == 0) begin
        failures++; $display("ERROR lane %0d: unexpected result", l);
      end else begin
        automatic exp_t e = exp_q[l].pop_front();
        checks++;
        if (e.val == 0) n_default++;
        else if (out_grp[l]) n_g1++;
        else n_g0++;
        if (out_rule[l] != RULE_W'(e.val) || cycle != e.due) begin
          failures++;
          if (failures < 10) $display("ERROR lane %0d: rule %0d exp %0d, cycle %0d exp %0d",
                                      l, out_rule[l], e.val, cycle, e.due);
        end
      end
    end
  end

  initial begin
    #8000000;
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input host_wr_t hw[$]);
    foreach (hw[i]) begin
      @(negedge clk);
      wb_in.valid = 1; wb_in.grp = hw[i].grp; wb_in.tgt = hw[i].tgt;
      wb_in.stage = WB_STAGE_W'(hw[i].stage);
      wb_in.addr = WB_ADDR_W'(hw[i].addr); wb_in.data = WB_DATA_W'(hw[i].data);
    end
    @(negedge clk);
    wb_in = '0;
  endtask

  initial begin
    host_wr_t hw0[$], hw1[$];
    bit ok;
    wb_in = '0;
    for (int l = 0; l < LANES; l++) begin in_valid[l] = 0; in_hdr[l] = '0; end
    do begin
      rs0.delete(); hw0.delete(); ok = 1;
      for (int i = 0; i < 6; i++) rs0.push_back(random_rule(20 + 30 * i));
      build_group(1'b0, K_DEF, IW0, 10, 14, rs0, hw0, ok);
    end while (!ok);
    do begin
      rs1.delete(); hw1.delete(); ok = 1;
      for (int i = 0; i < 3; i++) rs1.push_back(random_rule(35 + 60 * i));
      build_group(1'b1, K_DEF, IW1, 8, 8, rs1, hw1, ok);
    end while (!ok);
    all_rules = {rs0, rs1};
    $display("groups: %0d + %0d rules, %0d + %0d writes", rs0.size(), rs1.size(), hw0.size(), hw1.size());
    repeat (2) @(negedge clk);
    rst_n = 1;
    load(hw0);
    load(hw1);
    repeat (60) @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        automatic header_t h = random_header(all_rules, $urandom_range(0, 3) != 0);
        in_valid[l] = ($urandom_range(0, 4) != 0);
        in_hdr[l] = h;
        if (in_valid[l]) exp_q[l].push_back('{classify(all_rules, h), cycle + LAT});
      end
    end
    @(negedge clk);
    for (int l = 0; l < LANES; l++) in_valid[l] = 0;
    repeat (LAT + 5) @(negedge clk);
    for (int l = 0; l < LANES; l++) if (exp_q[l].size() != 0) begin
      failures++; $display("ERROR lane %0d: results missing", l);
    end
    $display("default %0d, group 0 wins %0d, group 1 wins %0d", n_default, n_g0, n_g1);
    if (n_default == 0 || n_g0 == 0 || n_g1 == 0) begin
      failures++; $display("ERROR: a selector case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
