// tb_cascade_k_sweep: the same field function realised by LUT cascades for
// EVMDD(k) (evmdd_cascade, with adders) and for MTMDD(k) (mtmdd_cascade,
// the conventional form without adders), each with k = 1, 2, 3 and 4
// super-variable bits, eight cascades side by side. The field is a 16-bit
// port field (SP/DP); with k = 3 the key does not divide into super
// variables and is padded at the top, which this also covers.
//
// A random step function with 60 segment boundaries is written into each
// cascade through its own write-bubble input, then identical random keys
// (a quarter of them placed on boundaries) are streamed into all eight on
// both lanes. Every index is compared with the step function and must
// appear exactly ceil(16/k) + 1 clocks (EVMDD) or ceil(16/k) clocks (MTMDD)
// after its key. The memory each cascade uses, the sum over stages of
// 2^(k + rails_in) * (rails_out + index bits) for the EVMDD and
// 2^(k + rails_in) * rails_out (index bits in the last LUT) for the MTMDD,
// is printed per k so the choices can be compared; k = 2 is the value the
// classifier uses by default. The MTMDD gets one rail more (8 instead of 7)
// because its nodes cannot share sub-functions that differ by a constant.
module tb_cascade_k_sweep;
  import pc_pkg::*;
  import evmdd_host_pkg::*;

  localparam int unsigned N_IN = 16, RAIL_W = 7, M_RAIL_W = 8, IDX_W = 7, LANES = 2, NK = 4;
  localparam int unsigned NT = 2;   // 0: EVMDD, 1: MTMDD
  localparam int unsigned KS [NK] = '{1, 2, 3, 4};

  logic clk = 0, rst_n = 0;
  logic             in_valid [LANES];
  logic [N_IN-1:0]  in_key   [LANES];
  wr_bubble_t       wb_in    [NT][NK];
  logic             out_valid [NT][NK][LANES];
  logic [IDX_W-1:0] out_idx   [NT][NK][LANES];

  for (genvar g = 0; g < NK; g++) begin : g_k
    evmdd_cascade #(.N_IN(N_IN), .K(KS[g]), .RAIL_W(RAIL_W), .IDX_W(IDX_W), .LANES(LANES),
                    .TGT(TGT_DP)) dut_ev (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_key(in_key), .wb_in(wb_in[0][g]),
      .out_valid(out_valid[0][g]), .out_idx(out_idx[0][g]));
    mtmdd_cascade #(.N_IN(N_IN), .K(KS[g]), .RAIL_W(M_RAIL_W), .IDX_W(IDX_W), .LANES(LANES),
                    .TGT(TGT_DP)) dut_mt (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_key(in_key), .wb_in(wb_in[1][g]),
      .out_valid(out_valid[1][g]), .out_idx(out_idx[1][g]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_checks_k [NT][NK];
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int unsigned val; longint due; logic [N_IN-1:0] key; } exp_t;
  exp_t exp_q [NT][NK][LANES][$];
  localparam string TN [NT] = '{"EVMDD", "MTMDD"};
  u64_t fn[$];

  function automatic int unsigned lat(input int t, input int g);
    return n_stages(N_IN, KS[g]) + ((t == 0) ? 1 : 0);
  endfunction

  function automatic longint unsigned mem_bits(input int t, input int unsigned k);
    longint unsigned s;
    int unsigned u, rw;
    s  = 0;
    u  = n_stages(N_IN, k);
    rw = (t == 0) ? RAIL_W : M_RAIL_W;
    for (int unsigned j = 0; j < u; j++)
      s += (longint'(1) << (k + rail_in_w(j, u, k, rw))) *
           ((t == 0) ? rail_out_w(j, u, k, rw) + IDX_W
                     : ((j + 1 == u) ? IDX_W : rail_out_w(j, u, k, rw)));
    return s;
  endfunction

  for (genvar t = 0; t < NT; t++) begin : g_mon_t
  for (genvar g = 0; g < NK; g++) begin : g_mon
    for (genvar l = 0; l < LANES; l++) begin : g_lane
      always @(posedge clk) begin
        if (rst_n && out_valid[t][g][l]) begin
          if (exp_q[t][g][l].size() == 0) begin
            failures++;
            $display("ERROR %s k=%0d lane %0d: unexpected output", TN[t], KS[g], l);
          end else begin
            automatic exp_t e = exp_q[t][g][l].pop_front();
            checks++;
            n_checks_k[t][g]++;
            if (out_idx[t][g][l] != IDX_W'(e.val) || cycle != e.due) begin
              failures++;
              if (failures < 10)
                $display("ERROR %s k=%0d lane %0d: key %h idx %0d exp %0d, cycle %0d exp %0d",
                         TN[t], KS[g], l, e.key, out_idx[t][g][l], e.val, cycle, e.due);
            end
          end
        end
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
    for (int t = 0; t < NT; t++) for (int g = 0; g < NK; g++) wb_in[t][g] = '0;
    for (int l = 0; l < LANES; l++) begin in_valid[l] = 0; in_key[l] = '0; end
    for (int i = 0; i < 60; i++) fn.push_back(u64_t'($urandom_range(1, 65535)));
    sort_unique(fn);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // load every cascade with the same function
    for (int t = 0; t < NT; t++)
    for (int g = 0; g < NK; g++) begin
      lut_wr_t wr[$];
      bit ok;
      ok = 1;
      if (t == 0) build_cascade(N_IN, KS[g], RAIL_W, IDX_W, fn, wr, ok);
      else        build_mtmdd_cascade(N_IN, KS[g], M_RAIL_W, IDX_W, fn, wr, ok);
      if (!ok) begin
        failures++;
        $display("ERROR %s k=%0d: function does not fit", TN[t], KS[g]);
      end
      $display("%s k=%0d: %0d stages, %0d words written, %0d memory bits",
               TN[t], KS[g], n_stages(N_IN, KS[g]), wr.size(), mem_bits(t, KS[g]));
      foreach (wr[i]) begin
        @(negedge clk);
        wb_in[t][g].valid = 1; wb_in[t][g].tgt = TGT_DP;
        wb_in[t][g].stage = WB_STAGE_W'(wr[i].stage);
        wb_in[t][g].addr  = WB_ADDR_W'(wr[i].addr);
        wb_in[t][g].data  = WB_DATA_W'(wr[i].data);
      end
      @(negedge clk);
      wb_in[t][g] = '0;
    end
    repeat (20) @(negedge clk);

    // identical keys into all eight cascades
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        automatic logic [N_IN-1:0] key = N_IN'($urandom);
        in_valid[l] = ($urandom_range(0, 4) != 0);
        if ($urandom_range(0, 3) == 0)
          key = N_IN'(fn[$urandom_range(0, fn.size() - 1)] - $urandom_range(0, 1));
        in_key[l] = key;
        if (in_valid[l])
          for (int t = 0; t < NT; t++)
          for (int g = 0; g < NK; g++) begin
            automatic exp_t e;
            e.val = step_value(fn, u64_t'(key));
            e.due = cycle + lat(t, g);
            e.key = key;
            exp_q[t][g][l].push_back(e);
          end
      end
    end
    @(negedge clk);
    for (int l = 0; l < LANES; l++) in_valid[l] = 0;
    repeat (30) @(negedge clk);

    for (int t = 0; t < NT; t++)
    for (int g = 0; g < NK; g++) begin
      for (int l = 0; l < LANES; l++)
        if (exp_q[t][g][l].size() != 0) begin
          failures++;
          $display("ERROR %s k=%0d lane %0d: %0d results missing", TN[t], KS[g], l,
                   exp_q[t][g][l].size());
        end
      if (n_checks_k[t][g] == 0) begin
        failures++;
        $display("ERROR %s k=%0d: nothing checked", TN[t], KS[g]);
      end
      $display("%s k=%0d: %0d indices checked", TN[t], KS[g], n_checks_k[t][g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
