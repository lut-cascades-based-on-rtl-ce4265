// tb_evmdd_cascade: self-checking test of one LUT cascade for an EVMDD(2)
// on a 16-bit key (8 stages, both lanes). The host model writes the tables
// of a random step function through write bubbles, keys are streamed on
// both lanes and every index is compared with the step function itself, at
// exactly U + 1 = 9 clocks after entry. Then the tables are rewritten for a
// second function while keys keep flowing: keys entered before the first
// bubble must still give the old value, keys entered after the last give the
// new one. A bubble aimed at another cascade must change nothing.
module tb_evmdd_cascade;
  import pc_pkg::*;
  import evmdd_host_pkg::*;

  localparam int unsigned N_IN = 16, K = 2, RAIL_W = 6, IDX_W = 6, LANES = 2;
  localparam int unsigned LAT  = 9;

  logic clk = 0, rst_n = 0;
  logic             in_valid [LANES];
  logic [N_IN-1:0]  in_key   [LANES];
  wr_bubble_t       wb_in;
  logic             out_valid [LANES];
  logic [IDX_W-1:0] out_idx   [LANES];

  evmdd_cascade #(.N_IN(N_IN), .K(K), .RAIL_W(RAIL_W), .IDX_W(IDX_W), .LANES(LANES),
                  .TGT(TGT_SP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results: value and cycle due, per lane
  typedef struct { int unsigned val; longint due; bit check; logic [N_IN-1:0] key; } exp_t;
  exp_t exp_q [LANES][$];
  u64_t fa[$], fb[$];
  int phase_fn [LANES];  // 0: function A, 1: function B, 2: unknown

  function automatic void gen_fn(ref u64_t q[$], input int n);
    q.delete();
    for (int i = 0; i < n; i++) q.push_back(u64_t'($urandom_range(1, 65535)));
    sort_unique(q);
  endfunction

  task automatic write_tables(const ref u64_t q[$], input bit keep_streaming);
    lut_wr_t wr[$];
    bit ok = 1;
    build_cascade(N_IN, K, RAIL_W, IDX_W, q, wr, ok);
    if (!ok) begin
      failures++;
      $display("ERROR: function does not fit the cascade");
    end
    foreach (wr[i]) begin
      @(negedge clk);
      wb_in.valid = 1; wb_in.grp = 0; wb_in.tgt = TGT_SP;
      wb_in.stage = WB_STAGE_W'(wr[i].stage);
      wb_in.addr = WB_ADDR_W'(wr[i].addr); wb_in.data = WB_DATA_W'(wr[i].data);
      if (keep_streaming) drive_keys(2); else idle_keys();
    end
    @(negedge clk);
    wb_in = '0;
    idle_keys();
  endtask

  function automatic void idle_keys();
    for (int l = 0; l < LANES; l++) in_valid[l] = 0;
  endfunction

  // drive one random key per lane this cycle; fn: 0/1 = known function, 2 = do not check
  function automatic void drive_keys(input int fn);
    for (int l = 0; l < LANES; l++) begin
      exp_t e;
      logic [N_IN-1:0] k = N_IN'($urandom);
      if ($urandom_range(0, 3) == 0) k = (fn == 1 && fb.size() > 0) ? N_IN'(fb[0]) : N_IN'(fa[0]);
      in_valid[l] = 1;
      in_key[l]   = k;
      e.val   = (fn == 1) ? step_value(fb, u64_t'(k)) : step_value(fa, u64_t'(k));
      e.due   = cycle + LAT;
      e.check = (fn != 2);
      e.key   = k;
      exp_q[l].push_back(e);
    end
  endfunction

  for (genvar l = 0; l < LANES; l++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && out_valid[l]) begin
        if (exp_q[l].size() == 0) begin
          failures++;
          $display("ERROR lane %0d: unexpected output", l);
        end else begin
          automatic exp_t e = exp_q[l].pop_front();
          if (e.check) begin
            checks++;
            if (out_idx[l] != IDX_W'(e.val) || cycle != e.due) begin
              failures++;
              if (failures < 10)
                $display("ERROR lane %0d: key %h idx %0d exp %0d, cycle %0d exp %0d",
                         l, e.key, out_idx[l], e.val, cycle, e.due);
            end
          end
        end
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wb_in = '0;
    idle_keys();
    gen_fn(fa, 12);
    gen_fn(fb, 9);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load function A with no traffic
    write_tables(fa, 0);
    repeat (12) @(negedge clk);
    // stream keys under function A
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      drive_keys(0);
    end
    // a bubble for another cascade must not disturb function A
    @(negedge clk);
    wb_in.valid = 1; wb_in.grp = 0; wb_in.tgt = TGT_DP; wb_in.stage = 0;
    wb_in.addr = 0; wb_in.data = '1;
    drive_keys(0);
    @(negedge clk);
    wb_in = '0;
    drive_keys(0);
    // on-line rewrite to function B with traffic flowing (unchecked meanwhile)
    write_tables(fb, 1);
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      drive_keys(1);
    end
    @(negedge clk);
    idle_keys();
    repeat (LAT + 5) @(negedge clk);
    for (int l = 0; l < LANES; l++)
      if (exp_q[l].size() != 0) begin
        failures++;
        $display("ERROR lane %0d: %0d results missing", l, exp_q[l].size());
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
