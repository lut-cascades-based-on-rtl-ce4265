// tb_pc_top: end-to-end test of the complete two-parallel classifier at its
// default parameters (four lanes, both rule groups at full width).
//
//  1. Reset, then load a large and a small random rule group through the
//     host command port while headers are offered on all four lanes; the
//     write bubbles must hold back lanes 0 and 2 (stalls are counted).
//  2. Classify random headers on all lanes; each result must equal the
//     highest matching rule of a direct search and arrive exactly
//     LATENCY = 39 clocks after the header was taken; the CAM must not hit.
//  3. On-line addition of a new highest-priority rule to the small group:
//     CAM load, rewrite of only the memory words that change, CAM clear.
//     Traffic keeps flowing. Before the first and after the last write every
//     header is checked against the rule set including the new rule; while
//     the words are being rewritten, headers inside the new rule must get it
//     from the CAM (headers outside it are not checked in that window).
//  4. After update_done the CAM must not hit any more and every header is
//     checked against the new rule set.
//  5. Deletion of the highest rule of the large group: only the words that
//     differ between the old and the reduced tables are rewritten (no CAM
//     cover, headers unchecked while they are written), then every header is
//     checked against the reduced rule set, and some results must change.
// Each mechanism (lane stall, CAM hit, default result, update done) must
// occur at least once.
module tb_pc_top;
  import pc_pkg::*;
  import evmdd_host_pkg::*;

  localparam int unsigned NL = 4, LAT = 39;
  localparam int unsigned IW0 [5] = '{10, 10, 6, 7, 3};
  localparam int unsigned IW1 [5] = '{8, 8, 5, 6, 3};

  logic clk = 0, rst_n = 0;
  logic              hdr_valid [NL];
  header_t           hdr       [NL];
  logic              hdr_ready [NL];
  logic              res_valid   [NL];
  logic [RULE_W-1:0] res_rule    [NL];
  logic              res_cam_hit [NL];
  logic              cmd_valid, cmd_ready;
  cmd_t              cmd;
  logic              update_busy, update_done;

  pc_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_cam_hit = 0, n_default = 0, n_done = 0, n_unchecked = 0;
  int n_mode [7];
  int n_del_changed = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // traffic modes
  localparam int M_OLD = 0, M_CAM_EARLY = 1, M_REWRITE = 2, M_CAM_LATE = 3, M_SKIP = 4, M_NEW = 5, M_DEL = 6;
  int mode = M_SKIP;
  bit traffic_on = 0;

  typedef struct { int unsigned val; longint due; int md; bit in_new; } exp_t;
  exp_t exp_q [NL][$];
  tb_rule_t rs0[$], rs1[$], rs1n[$], rs0d[$], old_set[$], new_set[$], del_set[$], pool[$];
  tb_rule_t r_new;

  function automatic bit hits_rule(tb_rule_t r, header_t h);
    u64_t v [5];
    hdr_fields(h, v);
    return rule_hits(r, v);
  endfunction

  // ---------------- result monitor ----------------
  for (genvar l = 0; l < NL; l++) begin : g_mon
    always @(posedge clk) if (rst_n && res_valid[l]) begin
      if (exp_q[l].size() == 0) begin
        failures++; $display("ERROR lane %0d: unexpected result", l);
      end else begin
        automatic exp_t e = exp_q[l].pop_front();
        automatic bit do_chk = 1;
        automatic bit exp_hit = 0;
        if (res_cam_hit[l]) n_cam_hit++;
        case (e.md)
          M_OLD, M_NEW, M_DEL: exp_hit = 0;
          M_CAM_EARLY, M_CAM_LATE: exp_hit = e.in_new;
          M_REWRITE: begin do_chk = e.in_new; exp_hit = 1; end
          default: do_chk = 0;
        endcase
        if (!do_chk) n_unchecked++;
        else begin
          checks++;
          n_mode[e.md]++;
          if (e.val == 0) n_default++;
          if (res_rule[l] != RULE_W'(e.val) || cycle != e.due || res_cam_hit[l] != exp_hit) begin
            failures++;
            if (failures < 10)
              $display("ERROR lane %0d mode %0d: rule %0d exp %0d, cam %b exp %b, cycle %0d exp %0d",
                       l, e.md, res_rule[l], e.val, res_cam_hit[l], exp_hit, cycle, e.due);
          end
        end
      end
    end
  end

  always @(posedge clk) if (update_done) n_done++;

  // ---------------- traffic on all lanes ----------------
  initial begin
    for (int l = 0; l < NL; l++) begin hdr_valid[l] = 0; hdr[l] = '0; end
    forever begin
      @(negedge clk);
      for (int l = 0; l < NL; l++) begin
        hdr_valid[l] = 0;
        if (traffic_on && $urandom_range(0, 4) != 0) begin
          automatic header_t h;
          automatic exp_t e;
          case ($urandom_range(0, 3))
            0: h = random_header(pool, 0);
            1: begin tb_rule_t one[$]; one.push_back(r_new); h = random_header(one, 1); end
            default: h = random_header(pool, 1);
          endcase
          hdr_valid[l] = 1;
          hdr[l] = h;
          if (!hdr_ready[l]) n_stall++;
          else begin
            e.md = mode;
            e.in_new = hits_rule(r_new, h);
            e.val = (mode == M_OLD) ? classify(old_set, h) :
                    (mode == M_DEL) ? classify(del_set, h) : classify(new_set, h);
            if (mode == M_DEL && e.val != classify(new_set, h)) n_del_changed++;
            e.due = cycle + LAT;
            exp_q[l].push_back(e);
          end
        end
      end
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host ----------------
  task automatic send(input cmd_t c);
    @(negedge clk);
    cmd_valid = 1; cmd = c;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic send_writes(input host_wr_t hw[$]);
    foreach (hw[i]) begin
      cmd_t c = '0;
      c.op = CMD_LUT_WRITE; c.grp = hw[i].grp; c.tgt = hw[i].tgt;
      c.stage = WB_STAGE_W'(hw[i].stage);
      c.addr = WB_ADDR_W'(hw[i].addr); c.data = WB_DATA_W'(hw[i].data);
      @(negedge clk);
      cmd_valid = 1; cmd = c;
      @(posedge clk);
      while (!cmd_ready) @(posedge clk);
    end
    @(negedge clk);
    cmd_valid = 0;
  endtask

  function automatic longint unsigned wkey(host_wr_t w);
    return {w.grp, 3'(w.tgt), 5'(w.stage), 20'(w.addr)};
  endfunction

  initial begin
    host_wr_t hw0[$], hw1[$], hw1n[$], hw0d[$], diff[$], diff_del[$];
    u64_t old_words [longint unsigned];
    bit ok;
    cmd_t c;
    cmd_valid = 0; cmd = '0;

    do begin
      rs0.delete(); hw0.delete(); ok = 1;
      for (int i = 0; i < 6; i++) rs0.push_back(random_rule(200 + 1500 * i));
      build_group(1'b0, K_DEF, IW0, 10, 14, rs0, hw0, ok);
    end while (!ok);
    do begin
      rs1.delete(); hw1.delete(); hw1n.delete(); rs1n.delete(); ok = 1;
      for (int i = 0; i < 2; i++) rs1.push_back(random_rule(900 + 4000 * i));
      r_new = random_rule(9000);
      r_new.lo[4] = 6; r_new.hi[4] = 6;     // the CAM matches PRT exactly
      build_group(1'b1, K_DEF, IW1, 8, 8, rs1, hw1, ok);
      rs1n = {rs1, r_new};
      build_group(1'b1, K_DEF, IW1, 8, 8, rs1n, hw1n, ok);
    end while (!ok);
    // the deleted rule: the highest one of the large group
    ok = 1;
    for (int i = 0; i < 5; i++) rs0d.push_back(rs0[i]);
    build_group(1'b0, K_DEF, IW0, 10, 14, rs0d, hw0d, ok);
    if (!ok) begin failures++; $display("ERROR: reduced group does not fit"); end
    old_words.delete();
    foreach (hw0[i]) old_words[wkey(hw0[i])] = hw0[i].data;
    foreach (hw0d[i])
      if (!old_words.exists(wkey(hw0d[i])) || old_words[wkey(hw0d[i])] != hw0d[i].data)
        diff_del.push_back(hw0d[i]);
    old_words.delete();
    old_set = {rs0, rs1};
    del_set = {rs0d, rs1n};
    new_set = {rs0, rs1n};
    pool    = new_set;
    foreach (hw1[i]) old_words[wkey(hw1[i])] = hw1[i].data;
    foreach (hw1n[i])
      if (!old_words.exists(wkey(hw1n[i])) || old_words[wkey(hw1n[i])] != hw1n[i].data)
        diff.push_back(hw1n[i]);
    $display("initial load %0d + %0d words, update rewrites %0d of %0d words, deletion %0d of %0d",
             hw0.size(), hw1.size(), diff.size(), hw1n.size(), diff_del.size(), hw0d.size());

    repeat (3) @(negedge clk);
    rst_n = 1;
    traffic_on = 1;
    mode = M_SKIP;
    send_writes(hw0);
    send_writes(hw1);
    repeat (LAT + 5) @(negedge clk);

    mode = M_OLD;
    repeat (1500) @(negedge clk);

    // on-line update: CAM first
    c = '0; c.op = CMD_CAM_SET;
    c.rule.sa_lo = 32'(r_new.lo[0]); c.rule.sa_hi = 32'(r_new.hi[0]);
    c.rule.da_lo = 32'(r_new.lo[1]); c.rule.da_hi = 32'(r_new.hi[1]);
    c.rule.sp_lo = 16'(r_new.lo[2]); c.rule.sp_hi = 16'(r_new.hi[2]);
    c.rule.dp_lo = 16'(r_new.lo[3]); c.rule.dp_hi = 16'(r_new.hi[3]);
    c.rule.prt = 8'(r_new.lo[4]); c.rule.rule = RULE_W'(r_new.rule);
    mode = M_SKIP;
    send(c);
    repeat (3) @(negedge clk);
    mode = M_CAM_EARLY;
    repeat (500) @(negedge clk);
    mode = M_REWRITE;
    send_writes(diff);
    repeat (3) @(negedge clk);
    mode = M_CAM_LATE;
    repeat (500) @(negedge clk);
    c = '0; c.op = CMD_CAM_CLEAR;
    mode = M_SKIP;
    send(c);
    while (!update_done) @(posedge clk);
    repeat (3) @(negedge clk);
    mode = M_NEW;
    repeat (1500) @(negedge clk);

    // deletion from the large group
    mode = M_SKIP;
    send_writes(diff_del);
    repeat (LAT + 5) @(negedge clk);
    mode = M_DEL;
    repeat (1500) @(negedge clk);

    traffic_on = 0;
    repeat (LAT + 5) @(negedge clk);
    for (int l = 0; l < NL; l++) if (exp_q[l].size() != 0) begin
      failures++; $display("ERROR lane %0d: %0d results missing", l, exp_q[l].size());
    end
    $display("checked per mode: old %0d, cam-early %0d, rewrite %0d, cam-late %0d, new %0d, deleted %0d (%0d changed); unchecked %0d",
             n_mode[M_OLD], n_mode[M_CAM_EARLY], n_mode[M_REWRITE], n_mode[M_CAM_LATE],
             n_mode[M_NEW], n_mode[M_DEL], n_del_changed, n_unchecked);
    $display("lane stalls %0d, CAM hits %0d, default results %0d, update done %0d",
             n_stall, n_cam_hit, n_default, n_done);
    if (n_stall == 0 || n_cam_hit == 0 || n_default == 0 || n_done != 1 ||
        n_mode[M_OLD] == 0 || n_mode[M_CAM_EARLY] == 0 || n_mode[M_REWRITE] == 0 ||
        n_mode[M_CAM_LATE] == 0 || n_mode[M_NEW] == 0 || n_mode[M_DEL] == 0 ||
        n_del_changed == 0) begin
      failures++; $display("ERROR: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
