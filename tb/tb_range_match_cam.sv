// tb_range_match_cam: the CAM holds nothing after reset; then random rules
// are loaded in one clock each and random headers (half of them built to
// fall inside the rule, some with one field pushed just outside) are checked
// on four lanes against a reference match. A clear must make every lookup
// miss with rule 0.
module tb_range_match_cam;
  import pc_pkg::*;
  localparam int unsigned LANES = 4;
  logic clk = 0, rst_n = 0;
  logic              set, clear;
  cam_rule_t         rule_in;
  header_t           key   [LANES];
  logic              match [LANES];
  logic [RULE_W-1:0] rule  [LANES];

  range_match_cam #(.LANES(LANES)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cam_rule_t cur;
  bit        held;

  function automatic bit ref_match(cam_rule_t r, header_t h);
    return (h.sa >= r.sa_lo) && (h.sa <= r.sa_hi) && (h.da >= r.da_lo) && (h.da <= r.da_hi) &&
           (h.sp >= r.sp_lo) && (h.sp <= r.sp_hi) && (h.dp >= r.dp_lo) && (h.dp <= r.dp_hi) &&
           (h.prt == r.prt);
  endfunction

  function automatic header_t near(cam_rule_t r);
    header_t h;
    h.sa  = r.sa_lo + ($urandom % (r.sa_hi - r.sa_lo + 1));
    h.da  = r.da_lo + ($urandom % (r.da_hi - r.da_lo + 1));
    h.sp  = r.sp_lo + 16'($urandom % (r.sp_hi - r.sp_lo + 1));
    h.dp  = r.dp_lo + 16'($urandom % (r.dp_hi - r.dp_lo + 1));
    h.prt = r.prt;
    case ($urandom_range(0, 6))
      0: h.sa  = r.sa_hi + 1;
      1: h.da  = r.da_lo - 1;
      2: h.sp  = r.sp_hi + 1;
      3: h.dp  = r.dp_lo - 1;
      4: h.prt = r.prt + 1;
      default: ;
    endcase
    return h;
  endfunction

  task automatic check_all();
    for (int l = 0; l < LANES; l++) key[l] = ($urandom_range(0, 1) == 0) ? near(cur) : header_t'({$urandom, $urandom, $urandom, $urandom});
    #1;
    for (int l = 0; l < LANES; l++) begin
      bit e = held && ref_match(cur, key[l]);
      checks++;
      if (match[l] !== e || rule[l] !== (e ? cur.rule : '0)) begin
        failures++;
        if (failures < 10) $display("ERROR lane %0d: match %b rule %0d exp %b", l, match[l], rule[l], e);
      end
    end
  endtask

  initial begin
    set = 0; clear = 0; rule_in = '0; held = 0;
    cur = '0; cur.sa_hi = '1; cur.da_hi = '1; cur.sp_hi = '1; cur.dp_hi = '1;
    for (int l = 0; l < LANES; l++) key[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) check_all();
    for (int r = 0; r < 60; r++) begin
      @(negedge clk);
      cur.sa_lo = $urandom & 32'hFFFF_FF00; cur.sa_hi = cur.sa_lo | 32'h0000_00FF;
      cur.da_lo = $urandom & 32'hFFF0_0000; cur.da_hi = cur.da_lo | 32'h000F_FFFF;
      cur.sp_lo = 16'($urandom_range(1, 30000)); cur.sp_hi = cur.sp_lo + 16'($urandom_range(0, 1000));
      cur.dp_lo = 16'($urandom_range(1, 30000)); cur.dp_hi = cur.dp_lo + 16'($urandom_range(0, 10));
      cur.prt = 8'($urandom_range(1, 200));
      cur.rule = RULE_W'($urandom_range(1, 9816));
      rule_in = cur; set = 1;
      @(negedge clk);
      set = 0; rule_in = '0; held = 1;
      for (int t = 0; t < 20; t++) check_all();
      if (r % 10 == 9) begin
        @(negedge clk);
        clear = 1;
        @(negedge clk);
        clear = 0; held = 0;
        for (int t = 0; t < 10; t++) check_all();
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
