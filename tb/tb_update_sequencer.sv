// tb_update_sequencer: sends a complete on-line update (CAM load, a burst of
// LUT writes, CAM clear) with random gaps and checks: one cam_set pulse with
// the rule, one write bubble per write command carrying its fields in the
// clock after the command, ready low while draining, and cam_clear plus
// update_done exactly DRAIN + 2 clocks after the clear command.
module tb_update_sequencer;
  import pc_pkg::*;
  localparam int unsigned DRAIN = 7;
  logic clk = 0, rst_n = 0;
  logic       cmd_valid, cmd_ready;
  cmd_t       cmd;
  wr_bubble_t wb_out;
  logic       cam_set, cam_clear, update_done, busy;
  cam_rule_t  cam_rule;

  update_sequencer #(.DRAIN(DRAIN)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("ERROR cycle %0d: %s", cycle, what);
    end
  endtask

  task automatic send(input cmd_t c);
    @(negedge clk);
    while (!cmd_ready) begin
      @(negedge clk);
    end
    cmd_valid = 1; cmd = c;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  int n_wr = 0, n_bub = 0, n_set = 0, n_clr = 0;
  cmd_t wq[$];
  always @(posedge clk) if (rst_n) begin
    if (wb_out.valid) begin
      n_bub++;
      if (wq.size() == 0) chk(0, "bubble without command");
      else begin
        automatic cmd_t c = wq.pop_front();
        chk(wb_out.grp == c.grp && wb_out.tgt == c.tgt && wb_out.stage == c.stage &&
            wb_out.addr == c.addr && wb_out.data == c.data, "bubble fields");
      end
    end
    if (cam_set) n_set++;
    if (cam_clear) n_clr++;
    chk(cam_clear == update_done, "clear and done together");
  end

  initial begin
    cmd_t c;
    cam_rule_t r;
    longint t_clear;
    cmd_valid = 0; cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && cmd_ready, "idle after reset");
    r = '0; r.rule = 14'd1234; r.prt = 8'd6; r.sa_hi = '1;
    c = '0; c.op = CMD_CAM_SET; c.rule = r;
    send(c);
    chk(cam_rule == r && busy, "CAM rule and busy");
    for (int i = 0; i < 30; i++) begin
      c = '0; c.op = CMD_LUT_WRITE; c.grp = 1'($urandom); c.tgt = wb_target_e'($urandom_range(0, 6));
      c.stage = 5'($urandom); c.addr = 20'($urandom); c.data = $urandom;
      wq.push_back(c);
      n_wr++;
      send(c);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    c = '0; c.op = CMD_CAM_CLEAR;
    @(negedge clk);
    cmd_valid = 1; cmd = c;
    t_clear = cycle;
    @(negedge clk);
    cmd_valid = 0;
    chk(!cmd_ready, "not ready while draining");
    while (!update_done) @(posedge clk);
    chk(cycle - t_clear == DRAIN + 2, $sformatf("done after %0d cycles", cycle - t_clear));
    @(negedge clk);
    chk(!busy && cmd_ready, "idle after done");
    chk(n_bub == n_wr && n_set == 1 && n_clr == 1, "pulse counts");
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
