// tb_xf_task_sched - drives the scheduler with a two-pair task chain (as the
// MPEG2 decoder: DT0, P0, DT1, P1) against a mock Streaming Memory Controller
// and a mock processor. Checks the task order, that a processing task is
// released only after the first object of its data transfer task, early
// release while the transfer is still running, the SDRAM low-power request,
// the waiting of a data transfer task behind a busy controller, and the set
// handshake with the synchronization unit.
module tb_xf_task_sched;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge: asynchronous reset from time 1

  logic enable = 0, allow = 0, set_done, smc_start, smc_busy = 0, smc_first_obj = 0;
  logic [2:0] n_tasks = 3'd2;
  logic [7:0] set_objs = 8'd3, cur_objs;
  logic [1:0] smc_task_id, p_id;
  logic p_ready, p_done = 0, lp_req;
  logic [15:0] dt_stalls, sets_run;

  xf_task_sched #(.NTASK(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mock SMC: busy 20 cycles, first object after 6
  int dt_order [$];
  int early = 0, first_seen_cnt = 0, fast_mode = 0;
  logic first_done = 0;
  always @(posedge clk) if (smc_start) begin
    check(!smc_busy, "start only when the controller is idle");
    dt_order.push_back(int'(smc_task_id));
    fork begin
      smc_busy <= 1'b1;
      first_done <= 1'b0;
      repeat (6) @(posedge clk);
      smc_first_obj <= 1'b1;
      @(posedge clk) smc_first_obj <= 1'b0;
      first_done <= 1'b1;
      repeat (14) @(posedge clk);
      smc_busy <= 1'b0;
    end join_none
  end

  always @(posedge clk) if (rst_n) begin
    if (smc_busy) check(!lp_req, "no low-power request during a transfer");
    if (p_ready && smc_busy) early++;
    if (p_ready) check(first_done || smc_first_obj, "processing released only after the first object");
  end

  // mock processor
  int p_order [$];
  logic p_ready_q = 0;
  always @(posedge clk) p_ready_q <= p_ready;
  always @(posedge clk) if (rst_n && p_ready && !p_ready_q) begin
    p_order.push_back(int'(p_id));
    fork begin
      repeat (fast_mode ? 1 : 30) @(negedge clk);
      p_done = 1'b1;
      @(negedge clk) p_done = 1'b0;
    end join_none
  end

  int sets = 0;
  always @(posedge clk) if (set_done) begin
    sets++;
    check(cur_objs == 8'd3, "set size latched from the synchronization unit");
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(lp_req, "low-power request while idle");
    enable = 1;
    @(negedge clk);
    check(!smc_start, "no task without allow");
    allow = 1;
    wait (sets == 3);
    fast_mode = 1;      // processor faster than the transfers
    wait (sets == 4);
    allow = 0;
    repeat (100) @(posedge clk);
    check(sets == 4 && sets_run == 16'd4, "four sets, none after allow dropped");
    check(dt_order.size() == 8, $sformatf("%0d data transfer tasks", dt_order.size()));
    for (int i = 0; i < dt_order.size(); i++)
      check(dt_order[i] == i % 2, $sformatf("DT %0d is task %0d", i, dt_order[i]));
    check(p_order.size() == 8, $sformatf("%0d processing tasks", p_order.size()));
    for (int i = 0; i < p_order.size(); i++)
      check(p_order[i] == i % 2, $sformatf("P %0d is task %0d", i, p_order[i]));
    check(early > 0, "processing overlaps the tail of its transfer");
    check(dt_stalls > 0, "transfer start waited behind a busy controller");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
