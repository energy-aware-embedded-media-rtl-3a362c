// tb_xf_sync_unit - three applications with synchronization granularities
// G = 5, 3, 4 and task granularities g = 2, 1, 4 run four synchronization
// blocks. Checks the set sizes (including the remainder burst of 1 object of
// application 0), that no application starts block i+1 before every
// application has completed block i, the block and remainder counters, and
// the windowed throughput monitor (X = 2) against violations computed here
// from the observed block start times.
// A second phase, after a reset, runs two blocks of the video-phone scenario
// of the source: one CIF video frame (396 macroblocks, g = 2) synchronized
// with 1092 samples each of a speech decoder and encoder (g = 128, so
// 8 full sets and a remainder of 68 samples per block).
module tb_xf_sync_unit;
  localparam int NAPPS = 3, X = 2, NBMAX = 4;
  localparam int BOUND = 90;
  int NB = 4;
  int GG [NAPPS] = '{5, 3, 4};
  int GS [NAPPS] = '{2, 1, 4};
  int slow = 10;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge: asynchronous reset from time 1

  logic enable = 0;
  logic [15:0] cfg_G [NAPPS];
  logic [7:0]  cfg_g [NAPPS];
  logic [31:0] bound = 32'(BOUND);
  logic [NAPPS-1:0] set_done = '0, allow;
  logic [7:0]  set_objs [NAPPS];
  logic block_start, violation;
  logic [15:0] blocks_done, remainder_sets, violations;

  xf_sync_unit #(.NAPPS(NAPPS), .X(X)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int starts [$];
  always @(posedge clk) if (rst_n && block_start) starts.push_back(cyc);

  int last_done [NBMAX];
  int first_start [NBMAX];
  int apps_finished = 0;

  task automatic run_app(int a);
    for (int b = 0; b < NB; b++) begin
      int left = GG[a];
      while (left > 0) begin
        int exp_objs = left < GS[a] ? left : GS[a];
        @(negedge clk);
        while (!allow[a]) @(negedge clk);
        if (cyc < first_start[b]) first_start[b] = cyc;
        check(int'(set_objs[a]) == exp_objs,
              $sformatf("app %0d block %0d set of %0d objects, expected %0d", a, b, set_objs[a], exp_objs));
        repeat ($urandom_range(1, 3 + slow * (a + 1))) @(negedge clk);
        set_done[a] = 1'b1;
        if (cyc > last_done[b]) last_done[b] = cyc;
        @(negedge clk) set_done[a] = 1'b0;
        left -= exp_objs;
      end
    end
    apps_finished++;
  endtask

  initial begin
    for (int a = 0; a < NAPPS; a++) begin cfg_G[a] = 16'(GG[a]); cfg_g[a] = 8'(GS[a]); end
    for (int b = 0; b < NB; b++) begin last_done[b] = 0; first_start[b] = 1 << 30; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(allow == 0, "nothing allowed while disabled");
    enable = 1;
    fork
      run_app(0);
      run_app(1);
      run_app(2);
    join
    repeat (5) @(negedge clk);
    for (int b = 0; b + 1 < NB; b++)
      check(first_start[b + 1] > last_done[b],
            $sformatf("block %0d started at %0d before block %0d completed at %0d",
                      b + 1, first_start[b + 1], b, last_done[b]));
    check(blocks_done == 16'(NB), $sformatf("blocks_done %0d", blocks_done));
    check(remainder_sets == 16'(NB), $sformatf("remainder bursts %0d", remainder_sets));
    foreach (starts[i]) $display("block start at cycle %0d", starts[i]);
    check(starts.size() == NB + 1, $sformatf("block starts %0d", starts.size()));
    begin
      int exp_v = 0;
      for (int i = X; i < starts.size(); i++)
        if (starts[i] - starts[i - X] > BOUND) exp_v++;
      check(int'(violations) == exp_v, $sformatf("violations %0d, expected %0d", violations, exp_v));
      check(exp_v > 0, "the run exercises a throughput violation");
    end

    // ---- phase 2: video frame against speech blocks ----
    enable = 0;
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    NB = 2; slow = 0;
    GG = '{396, 1092, 1092};
    GS = '{2, 128, 128};
    bound = '0;
    for (int a = 0; a < NAPPS; a++) begin cfg_G[a] = 16'(GG[a]); cfg_g[a] = 8'(GS[a]); end
    for (int b = 0; b < NBMAX; b++) begin last_done[b] = 0; first_start[b] = 1 << 30; end
    @(negedge clk) enable = 1;
    fork
      run_app(0);
      run_app(1);
      run_app(2);
    join
    repeat (5) @(negedge clk);
    check(first_start[1] > last_done[0], "video/speech: barrier between blocks");
    check(blocks_done == 16'd2, $sformatf("video/speech: blocks_done %0d", blocks_done));
    check(remainder_sets == 16'd4, $sformatf("video/speech: remainder bursts %0d", remainder_sets));
    check(violations == 0, "no throughput check when the bound is 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
