// tb_xf_top - end-to-end test of the whole data memory subsystem at its
// default (full) size, running a toy MPEG2-style decoder on it.
//
// How: a processor model drives the data bus with one access at a time. It
// loads the controller program for the two data transfer tasks, writes a
// constant table to the Scratch-Pad and configures three applications in one
// synchronization block. The application under test decodes 15 macroblocks
// (G = 5 per block, g = 2 per set, so each block ends with a one-object
// remainder set):
//   Task1_DT  store previous output set, gate OUT, power IN/MV/DCT, load input
//   Task1_P   (processor) DCT = input ^ Scratch-Pad constant + index, writes
//             two motion-vector table entries per macroblock (backward, and
//             forward or "skip"), gates each consumed input slot
//   Task2_DT  power MC/OUT, load the reference blocks addressed by the
//             table (indirect)
//   Task2_P   (processor) OUT = DCT + backward or mean of backward/forward,
//             gates each consumed slot and finally the table
// Applications 1 and 2 are modelled by processes that pulse ext_set_done
// after random delays; application 1 is slow in the first block so the
// decoder waits at the barrier. The SDRAM is the behavioural model in
// sdram_model.sv. After the last block one more set runs in which the
// processor finishes at once, so the next transfer task is still busy.
//
// Checks: every output word in SDRAM against a reference computed here;
// no unexpected bus errors; SDRAM protocol; throughput violations against the
// recorded block start times; and each mechanism must occur at least once:
// SDRAM power-down and refresh, page-mode hits, a burst crossing a row,
// early start of a processing task, a transfer-task stall, LOADI skip,
// remainder sets, barrier wait, sub-region gating by controller and
// processor, the bus error on a gated sub-region, and partial power of the
// Streaming Memory.
module tb_xf_top;
  import xf_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge: asynchronous reset from time 1

  // ---------------------------------------------------------------- DUT
  logic        cpu_req = 0, cpu_we = 0;
  logic [3:0]  cpu_be = 4'hF;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic        cpu_rvalid, cpu_err;
  logic        p_ready;
  logic [1:0]  p_id;
  logic [7:0]  p_objs;
  logic        dt_busy;
  logic [2:0]  ext_set_done = '0;
  logic [2:0]  ext_allow;
  logic [7:0]  ext_set_objs [3];
  logic        block_start, tp_violation, sd_in_lp;
  logic [10:0] sm_powered_words;
  logic        sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0]  sd_ba;
  logic [10:0] sd_a;
  logic [31:0] sd_dq_o, sd_dq_i;

  xf_top dut (
    .clk, .rst_n,
    .cpu_req, .cpu_we, .cpu_be, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_rvalid, .cpu_err,
    .p_ready, .p_id, .p_objs, .dt_busy,
    .ext_set_done, .ext_allow, .ext_set_objs, .block_start, .tp_violation,
    .sm_powered_words, .sd_in_lp,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a,
    .sd_dq_o, .sd_dq_oe, .sd_dq_i
  );

  sdram_model mdl (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .a(sd_a), .dq_i(sd_dq_o), .dq_oe(sd_dq_oe), .dq_o(sd_dq_i)
  );

  // ---------------------------------------------------------------- checking
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- memory map
  localparam int G = 2;
  localparam logic [31:0] SPM  = 32'h1000_0000, SM = 32'h2000_0000;
  localparam logic [31:0] SMCR = 32'h3000_0000, CTL = 32'h4000_0000;
  // Streaming Memory region bases (words) at G = 2
  localparam int B_IN = 0, B_OUT = 64, B_MV = 256, B_DCT = 288, B_MCB = 480, B_MCF = 672;
  // SDRAM word addresses
  localparam int IN_BASE = 32'h0_0100, OUT_BASE = 32'h1_0040;
  localparam int REFB = 32'h2_0000, REFF = 32'h3_0000;
  localparam int NMB = 15, NBLK = 3, G0 = 5, g0 = 2;
  localparam int BOUND = 8000;

  // ---------------------------------------------------------------- workload data
  logic [31:0] in_data [NMB+2][32];
  logic [31:0] coef [32];
  logic [31:0] exp_out [NMB][96];

  function automatic int mvb(logic [31:0] w0);
    return REFB + int'(w0[3:0]) * 96;
  endfunction
  function automatic logic [31:0] mvf(logic [31:0] w1);
    return w1[0] ? 32'h8000_0000 : 32'(REFF + int'(w1[7:4]) * 96);
  endfunction
  function automatic logic [31:0] dct_of(logic [31:0] in_w, logic [31:0] c, int w);
    return (in_w ^ c) + 32'(w);
  endfunction

  // ---------------------------------------------------------------- bus model
  int unexpected_err = 0;
  task automatic bus_wr(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    cpu_req = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk);
    cpu_req = 0; cpu_we = 0;
    if (cpu_err) begin unexpected_err++; $display("bus error on write %h", a); end
  endtask
  task automatic bus_rd(logic [31:0] a, output logic [31:0] d, output logic e);
    @(negedge clk);
    cpu_req = 1; cpu_we = 0; cpu_addr = a;
    @(negedge clk);
    cpu_req = 0;
    d = cpu_rdata; e = cpu_err;
  endtask
  task automatic rd(logic [31:0] a, output logic [31:0] d);
    logic e;
    bus_rd(a, d, e);
    if (e) begin unexpected_err++; $display("bus error on read %h", a); end
  endtask
  function automatic logic [31:0] ins(smc_op_e op, bit rel, bit prev, region_e region,
                                      int sel, int tab, int words);
    return {op, 1'b0, rel, prev, 3'(region), 3'(sel), 10'(tab), 10'(words)};
  endfunction
  function automatic int msk(region_e r);
    return 1 << (10 + int'(r));
  endfunction

  // ---------------------------------------------------------------- mechanism counters
  int n_early = 0, n_rowcross = 0, n_smc_gate = 0, n_cpu_gate = 0, n_partial = 0;
  int n_barrier_wait = 0, n_viol = 0, n_skip = 0, n_rem0 = 0, n_gated_err = 0;
  int n_lp_cycles = 0;
  longint bs_t [$];
  bit running = 0;

  int last_col = 0, last_acc = -100, cyc = 0, prev_pw = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (p_ready && dt_busy) n_early++;
    // a burst crossing a row: column 255 accessed, then at once a new ACTIVE
    if (!sd_cs_n && sd_ras_n && !sd_cas_n) begin last_col = int'(sd_a[7:0]); last_acc = cyc; end
    if (!sd_cs_n && !sd_ras_n && sd_cas_n && sd_we_n && last_col == 255 && cyc - last_acc < 8)
      n_rowcross++;
    // the processor gates one slot (<= 96 words) at a time; larger drops are
    // whole regions gated by the controller
    if (prev_pw - int'(sm_powered_words) > 96) n_smc_gate++;
    prev_pw = int'(sm_powered_words);
    if (sm_powered_words != 0 && int'(sm_powered_words) < 864) n_partial++;
    if (running && !ext_allow[0] && !p_ready && !dt_busy) n_barrier_wait++;
    if (tp_violation) n_viol++;
    if (block_start) bs_t.push_back($time / 10);
    if (sd_in_lp) n_lp_cycles++;
  end

  // ---------------------------------------------------------------- other applications
  bit stop_apps = 0;
  int app_sets [3] = '{0, 0, 0};
  int app_rem = 0;
  for (genvar a = 1; a < 3; a++) begin : g_app
    initial begin
      wait (running);
      while (!stop_apps) begin
        @(negedge clk);
        if (ext_allow[a]) begin
          int d;
          if (ext_set_objs[a] < (a == 1 ? 8'd1 : 8'd3)) app_rem++;
          // application 1 is slow during the first block
          d = (a == 1 && bs_t.size() <= 1) ? 3600 : 200 + int'($urandom % 1200);
          repeat (d) @(negedge clk);
          ext_set_done[a] = 1'b1;
          @(negedge clk);
          ext_set_done[a] = 1'b0;
          app_sets[a]++;
          @(negedge clk);
        end
      end
    end
  end

  // ---------------------------------------------------------------- processor model
  int mb = 0;          // macroblocks decoded so far
  int mb_t2 = 0;
  bit gated_probe_done = 0;

  task automatic task1_p(int nobj);
    for (int o = 0; o < nobj; o++) begin
      logic [31:0] x [32];
      logic [31:0] c, e_d;
      logic e;
      for (int w = 0; w < 32; w++) rd(SM + 4 * (B_IN + o * 32 + w), x[w]);
      for (int w = 0; w < 96; w++) begin
        rd(SPM + 4 * (w % 32), c);
        bus_wr(SM + 4 * (B_DCT + o * 96 + w), dct_of(x[w % 32], c, w));
      end
      bus_wr(SM + 4 * (B_MV + o), mvb(x[0]));
      bus_wr(SM + 4 * (B_MV + 8 + o), mvf(x[1]));
      // input slot consumed: gate it
      bus_wr(CTL + 4 * 3, 32'(R_IN_STREAM * G + o));
      n_cpu_gate++;
      if (!gated_probe_done) begin
        bus_rd(SM + 4 * (B_IN + o * 32), e_d, e);
        check(e && e_d == 0, "read of a gated sub-region returns zero with a bus error");
        if (e) n_gated_err++;
        gated_probe_done = 1;
      end
    end
  endtask

  task automatic task2_p(int nobj);
    for (int o = 0; o < nobj; o++) begin
      logic [31:0] d [96];
      logic [31:0] b, f, mv1;
      rd(SM + 4 * (B_MV + 8 + o), mv1);
      for (int w = 0; w < 96; w++) rd(SM + 4 * (B_DCT + o * 96 + w), d[w]);
      for (int w = 0; w < 96; w++) begin
        rd(SM + 4 * (B_MCB + o * 96 + w), b);
        if (!mv1[31]) begin
          rd(SM + 4 * (B_MCF + o * 96 + w), f);
          b = 32'((33'(b) + 33'(f)) >> 1);
        end
        bus_wr(SM + 4 * (B_OUT + o * 96 + w), d[w] + b);
      end
      bus_wr(CTL + 4 * 3, 32'(R_DCT * G + o));
      bus_wr(CTL + 4 * 3, 32'(R_MC_B * G + o));
      bus_wr(CTL + 4 * 3, 32'(R_MC_F * G + o));
      n_cpu_gate += 3;
    end
    // the motion-vector table (slot 0 of MV) is dead once the set is done
    bus_wr(CTL + 4 * 3, 32'(R_MV * G));
    n_cpu_gate++;
  endtask

  // wait for the release of processing task `id`, via the STATUS register
  task automatic wait_release(int id, output int nobj);
    logic [31:0] s;
    do rd(CTL + 4 * 2, s); while (!s[12]);
    check(int'(s[9:8]) == id, $sformatf("released task %0d, expected %0d", s[9:8], id));
    nobj = int'(s[7:0]);
  endtask

  initial begin
    int nobj, out_errs;
    logic [31:0] v, st;
    // workload
    for (int k = 0; k < 32; k++) coef[k] = $urandom;
    for (int m = 0; m < NMB + 2; m++)
      for (int w = 0; w < 32; w++) begin
        in_data[m][w] = $urandom;
        if (w == 1) in_data[m][w][0] = (m % 3 == 0);   // every third MB: no forward ref
      end
    for (int k = 0; k < 16 * 96; k++) begin
      mdl.poke(REFB + k, $urandom);
      mdl.poke(REFF + k, $urandom);
    end
    for (int m = 0; m < NMB + 2; m++)
      for (int w = 0; w < 32; w++) mdl.poke(IN_BASE + m * 32 + w, in_data[m][w]);
    for (int m = 0; m < NMB; m++) begin
      logic [31:0] f1, b;
      f1 = mvf(in_data[m][1]);
      for (int w = 0; w < 96; w++) begin
        b = mdl.peek(mvb(in_data[m][0]) + w);
        if (!f1[31]) b = 32'((33'(b) + 33'(mdl.peek(int'(f1) + w))) >> 1);
        exp_out[m][w] = dct_of(in_data[m][w % 32], coef[w % 32], w) + b;
      end
      if (f1[31]) n_skip++;
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    // Scratch-Pad constants
    for (int k = 0; k < 32; k++) bus_wr(SPM + 4 * k, coef[k]);
    // controller program
    bus_wr(SMCR + 4 * 0, ins(OP_STORE, 0, 1, R_OUT_MB, 1, 0, 96));
    bus_wr(SMCR + 4 * 1, ins(OP_PWR_OFF, 0, 0, R_IN_STREAM, 0, 0, 0) | 32'(msk(R_OUT_MB)));
    bus_wr(SMCR + 4 * 2, ins(OP_PWR_ON, 0, 0, R_IN_STREAM, 0, 0, 0)
                         | 32'(msk(R_IN_STREAM) | msk(R_MV) | msk(R_DCT)));
    bus_wr(SMCR + 4 * 3, ins(OP_LOAD, 1, 0, R_IN_STREAM, 0, 0, 32));
    bus_wr(SMCR + 4 * 4, ins(OP_END, 0, 0, R_IN_STREAM, 0, 0, 0));
    bus_wr(SMCR + 4 * 5, ins(OP_PWR_ON, 0, 0, R_IN_STREAM, 0, 0, 0)
                         | 32'(msk(R_MC_B) | msk(R_MC_F) | msk(R_OUT_MB)));
    bus_wr(SMCR + 4 * 6, ins(OP_LOADI, 0, 0, R_MC_B, int'(R_MV), 0, 96));
    bus_wr(SMCR + 4 * 7, ins(OP_LOADI, 1, 0, R_MC_F, int'(R_MV), 8, 96));
    bus_wr(SMCR + 4 * 8, ins(OP_END, 0, 0, R_IN_STREAM, 0, 0, 0));
    rd(SMCR + 4 * 7, v);
    check(v == ins(OP_LOADI, 1, 0, R_MC_F, int'(R_MV), 8, 96), "program read-back");
    bus_wr(SMCR + 4 * 'h100, IN_BASE);
    bus_wr(SMCR + 4 * 'h101, OUT_BASE);
    bus_wr(SMCR + 4 * 'h110, 0);
    bus_wr(SMCR + 4 * 'h111, 5);
    // synchronization block: app0 G=5 g=2, app1 G=3 g=1, app2 G=4 g=3
    bus_wr(CTL + 4 * 'h08, G0);  bus_wr(CTL + 4 * 'h0C, g0);
    bus_wr(CTL + 4 * 'h09, 3);   bus_wr(CTL + 4 * 'h0D, 1);
    bus_wr(CTL + 4 * 'h0A, 4);   bus_wr(CTL + 4 * 'h0E, 3);
    bus_wr(CTL + 4 * 'h05, BOUND);
    bus_wr(CTL + 4 * 'h00, 32'h21);     // two task pairs, enable
    running = 1;

    // decode NMB macroblocks
    while (mb < NMB) begin
      wait_release(0, nobj);
      if (nobj < g0) n_rem0++;
      task1_p(nobj);
      bus_wr(CTL + 4 * 1, 0);
      wait_release(1, nobj);
      task2_p(nobj);
      bus_wr(CTL + 4 * 1, 0);
      mb += nobj;
    end
    // one more set: the processor returns at once, the transfer task is busy
    wait_release(0, nobj);
    bus_wr(CTL + 4 * 1, 0);
    wait_release(1, nobj);
    stop_apps = 1;
    repeat (20) @(posedge clk);

    // ---- results ----
    out_errs = 0;
    for (int m = 0; m < NMB; m++)
      for (int w = 0; w < 96; w++)
        if (mdl.peek(OUT_BASE + m * 96 + w) !== exp_out[m][w]) begin
          if (out_errs < 8)
            $display("FAIL: MB %0d word %0d = %h expected %h",
                     m, w, mdl.peek(OUT_BASE + m * 96 + w), exp_out[m][w]);
          out_errs++;
        end
    check(out_errs == 0, $sformatf("%0d output words differ", out_errs));
    check(mb == NMB, "all macroblocks decoded");
    check(unexpected_err == 0, $sformatf("%0d unexpected bus errors", unexpected_err));
    check(mdl.errors == 0, $sformatf("%0d SDRAM protocol errors", mdl.errors));
    rd(CTL + 4 * 2, st);
    check(!st[14], "controller error flag clear");
    // throughput: expected violations from the recorded block starts
    begin
      automatic int ev = 0;
      for (int i = 1; i < bs_t.size(); i++) if (bs_t[i] - bs_t[i-1] > longint'(BOUND)) ev++;
      rd(CTL + 4 * 'h11, v);
      check(n_viol == ev, $sformatf("violations %0d, expected %0d", n_viol, ev));
      check(int'(v[31:16]) == n_viol, "violation counter register");
      check(int'(v[15:0]) >= NBLK, $sformatf("blocks done %0d", v[15:0]));
    end
    rd(CTL + 4 * 'h12, v);
    check(int'(v[31:16]) >= n_rem0 && int'(v[15:0]) >= 2 * NBLK * 3,
          $sformatf("STAT2: remainder sets %0d, transfer tasks %0d", v[31:16], v[15:0]));
    rd(CTL + 4 * 'h10, v);
    check(int'(v[15:0]) == NBLK * 3, $sformatf("sets run %0d", v[15:0]));

    // ---- every mechanism must have happened ----
    $display("mechanisms: pd_entry=%0d pd_exit=%0d lp_cycles=%0d refresh=%0d page_hits=%0d row_cross=%0d",
             mdl.n_pd_entry, mdl.n_pd_exit, n_lp_cycles, mdl.n_ref, mdl.n_page_hits, n_rowcross);
    $display("mechanisms: early_start=%0d dt_stalls=%0d skip=%0d rem0=%0d rem_other=%0d barrier_wait=%0d",
             n_early, v[31:16], n_skip, n_rem0, app_rem, n_barrier_wait);
    $display("mechanisms: violations=%0d smc_gate=%0d cpu_gate=%0d gated_err=%0d partial_power=%0d",
             n_viol, n_smc_gate, n_cpu_gate, n_gated_err, n_partial);
    check(mdl.n_pd_entry > 0 && mdl.n_pd_exit > 0, "SDRAM low-power entry and exit");
    check(mdl.n_ref > 2, "refresh during operation");
    check(mdl.n_page_hits > 0, "page-mode accesses");
    check(n_rowcross > 0, "burst crossing a row boundary");
    check(n_early > 0, "processing task started before its transfer task ended");
    check(v[31:16] != 0, "transfer task stalled behind the previous one");
    check(n_skip > 0, "indirect load skipped an unused table entry");
    check(n_rem0 > 0 && app_rem > 0, "remainder sets");
    check(n_barrier_wait > 0, "wait at the synchronization barrier");
    check(n_viol > 0, "throughput violation detected");
    check(n_smc_gate > 0, "regions gated by the controller");
    check(n_cpu_gate > 0, "sub-regions gated by the processor");
    check(n_gated_err > 0, "bus error on a gated sub-region");
    check(n_partial > 0, "Streaming Memory partly powered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
