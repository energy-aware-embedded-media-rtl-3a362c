// tb_xf_sdram_ctrl - self-checking test of the SDRAM controller against the
// behavioural SDRAM model: power-up sequence, a write burst that crosses a
// row boundary, its read-back (data, page-mode rate and first-word latency),
// power-down entry and exit under lp_req, and refresh while powered down.
module tb_xf_sdram_ctrl;
  import xf_pkg::*;

  localparam int T_RCD = 2, CL = 2;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge: asynchronous reset from time 1

  logic req_valid, req_ready, wr_valid, wr_take, rd_valid, lp_req, in_lp, init_done;
  sd_req_t req;
  logic [31:0] wr_data, rd_data;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0] sd_ba;
  logic [10:0] sd_a;
  logic [31:0] sd_dq_o, sd_dq_i;

  xf_sdram_ctrl #(.T_INIT(50), .T_REFI(200), .T_RCD(T_RCD), .CL(CL)) dut (
    .clk, .rst_n, .req_valid, .req, .req_ready, .wr_data, .wr_valid, .wr_take,
    .rd_data, .rd_valid, .lp_req, .in_lp, .init_done,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a,
    .sd_dq_o, .sd_dq_oe, .sd_dq_i
  );

  sdram_model #(.CL(CL), .T_RCD(T_RCD)) mdl (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .a(sd_a), .dq_i(sd_dq_o), .dq_oe(sd_dq_oe), .dq_o(sd_dq_i)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 20;
  localparam int BASE = (1 << 8) * 5 + 246;  // row 5, column 246: crosses into row 6
  logic [31:0] pat [N];
  int wi, ri, t_acc, t_first, t_last, refs0;

  // write data source
  always_comb wr_data = pat[wi < N ? wi : 0];
  always @(posedge clk) if (wr_take) wi <= wi + 1;
  always @(posedge clk) if (rd_valid) begin
    check(rd_data == pat[ri], $sformatf("read word %0d = %h, expected %h", ri, rd_data, pat[ri]));
    if (ri == 0) t_first = $time / 10;
    t_last = $time / 10;
    ri <= ri + 1;
  end

  initial begin
    for (int k = 0; k < N; k++) pat[k] = $urandom;
    req_valid = 0; wr_valid = 0; lp_req = 0; req = '0; wi = 0; ri = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    check(mdl.n_ref == 2, "two refreshes during power-up");
    // ---- write burst ----
    @(negedge clk);
    wr_valid = 1;
    req = '{we: 1'b1, addr: SD_ADDR_W'(BASE), len: 16'(N)};
    req_valid = 1;
    while (!req_ready) @(negedge clk);
    @(negedge clk) req_valid = 0;
    wait (wi == N);
    wr_valid = 0;
    repeat (10) @(posedge clk);
    for (int k = 0; k < N; k++)
      check(mdl.peek(BASE + k) == pat[k], $sformatf("SDRAM word %0d written", k));
    check(mdl.n_act == 2, "row crossing reopens the next row (2 ACT)");
    // ---- read burst ----
    @(negedge clk);
    req = '{we: 1'b0, addr: SD_ADDR_W'(BASE), len: 16'(N)};
    req_valid = 1;
    while (!req_ready) @(negedge clk);
    t_acc = $time / 10;
    @(negedge clk) req_valid = 0;
    wait (ri == N);
    // accept edge -> ACT -> tRCD -> READ -> CL+1 cycles to rd_valid
    check(t_first - t_acc == 1 + T_RCD + CL + 1 + 1,
          $sformatf("first read word latency %0d cycles", t_first - t_acc));
    // 10 words in row 5, precharge/activate gap, 10 in row 6
    check(t_last - t_first == N - 1 + 1 + 2 + T_RCD,
          $sformatf("burst span %0d cycles", t_last - t_first));
    check(mdl.n_page_hits >= 2 * (N - 2), "page-mode accesses without re-activation");
    // ---- low-power mode ----
    repeat (5) @(posedge clk);
    refs0 = mdl.n_ref;
    lp_req = 1;
    repeat (5) @(posedge clk);
    check(in_lp && !sd_cke, "power-down entered when idle and lp_req");
    repeat (1000) @(posedge clk);
    check(mdl.n_ref - refs0 >= 4, "refresh continues while in low-power mode");
    check(in_lp, "returns to power-down after refresh");
    // request while powered down wakes the device
    ri = 0;
    @(negedge clk);
    req = '{we: 1'b0, addr: SD_ADDR_W'(BASE), len: 16'(4)};
    req_valid = 1;
    while (!req_ready) @(negedge clk);
    @(negedge clk) req_valid = 0;
    wait (ri == 4);
    repeat (10) @(posedge clk);
    check(in_lp, "back in power-down after the burst");
    check(mdl.n_pd_exit >= 5, "power-down exits counted");
    check(mdl.errors == 0, $sformatf("SDRAM protocol errors: %0d", mdl.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
