// tb_xf_smc - runs data transfer task programs on the Streaming Memory
// Controller, connected to a real Streaming Memory (G = 2), the SDRAM
// controller and the behavioural SDRAM. Checks: a sequential LOAD of two
// 32-word objects lands in the input region, advances the stream pointer and
// signals first_obj after the first object; a LOADI fetches one
// motion-compensation block from the address in the table region and skips
// the slot marked "no object"; a STORE writes the output region back to its
// stream; PWR_ON/PWR_OFF change region power; a STORE from a gated region
// raises err; transfer time is close to one word per cycle (page mode).
module tb_xf_smc;
  import xf_pkg::*;
  localparam int G = 2;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge: asynchronous reset from time 1

  // register bus
  logic reg_en = 0, reg_we = 0;
  logic [8:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic start = 0, busy, first_obj, done, err;
  logic [1:0] task_id = '0;
  logic [7:0] nobj = 8'd2;
  // SM
  logic sm_en, sm_we, sm_fault;
  logic [2:0] sm_region;
  logic [7:0] sm_off;
  logic [31:0] sm_wdata, sm_rdata;
  logic [11:0] pwr_on, pwr_off, pwr_state;
  logic [10:0] powered_words;
  logic a_en = 0, a_we = 0, a_fault;
  logic [9:0] a_addr = '0;
  logic [31:0] a_wdata = '0, a_rdata;
  // SDRAM
  logic sd_req_valid, sd_req_ready, sd_wr_valid, sd_wr_take, sd_rd_valid, in_lp, init_done;
  sd_req_t sd_req;
  logic [31:0] sd_wr_data, sd_rd_data;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0] sd_ba;
  logic [10:0] sd_a;
  logic [31:0] sd_dq_o, sd_dq_i;

  xf_smc #(.G(G)) dut (.*);

  xf_streaming_memory #(.G(G)) u_sm (
    .clk, .rst_n, .a_en, .a_we, .a_be(4'hF), .a_addr, .a_wdata, .a_rdata, .a_fault,
    .b_en(sm_en), .b_we(sm_we), .b_region(sm_region), .b_off(sm_off), .b_wdata(sm_wdata),
    .b_rdata(sm_rdata), .b_fault(sm_fault), .pwr_on, .pwr_off, .pwr_state, .powered_words
  );

  xf_sdram_ctrl #(.T_INIT(20), .T_REFI(400)) u_sdc (
    .clk, .rst_n, .req_valid(sd_req_valid), .req(sd_req), .req_ready(sd_req_ready),
    .wr_data(sd_wr_data), .wr_valid(sd_wr_valid), .wr_take(sd_wr_take),
    .rd_data(sd_rd_data), .rd_valid(sd_rd_valid), .lp_req(!busy), .in_lp, .init_done,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a,
    .sd_dq_o, .sd_dq_oe, .sd_dq_i
  );

  sdram_model mdl (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .a(sd_a), .dq_i(sd_dq_o), .dq_oe(sd_dq_oe), .dq_o(sd_dq_i)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ins(smc_op_e op, int region, int sel, int tab, int words);
    return {op, 1'b0, ((op == OP_LOAD) ? 1'b1 : 1'b0), 1'b0, 3'(region), 3'(sel), 10'(tab), 10'(words)};
  endfunction

  task automatic reg_wr(int a, logic [31:0] d);
    @(negedge clk); reg_en = 1; reg_we = 1; reg_addr = 9'(a); reg_wdata = d;
    @(negedge clk); reg_en = 0; reg_we = 0;
  endtask
  task automatic reg_rd(int a, output logic [31:0] d);
    @(negedge clk); reg_en = 1; reg_we = 0; reg_addr = 9'(a);
    @(negedge clk); reg_en = 0; d = reg_rdata;
  endtask
  task automatic sm_wr(int a, logic [31:0] d);
    @(negedge clk); a_en = 1; a_we = 1; a_addr = 10'(a); a_wdata = d;
    @(negedge clk); a_en = 0; a_we = 0;
  endtask
  task automatic sm_rd(int a, output logic [31:0] d);
    @(negedge clk); a_en = 1; a_we = 0; a_addr = 10'(a);
    @(negedge clk); a_en = 0; d = a_rdata;
  endtask

  int t_start, t_first, t_done;
  always @(posedge clk) if (rst_n) begin
    if (first_obj) t_first = $time / 10;
    if (done) t_done = $time / 10;
  end
  task automatic run(int id, int n);
    @(negedge clk); task_id = 2'(id); nobj = 8'(n); start = 1;
    t_start = $time / 10;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
  endtask

  localparam int IN_BASE = 32'h0000_0100, OUT_BASE = 32'h0004_0000, REF = 32'h0002_0000;
  // region bases (words) for G = 2
  localparam int B_IN = 0, B_OUT = 64, B_MV = 256, B_MCB = 480;
  logic [31:0] d;

  initial begin
    for (int k = 0; k < 64; k++) mdl.poke(IN_BASE + k, 32'hA000_0000 + 32'(k * 3));
    for (int k = 0; k < 96; k++) mdl.poke(REF + k, 32'hB000_0000 + 32'(k));
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    // task 0: power input/MV/output regions, prefetch the input stream
    reg_wr(0, ins(OP_PWR_ON, 0, 0, 6'b000111, 0));
    reg_wr(1, ins(OP_LOAD, R_IN_STREAM, 0, 0, 32));
    reg_wr(2, ins(OP_END, 0, 0, 0, 0));
    // task 1: motion compensation fetch, write back, gate the output region
    reg_wr(3, ins(OP_PWR_ON, 0, 0, 6'b010000, 0));
    reg_wr(4, ins(OP_LOADI, R_MC_B, R_MV, 0, 96));
    reg_wr(5, ins(OP_STORE, R_OUT_MB, 1, 0, 96));
    reg_wr(6, ins(OP_PWR_OFF, 0, 0, 6'b000010, 0));
    reg_wr(7, ins(OP_END, 0, 0, 0, 0));
    // task 2: store from a gated region
    reg_wr(8, ins(OP_STORE, R_DCT, 2, 0, 16));
    reg_wr(9, ins(OP_END, 0, 0, 0, 0));
    reg_wr(9'h110, 0); reg_wr(9'h111, 3); reg_wr(9'h112, 8);
    reg_wr(9'h100, IN_BASE); reg_wr(9'h101, OUT_BASE); reg_wr(9'h102, 32'h6000);
    reg_rd(4, d);
    check(d == ins(OP_LOADI, R_MC_B, R_MV, 0, 96), "program read-back");

    run(0, 2);
    check(pwr_state == 12'b0000_0011_1111, $sformatf("power state after task 0: %b", pwr_state));
    for (int k = 0; k < 64; k++) begin
      sm_rd(B_IN + k, d);
      check(d == 32'hA000_0000 + 32'(k * 3), $sformatf("input word %0d = %h", k, d));
    end
    reg_rd(9'h100, d);
    check(d == IN_BASE + 64, "input stream pointer advanced by 64 words");
    check(t_first - t_start < t_done - t_start - 25, "first object signalled well before the end");
    check(t_done - t_start <= 64 + 20, $sformatf("64-word prefetch took %0d cycles", t_done - t_start));
    check(!err, "no error so far");

    // table: object 0 fetches REF, object 1 has no block
    sm_wr(B_MV + 0, REF);
    sm_wr(B_MV + 1, 32'h8000_0000);
    for (int k = 0; k < 192; k++) sm_wr(B_OUT + k, 32'hC000_0000 + 32'(k));
    run(1, 2);
    for (int k = 0; k < 96; k += 5) begin
      sm_rd(B_MCB + k, d);
      check(d == 32'hB000_0000 + 32'(k), $sformatf("MC block word %0d = %h", k, d));
    end
    for (int k = 0; k < 192; k++)
      check(mdl.peek(OUT_BASE + k) == 32'hC000_0000 + 32'(k), $sformatf("written back word %0d", k));
    check(pwr_state[3:2] == 2'b00 && pwr_state[9:8] == 2'b11, "output gated, MC_B powered");
    reg_rd(9'h101, d);
    check(d == OUT_BASE + 192, "output stream pointer advanced");
    check(!err, "no error after LOADI/STORE");

    run(2, 1);
    check(err, "store from a gated region flagged");
    reg_rd(9'h118, d);
    check(d[1] == 1'b1, "error visible in the status register");
    // an undefined opcode ends the task instead of hanging it
    reg_wr(40, 32'hC000_0000);
    reg_wr(9'h113, 40);
    run(3, 1);
    check(!busy, "undefined opcode ends the task");
    check(mdl.errors == 0, "SDRAM protocol clean");
    check(mdl.n_pd_entry >= 3, "SDRAM in low power between tasks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
