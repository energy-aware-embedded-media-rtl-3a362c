// tb_xf_bus_decoder - checks the processor bus address map: select lines and
// word addresses of the Scratch-Pad, Streaming Memory and SMC ranges, the read
// data multiplexer one cycle after the request, bus errors for unmapped or
// out-of-range addresses and for Streaming Memory faults, and the system
// control registers (reset values, CTRL, BOUND, G/g, doorbell and sub-region
// power pulses, STATUS and statistics read-back).
module tb_xf_bus_decoder;
  localparam int NSUB = 12, NAPPS = 3;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge: asynchronous reset from time 1

  logic cpu_req = 0, cpu_we = 0, cpu_rvalid, cpu_err;
  logic [31:0] cpu_addr = '0, cpu_wdata = '0, cpu_rdata;
  logic spm_en, sm_en, smc_en, sm_fault = 0;
  logic [8:0] spm_addr, smc_addr;
  logic [9:0] sm_addr;
  logic [31:0] spm_rdata, sm_rdata, smc_rdata;
  logic enable, p_done;
  logic [2:0] n_tasks;
  logic [NSUB-1:0] pwr_on, pwr_off;
  logic [15:0] cfg_G [NAPPS];
  logic [7:0] cfg_g [NAPPS];
  logic [31:0] bound;
  logic [7:0] st_objs = 8'h21;
  logic [1:0] st_task = 2'd1;
  logic st_p_ready = 1, st_smc_busy = 0, st_smc_err = 1, st_sd_lp = 1, st_sd_ready = 1;
  logic [NSUB-1:0] st_pwr = 12'hA5C;
  logic [31:0] stat0 = 32'h1234_5678, stat1 = 32'h9ABC_DEF0, stat2 = 32'h0F1E_2D3C;

  // memories answer with a tag of the address they saw, one cycle later
  always_ff @(posedge clk) begin
    spm_rdata <= 32'h1000_0000 | 32'(spm_addr);
    sm_rdata  <= 32'h2000_0000 | 32'(sm_addr);
    smc_rdata <= 32'h3000_0000 | 32'(smc_addr);
  end

  xf_bus_decoder #(.SPM_AW(9), .SM_AW(10), .SM_WORDS(864), .NSUB(NSUB), .NAPPS(NAPPS)) dut (.*);

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

  task automatic rd(logic [31:0] a, output logic [31:0] d, output logic e);
    @(negedge clk); cpu_req = 1; cpu_we = 0; cpu_addr = a;
    @(negedge clk); cpu_req = 0;
    d = cpu_rdata; e = cpu_err;
    check(cpu_rvalid, "rvalid one cycle after the request");
  endtask

  task automatic wr(logic [31:0] a, logic [31:0] d);
    @(negedge clk); cpu_req = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_req = 0; cpu_we = 0;
  endtask

  logic [31:0] d;
  logic e;
  int pulses_done = 0, pulses_on = 0, pulses_off = 0;
  always @(posedge clk) if (rst_n) begin
    if (p_done) pulses_done++;
    if (pwr_on == 12'b1 << 7) pulses_on++;
    if (pwr_off == 12'b1 << 3) pulses_off++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(!enable && n_tasks == 3'd1, "reset: disabled, one task pair");
    check(cfg_G[0] == 1 && cfg_g[0] == 1 && cfg_G[1] == 0 && cfg_G[2] == 0,
          "reset: application 0 alone, G = g = 1");
    rd(32'h1000_0000 + 4 * 37, d, e);
    check(!e && d == (32'h1000_0000 | 37), $sformatf("Scratch-Pad word 37 -> %h", d));
    rd(32'h1000_0000 + 4 * 512, d, e);
    check(e, "Scratch-Pad beyond 2 KB is an error");
    rd(32'h2000_0000 + 4 * 863, d, e);
    check(!e && d == (32'h2000_0000 | 863), $sformatf("Streaming Memory word 863 -> %h", d));
    rd(32'h2000_0000 + 4 * 864, d, e);
    check(e, "Streaming Memory beyond its last region is an error");
    rd(32'h3000_0000 + 4 * 9'h105, d, e);
    check(!e && d == (32'h3000_0000 | 9'h105), "SMC register 0x105");
    rd(32'h5000_0000, d, e);
    check(e, "unmapped range is an error");
    // Streaming Memory fault reported on the bus
    @(negedge clk); cpu_req = 1; cpu_we = 0; cpu_addr = 32'h2000_0010;
    @(negedge clk); cpu_req = 0; sm_fault = 1;
    #1 check(cpu_err, "gated Streaming Memory access reported as bus error");
    @(negedge clk); sm_fault = 0;
    // control registers
    wr(32'h4000_0000, 32'h21);
    check(enable && n_tasks == 3'd2, "CTRL write");
    rd(32'h4000_0000, d, e);
    check(d == 32'h21, "CTRL read-back");
    wr(32'h4000_0000 + 4 * 5, 32'd777);
    check(bound == 32'd777, "BOUND write");
    wr(32'h4000_0000 + 4 * 9, 32'd1092);
    wr(32'h4000_0000 + 4 * 13, 32'd64);
    check(cfg_G[1] == 16'd1092 && cfg_g[1] == 8'd64, "G_1 and g_1 write");
    rd(32'h4000_0000 + 4 * 9, d, e);
    check(d == 32'd1092, "G_1 read-back");
    wr(32'h4000_0000 + 4 * 1, 32'h0);
    wr(32'h4000_0000 + 4 * 3, 32'h8000_0007);
    wr(32'h4000_0000 + 4 * 3, 32'h0000_0003);
    check(pulses_done == 1 && pulses_on == 1 && pulses_off == 1, "doorbell and sub-region power pulses");
    rd(32'h4000_0000 + 4 * 2, d, e);
    check(d == {15'h0, 1'b1, 1'b1, 1'b1, 1'b0, 1'b1, 2'b00, 2'd1, 8'h21}, $sformatf("STATUS %h", d));
    rd(32'h4000_0000 + 4 * 4, d, e);
    check(d == 32'hA5C, "PWRSTATE");
    rd(32'h4000_0000 + 4 * 16, d, e);
    check(d == stat0, "STAT0");
    rd(32'h4000_0000 + 4 * 17, d, e);
    check(d == stat1, "STAT1");
    rd(32'h4000_0000 + 4 * 18, d, e);
    check(d == stat2 && !e, "STAT2");
    // a byte address that is not word aligned is refused
    rd(32'h1000_0002, d, e);
    check(e, "misaligned access answers with err");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
