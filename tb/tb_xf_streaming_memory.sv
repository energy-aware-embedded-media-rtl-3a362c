// tb_xf_streaming_memory - checks the region layout of the Streaming Memory
// (G = 2, MPEG2 region table), both ports, and sub-region power gating:
// accesses to gated sub-regions fault and read zero, the powered-word count
// follows the gates, and writes through one port are read through the other.
module tb_xf_streaming_memory;
  import xf_pkg::*;
  localparam int G = 2;
  localparam int WORDS_OBJ [6] = '{32, 96, 16, 96, 96, 96};

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // a real falling edge: asynchronous reset from time 1

  logic a_en = 0, a_we = 0, a_fault, b_en = 0, b_we = 0, b_fault;
  logic [3:0] a_be = 4'hF;
  logic [9:0] a_addr = '0;
  logic [31:0] a_wdata = '0, a_rdata, b_wdata = '0, b_rdata;
  logic [2:0] b_region = '0;
  logic [7:0] b_off = '0;
  logic [11:0] pwr_on = '0, pwr_off = '0, pwr_state;
  logic [10:0] powered_words;

  xf_streaming_memory #(.G(G)) dut (.*);

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

  function automatic int base(int r);
    int b = 0;
    for (int q = 0; q < r; q++) b += G * WORDS_OBJ[q];
    return b;
  endfunction

  function automatic logic [31:0] pat(int r, int o);
    return 32'(r * 32'h0100_0000 + o * 32'h0000_1001 + 32'h5A);
  endfunction

  task automatic a_read(int addr, output logic [31:0] d, output logic f);
    @(negedge clk); a_en = 1; a_we = 0; a_addr = 10'(addr);
    @(negedge clk); a_en = 0; d = a_rdata; f = a_fault;
  endtask

  task automatic b_write(int r, int o, logic [31:0] d);
    @(negedge clk); b_en = 1; b_we = 1; b_region = 3'(r); b_off = 8'(o); b_wdata = d;
    @(negedge clk); b_en = 0; b_we = 0;
  endtask

  logic [31:0] d;
  logic f;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(pwr_state == 0 && powered_words == 0, "all sub-regions gated after reset");
    a_read(0, d, f);
    check(f && d == 0, "read of a gated sub-region faults and returns zero");
    @(negedge clk) pwr_on = '1;
    @(negedge clk) pwr_on = '0;
    check(powered_words == 11'(G * 432), $sformatf("powered words %0d", powered_words));
    // fill every region through port B
    for (int r = 0; r < 6; r++)
      for (int o = 0; o < G * WORDS_OBJ[r]; o++) b_write(r, o, pat(r, o));
    // read back through port A at the linear address
    for (int r = 0; r < 6; r++)
      for (int o = 0; o < G * WORDS_OBJ[r]; o += 7) begin
        a_read(base(r) + o, d, f);
        check(!f && d == pat(r, o), $sformatf("region %0d word %0d = %h", r, o, d));
      end
    // gate sub-region 1 of region 1 (second decoded macroblock)
    @(negedge clk) pwr_off = 12'b1 << (1 * G + 1);
    @(negedge clk) pwr_off = '0;
    check(powered_words == 11'(G * 432 - 96), "gated sub-region leaves the powered count");
    a_read(base(1) + 96 + 5, d, f);
    check(f && d == 0, "gated object slot faults");
    a_read(base(1) + 95, d, f);
    check(!f && d == pat(1, 95), "neighbouring slot still powered and intact");
    // port B read, port A write
    @(negedge clk); a_en = 1; a_we = 1; a_addr = 10'(base(4) + 3); a_wdata = 32'hCAFE_0004;
    @(negedge clk); a_en = 0; a_we = 0;
    @(negedge clk); b_en = 1; b_region = 3'd4; b_off = 8'd3;
    @(negedge clk); b_en = 0;
    check(b_rdata == 32'hCAFE_0004 && !b_fault, "port A write visible on port B");
    // port B offset beyond the region faults
    @(negedge clk); b_en = 1; b_region = 3'd2; b_off = 8'(G * 16);
    @(negedge clk); b_en = 0;
    check(b_fault, "offset past the end of a region faults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
