// tb_xf_scratchpad - fills the 2 KB Scratch-Pad with random words, rewrites
// single bytes under byte enables and reads everything back against a
// reference copy, checking the one-cycle read latency.
module tb_xf_scratchpad;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0;
  logic [3:0] be = '0;
  logic [8:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] ref_mem [512];
  int checks = 0, failures = 0;

  xf_scratchpad dut (.clk, .en, .we, .be, .addr, .wdata, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, logic [31:0] d, logic [3:0] b);
    @(negedge clk);
    en = 1; we = 1; addr = 9'(a); wdata = d; be = b;
    for (int k = 0; k < 4; k++) if (b[k]) ref_mem[a][8*k +: 8] = d[8*k +: 8];
    @(negedge clk);
    en = 0; we = 0;
  endtask

  initial begin
    for (int a = 0; a < 512; a++) wr(a, $urandom, 4'hF);
    for (int n = 0; n < 200; n++) wr($urandom_range(0, 511), $urandom, 4'($urandom_range(1, 15)));
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      en = 1; we = 0; addr = 9'(a);
      @(negedge clk);   // one cycle later the word is on rdata
      en = 0;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("FAIL: word %0d = %h, expected %h", a, rdata, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
