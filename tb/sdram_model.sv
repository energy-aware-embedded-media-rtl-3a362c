// sdram_model - behavioural model of a x32 single-data-rate mobile SDRAM
// (4 banks x 2048 rows x 256 columns), for simulation only.
//
// It decodes the command pins on each rising edge, keeps one open row per
// bank, returns read data so that it is stable CL clock edges after the READ
// command was sampled, and stores write data sampled with the WRITE command.
// It flags protocol errors: a command other than NOP while CKE is low, ACTIVE
// to an open bank, READ/WRITE to a closed bank, READ/WRITE earlier than T_RCD
// after ACTIVE, ACTIVE earlier than T_RP after PRECHARGE, and any command
// before the mode register was loaded except PRECHARGE/REFRESH. Counters
// report the activity the tests look for. Word address = {bank, row, col}.
module sdram_model #(
  parameter int CL    = 2,
  parameter int T_RCD = 2,
  parameter int T_RP  = 2
) (
  input  logic        clk,
  input  logic        cke,
  input  logic        cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [10:0] a,
  input  logic [31:0] dq_i,
  input  logic        dq_oe,
  output logic [31:0] dq_o
);
  logic [31:0] mem [int];
  logic        open_q [4];
  logic [10:0] row_q  [4];
  int          act_t  [4];
  int          pre_t  [4];
  int          cyc = 0;
  logic        cke_q = 1'b1;
  logic        mode_set = 1'b0;

  int errors = 0, n_act = 0, n_rd = 0, n_wr = 0, n_pre = 0, n_ref = 0;
  int n_pd_entry = 0, n_pd_exit = 0, n_pd_cycles = 0, n_page_hits = 0;

  logic [31:0] rpipe [CL];
  logic        prev_col_ok = 1'b0;

  initial begin
    for (int b = 0; b < 4; b++) begin
      open_q[b] = 1'b0; row_q[b] = '0; act_t[b] = -100; pre_t[b] = -100;
    end
    for (int k = 0; k < CL; k++) rpipe[k] = '0;
    dq_o = '0;
  end

  function automatic int waddr(logic [1:0] b, logic [10:0] r, logic [7:0] c);
    return int'({b, r, c});
  endfunction

  function automatic logic [31:0] peek(int addr);
    return mem.exists(addr) ? mem[addr] : 32'h0;
  endfunction

  task automatic poke(int addr, logic [31:0] d);
    mem[addr] = d;
  endtask

  always @(posedge clk) begin
    logic [3:0]  cmd;
    logic [31:0] rd;
    cyc++;
    cmd = {cs_n, ras_n, cas_n, we_n};
    rd  = '0;
    if (cke_q && !cke) n_pd_entry++;
    if (!cke_q && cke) n_pd_exit++;
    if (!cke) n_pd_cycles++;
    if (!cke && cmd != 4'b0111 && !cs_n) begin
      errors++;
      $display("SDRAM model: command %b while CKE low", cmd);
    end else if (cke && !cs_n) begin
      unique case (cmd)
        4'b0011: begin  // ACTIVE
          if (open_q[ba]) begin errors++; $display("SDRAM model: ACT to open bank %0d", ba); end
          if (cyc - pre_t[ba] < T_RP) begin errors++; $display("SDRAM model: tRP violated"); end
          if (!mode_set) begin errors++; $display("SDRAM model: ACT before mode set"); end
          open_q[ba] = 1'b1; row_q[ba] = a; act_t[ba] = cyc; n_act++;
          prev_col_ok = 1'b0;
        end
        4'b0101, 4'b0100: begin  // READ / WRITE
          if (!open_q[ba]) begin errors++; $display("SDRAM model: access to closed bank %0d", ba); end
          if (cyc - act_t[ba] < T_RCD) begin errors++; $display("SDRAM model: tRCD violated"); end
          if (prev_col_ok) n_page_hits++;
          prev_col_ok = 1'b1;
          if (we_n) begin
            rd = peek(waddr(ba, row_q[ba], a[7:0]));
            n_rd++;
          end else begin
            if (!dq_oe) begin errors++; $display("SDRAM model: WRITE without data"); end
            mem[waddr(ba, row_q[ba], a[7:0])] = dq_i;
            n_wr++;
          end
        end
        4'b0010: begin  // PRECHARGE
          for (int b = 0; b < 4; b++)
            if (a[10] || b == int'(ba)) begin open_q[b] = 1'b0; pre_t[b] = cyc; end
          n_pre++;
          prev_col_ok = 1'b0;
        end
        4'b0001: begin  // AUTO REFRESH
          for (int b = 0; b < 4; b++)
            if (open_q[b]) begin errors++; $display("SDRAM model: REF with open bank"); end
          n_ref++;
        end
        4'b0000: begin  // LOAD MODE REGISTER
          if (a[6:4] != 3'(CL)) begin errors++; $display("SDRAM model: wrong CAS latency"); end
          mode_set = 1'b1;
        end
        default: ;
      endcase
    end
    cke_q <= cke;
    // read data: stable CL edges after the READ was sampled
    rpipe[0] <= rd;
    for (int k = 1; k < CL; k++) rpipe[k] <= rpipe[k-1];
    dq_o <= rpipe[CL-2 < 0 ? 0 : CL-2];
  end
endmodule
