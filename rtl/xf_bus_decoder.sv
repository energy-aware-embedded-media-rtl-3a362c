// xf_bus_decoder - processor data bus interface of the data memory subsystem.
//
// The processor sees the Scratch-Pad, the Streaming Memory and the Streaming
// Memory Controller on one address/data bus, each in its own address range
// disjoint from off-chip main memory (the document maps the Scratch-Pad this
// way; the addresses below are this design's):
//   0x1000_0000  Scratch-Pad            (word array)
//   0x2000_0000  Streaming Memory       (regions back to back, word array)
//   0x3000_0000  SMC registers          (program, stream pointers, task entries)
//   0x4000_0000  system control registers, word offsets:
//       0x00 CTRL      rw [0] enable, [6:4] task pairs in the chain
//       0x01 DOORBELL  w  processing task finished (pulses p_done)
//       0x02 STATUS    r  [7:0] objects in set, [9:8] task, [12] p_ready,
//                         [13] SMC busy, [14] SMC error, [15] SDRAM in low power,
//                         [16] SDRAM power-up sequence finished
//       0x03 SMPWR     w  [31] 1 = power on / 0 = gate, [7:0] sub-region
//       0x04 PWRSTATE  r  sub-region power state
//       0x05 BOUND     rw throughput bound in cycles (0 = none)
//       0x08+a G_a     rw synchronization granularity of application a
//       0x0C+a g_a     rw task granularity of application a
//       0x10 STAT0     r  statistics word 0,  0x11 STAT1 r statistics word 1,
//       0x12 STAT2     r  statistics word 2
// Anything else, and any access whose byte address is not word aligned,
// answers with err.
//
// Timing: one request per cycle, no wait states; read data, and err for any
// access, return with rvalid one cycle after the request. The sub-region
// power command lets a processing task gate each object slot as soon as it
// has consumed it, the document's selective shut-down policy. Reset leaves
// the subsystem disabled, one task pair per chain, and application 0 alone
// with G = g = 1 (other applications G = 0, i.e. not taking part).
module xf_bus_decoder
  import xf_pkg::*;
#(
  parameter int unsigned SPM_AW = 9,
  parameter int unsigned SM_AW  = 10,
  parameter int unsigned SM_WORDS = 864,
  parameter int unsigned NSUB   = 12,
  parameter int unsigned NAPPS  = 3,
  parameter int unsigned NTASK  = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // processor bus
  input  logic               cpu_req,
  input  logic               cpu_we,
  input  logic [31:0]        cpu_addr,
  input  logic [DATA_W-1:0]  cpu_wdata,
  output logic [DATA_W-1:0]  cpu_rdata,
  output logic               cpu_rvalid,
  output logic               cpu_err,
  // Scratch-Pad
  output logic               spm_en,
  output logic [SPM_AW-1:0]  spm_addr,
  input  logic [DATA_W-1:0]  spm_rdata,
  // Streaming Memory port A
  output logic               sm_en,
  output logic [SM_AW-1:0]   sm_addr,
  input  logic [DATA_W-1:0]  sm_rdata,
  input  logic               sm_fault,
  // SMC registers
  output logic               smc_en,
  output logic [8:0]         smc_addr,
  input  logic [DATA_W-1:0]  smc_rdata,
  // control
  output logic               enable,
  output logic [$clog2(NTASK):0] n_tasks,
  output logic               p_done,
  output logic [NSUB-1:0]    pwr_on,
  output logic [NSUB-1:0]    pwr_off,
  output logic [15:0]        cfg_G [NAPPS],
  output logic [7:0]         cfg_g [NAPPS],
  output logic [31:0]        bound,
  // status
  input  logic [7:0]         st_objs,
  input  logic [1:0]         st_task,
  input  logic               st_p_ready,
  input  logic               st_smc_busy,
  input  logic               st_smc_err,
  input  logic               st_sd_lp,
  input  logic               st_sd_ready,
  input  logic [NSUB-1:0]    st_pwr,
  input  logic [31:0]        stat0,
  input  logic [31:0]        stat1,
  input  logic [31:0]        stat2
);

  typedef enum logic [2:0] {D_NONE, D_SPM, D_SM, D_SMC, D_CTRL, D_ERR} dsel_e;

  dsel_e             sel, sel_q;
  logic [25:0]       widx;
  logic [DATA_W-1:0] ctrl_rdata;
  logic              err_q;

  assign widx = cpu_addr[27:2];

  always_comb begin
    sel = D_NONE;
    if (cpu_req && cpu_addr[1:0] != 2'b00) begin
      sel = D_ERR;
    end else if (cpu_req) begin
      unique case (cpu_addr[31:28])
        4'h1:    sel = (widx < 26'(1 << SPM_AW)) ? D_SPM  : D_ERR;
        4'h2:    sel = (widx < 26'(SM_WORDS))    ? D_SM   : D_ERR;
        4'h3:    sel = (widx < 26'd512)          ? D_SMC  : D_ERR;
        4'h4:    sel = (widx < 26'h20)           ? D_CTRL : D_ERR;
        default: sel = D_ERR;
      endcase
    end
  end

  assign spm_en   = (sel == D_SPM);
  assign spm_addr = widx[SPM_AW-1:0];
  assign sm_en    = (sel == D_SM);
  assign sm_addr  = widx[SM_AW-1:0];
  assign smc_en   = (sel == D_SMC);
  assign smc_addr = widx[8:0];

  wire ctrl_wr = (sel == D_CTRL) && cpu_we;
  wire ctrl_rd = (sel == D_CTRL) && !cpu_we;
  wire [4:0] creg = widx[4:0];

  assign p_done = ctrl_wr && creg == 5'h01;

  always_comb begin
    pwr_on  = '0;
    pwr_off = '0;
    if (ctrl_wr && creg == 5'h03 && cpu_wdata[7:0] < 8'(NSUB)) begin
      if (cpu_wdata[31]) pwr_on[cpu_wdata[$clog2(NSUB)-1:0]]  = 1'b1;
      else               pwr_off[cpu_wdata[$clog2(NSUB)-1:0]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable     <= 1'b0;
      n_tasks    <= ($clog2(NTASK)+1)'(1);
      bound      <= '0;
      for (int a = 0; a < int'(NAPPS); a++) begin
        cfg_G[a] <= (a == 0) ? 16'd1 : 16'd0;
        cfg_g[a] <= 8'd1;
      end
      sel_q      <= D_NONE;
      ctrl_rdata <= '0;
      cpu_rvalid <= 1'b0;
      err_q      <= 1'b0;
    end else begin
      sel_q      <= sel;
      cpu_rvalid <= cpu_req;
      err_q      <= (sel == D_ERR);
      if (ctrl_wr) begin
        unique case (creg)
          5'h00: begin
            enable  <= cpu_wdata[0];
            n_tasks <= cpu_wdata[4 +: $clog2(NTASK)+1];
          end
          5'h05: bound <= cpu_wdata;
          default: begin
            for (int a = 0; a < int'(NAPPS); a++) begin
              if (creg == 5'(8 + a))  cfg_G[a] <= cpu_wdata[15:0];
              if (creg == 5'(12 + a)) cfg_g[a] <= cpu_wdata[7:0];
            end
          end
        endcase
      end
      if (ctrl_rd) begin
        ctrl_rdata <= '0;
        unique case (creg)
          5'h00: ctrl_rdata <= DATA_W'({n_tasks, 3'b000, enable});
          5'h02: ctrl_rdata <= DATA_W'({st_sd_ready, st_sd_lp, st_smc_err, st_smc_busy,
                                        st_p_ready, 2'b00, st_task, st_objs});
          5'h04: ctrl_rdata <= DATA_W'(st_pwr);
          5'h05: ctrl_rdata <= bound;
          5'h10: ctrl_rdata <= stat0;
          5'h11: ctrl_rdata <= stat1;
          5'h12: ctrl_rdata <= stat2;
          default: begin
            for (int a = 0; a < int'(NAPPS); a++) begin
              if (creg == 5'(8 + a))  ctrl_rdata <= DATA_W'(cfg_G[a]);
              if (creg == 5'(12 + a)) ctrl_rdata <= DATA_W'(cfg_g[a]);
            end
          end
        endcase
      end
    end
  end

  always_comb begin
    unique case (sel_q)
      D_SPM:   cpu_rdata = spm_rdata;
      D_SM:    cpu_rdata = sm_rdata;
      D_SMC:   cpu_rdata = smc_rdata;
      D_CTRL:  cpu_rdata = ctrl_rdata;
      default: cpu_rdata = '0;
    endcase
  end

  // a Streaming Memory access to a gated sub-region is reported as a bus error
  // one cycle later, together with the (zero) read data
  assign cpu_err = err_q || (sm_fault && sel_q == D_SM);

endmodule
