// xf_top - Xtream-Fit data memory subsystem for streaming media processing.
//
// Replaces a processor's on-chip data cache with: a Scratch-Pad for constants
// and scalars; a region-organised, power-gated Streaming Memory for the
// low-reuse stream data; and a Streaming Memory Controller that runs the data
// transfer tasks of the application against off-chip mobile SDRAM, in
// page-mode bursts, while putting the SDRAM into low-power mode between them.
// The task scheduler interleaves data transfer tasks with the processor's
// processing tasks; the synchronization unit groups sets of objects into
// synchronization blocks shared with other applications of the device.
//
// Structure (blocks and their connections follow the platform figure of the
// document: Scratch-Pad, Streaming Memory and controller on the processor bus,
// controller to off-chip SDRAM):
//   cpu bus -> xf_bus_decoder -> xf_scratchpad
//                             -> xf_streaming_memory (port A)
//                             -> xf_smc registers
//   xf_sync_unit -> xf_task_sched -> xf_smc -> xf_streaming_memory (port B)
//                                           -> xf_sdram_ctrl -> SDRAM pins
// Application 0 of the synchronization unit is the application served by this
// subsystem; applications 1..NAPPS-1 (other threads or contexts with their own
// memory partitions) report finished sets on ext_set_done and read their
// permission on ext_allow / ext_set_objs.
//
// The processor learns that processing task p_id may run, on nobj = p_objs
// objects, from p_ready (also readable in the STATUS register), and reports
// completion by writing the DOORBELL register. Default sizes are those of the
// MPEG2 decoder configuration with task granularity G = 2.
//
// The assertions inside the SDRAM controller, the SMC and the task scheduler
// sample rst_n with the clock (`disable iff`), so lint also reports rst_n here
// as a net used both synchronously and asynchronously; no logic is affected.
module xf_top
  import xf_pkg::*;
#(
  parameter int unsigned G          = 2,
  parameter int unsigned SPM_BYTES  = 2048,
  parameter int unsigned NAPPS      = 3,
  parameter int unsigned SYNC_X     = 1,
  parameter int unsigned T_INIT     = 20000,
  parameter int unsigned T_REFI     = 1500,
  localparam int unsigned NSUB      = NREG * G,
  localparam int unsigned SM_WORDS  = G * 432,
  localparam int unsigned SM_AW     = $clog2(SM_WORDS),
  localparam int unsigned SM_OW     = $clog2(G * 96),
  localparam int unsigned SPM_AW    = $clog2(SPM_BYTES / BE_W),
  localparam int unsigned NTASK     = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // processor data bus
  input  logic                 cpu_req,
  input  logic                 cpu_we,
  input  logic [BE_W-1:0]      cpu_be,
  input  logic [31:0]          cpu_addr,
  input  logic [DATA_W-1:0]    cpu_wdata,
  output logic [DATA_W-1:0]    cpu_rdata,
  output logic                 cpu_rvalid,
  output logic                 cpu_err,
  // processing task release
  output logic                 p_ready,
  output logic [1:0]           p_id,
  output logic [7:0]           p_objs,
  output logic                 dt_busy,      // a data transfer task is running
  // other applications of the synchronization block
  input  logic [NAPPS-1:0]     ext_set_done,
  output logic [NAPPS-1:0]     ext_allow,
  output logic [7:0]           ext_set_objs [NAPPS],
  output logic                 block_start,
  output logic                 tp_violation,
  // energy observation
  output logic [SM_AW:0]       sm_powered_words,
  output logic                 sd_in_lp,
  // SDRAM pins
  output logic                 sd_cke,
  output logic                 sd_cs_n,
  output logic                 sd_ras_n,
  output logic                 sd_cas_n,
  output logic                 sd_we_n,
  output logic [SD_BANK_W-1:0] sd_ba,
  output logic [10:0]          sd_a,
  output logic [DATA_W-1:0]    sd_dq_o,
  output logic                 sd_dq_oe,
  input  logic [DATA_W-1:0]    sd_dq_i
);

  // bus decoder <-> memories
  logic              spm_en;
  logic [SPM_AW-1:0] spm_addr;
  logic [DATA_W-1:0] spm_rdata;
  logic              sma_en, sma_fault;
  logic [SM_AW-1:0]  sma_addr;
  logic [DATA_W-1:0] sma_rdata;
  logic              smcr_en;
  logic [8:0]        smcr_addr;
  logic [DATA_W-1:0] smcr_rdata;
  // control
  logic              enable, p_done;
  logic [2:0]        n_tasks;
  logic [NSUB-1:0]   cpu_pwr_on, cpu_pwr_off, smc_pwr_on, smc_pwr_off, pwr_state;
  logic [15:0]       cfg_G [NAPPS];
  logic [7:0]        cfg_g [NAPPS];
  logic [31:0]       bound;
  // sync / scheduler / SMC
  logic [NAPPS-1:0]  allow, set_done_v;
  logic [7:0]        set_objs [NAPPS];
  logic              sch_set_done;
  logic [7:0]        cur_objs;
  logic              smc_start, smc_busy, smc_first, smc_done, smc_err;
  logic [1:0]        smc_task;
  logic              lp_req;
  logic [15:0]       dt_stalls, sets_run, blocks_done, remainder_sets, violations;
  logic [15:0]       dts_done;     // data transfer tasks completed
  // SMC <-> Streaming Memory port B
  logic              smb_en, smb_we, smb_fault;
  logic [2:0]        smb_region;
  logic [SM_OW-1:0]  smb_off;
  logic [DATA_W-1:0] smb_wdata, smb_rdata;
  // SMC <-> SDRAM controller
  logic              sdq_valid, sdq_ready, sd_wvalid, sd_wtake, sd_rvalid, sd_init_done;
  sd_req_t           sdq;
  logic [DATA_W-1:0] sd_wdata, sd_rdata;

  xf_bus_decoder #(
    .SPM_AW(SPM_AW), .SM_AW(SM_AW), .SM_WORDS(SM_WORDS), .NSUB(NSUB),
    .NAPPS(NAPPS), .NTASK(NTASK)
  ) u_bus (
    .clk, .rst_n,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_rvalid, .cpu_err,
    .spm_en, .spm_addr, .spm_rdata,
    .sm_en(sma_en), .sm_addr(sma_addr), .sm_rdata(sma_rdata), .sm_fault(sma_fault),
    .smc_en(smcr_en), .smc_addr(smcr_addr), .smc_rdata(smcr_rdata),
    .enable, .n_tasks, .p_done, .pwr_on(cpu_pwr_on), .pwr_off(cpu_pwr_off),
    .cfg_G, .cfg_g, .bound,
    .st_objs(cur_objs), .st_task(p_id), .st_p_ready(p_ready),
    .st_smc_busy(smc_busy), .st_smc_err(smc_err), .st_sd_lp(sd_in_lp),
    .st_sd_ready(sd_init_done), .st_pwr(pwr_state),
    .stat0({dt_stalls, sets_run}), .stat1({violations, blocks_done}),
    .stat2({remainder_sets, dts_done})
  );

  xf_scratchpad #(.BYTES(SPM_BYTES)) u_spm (
    .clk, .en(spm_en), .we(cpu_we), .be(cpu_be), .addr(spm_addr),
    .wdata(cpu_wdata), .rdata(spm_rdata)
  );

  xf_streaming_memory #(.G(G)) u_sm (
    .clk, .rst_n,
    .a_en(sma_en), .a_we(cpu_we), .a_be(cpu_be), .a_addr(sma_addr),
    .a_wdata(cpu_wdata), .a_rdata(sma_rdata), .a_fault(sma_fault),
    .b_en(smb_en), .b_we(smb_we), .b_region(smb_region), .b_off(smb_off),
    .b_wdata(smb_wdata), .b_rdata(smb_rdata), .b_fault(smb_fault),
    .pwr_on(cpu_pwr_on | smc_pwr_on), .pwr_off(cpu_pwr_off | smc_pwr_off),
    .pwr_state, .powered_words(sm_powered_words)
  );

  always_comb begin
    set_done_v    = ext_set_done;
    set_done_v[0] = sch_set_done;
  end

  xf_sync_unit #(.NAPPS(NAPPS), .X(SYNC_X)) u_sync (
    .clk, .rst_n, .enable, .cfg_G, .cfg_g, .bound,
    .set_done(set_done_v), .allow, .set_objs,
    .block_start, .blocks_done, .remainder_sets,
    .violation(tp_violation), .violations
  );

  assign ext_allow    = allow;
  assign ext_set_objs = set_objs;

  xf_task_sched #(.NTASK(NTASK)) u_sched (
    .clk, .rst_n, .enable, .n_tasks,
    .allow(allow[0]), .set_objs(set_objs[0]), .set_done(sch_set_done), .cur_objs,
    .smc_start, .smc_task_id(smc_task), .smc_busy, .smc_first_obj(smc_first),
    .p_ready, .p_id, .p_done, .lp_req, .dt_stalls, .sets_run
  );
  assign p_objs  = cur_objs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        dts_done <= '0;
    else if (smc_done) dts_done <= dts_done + 16'd1;
  end
  assign dt_busy = smc_busy;

  xf_smc #(.G(G), .NTASK(NTASK)) u_smc (
    .clk, .rst_n,
    .reg_en(smcr_en), .reg_we(cpu_we), .reg_addr(smcr_addr), .reg_wdata(cpu_wdata),
    .reg_rdata(smcr_rdata),
    .start(smc_start), .task_id(smc_task), .nobj(cur_objs),
    .busy(smc_busy), .first_obj(smc_first), .done(smc_done), .err(smc_err),
    .sm_en(smb_en), .sm_we(smb_we), .sm_region(smb_region), .sm_off(smb_off),
    .sm_wdata(smb_wdata), .sm_rdata(smb_rdata), .sm_fault(smb_fault),
    .pwr_on(smc_pwr_on), .pwr_off(smc_pwr_off),
    .sd_req_valid(sdq_valid), .sd_req(sdq), .sd_req_ready(sdq_ready),
    .sd_wr_data(sd_wdata), .sd_wr_valid(sd_wvalid), .sd_wr_take(sd_wtake),
    .sd_rd_data(sd_rdata), .sd_rd_valid(sd_rvalid)
  );

  xf_sdram_ctrl #(.T_INIT(T_INIT), .T_REFI(T_REFI)) u_sdc (
    .clk, .rst_n,
    .req_valid(sdq_valid), .req(sdq), .req_ready(sdq_ready),
    .wr_data(sd_wdata), .wr_valid(sd_wvalid), .wr_take(sd_wtake),
    .rd_data(sd_rdata), .rd_valid(sd_rvalid),
    .lp_req, .in_lp(sd_in_lp), .init_done(sd_init_done),
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a,
    .sd_dq_o, .sd_dq_oe, .sd_dq_i
  );

endmodule
