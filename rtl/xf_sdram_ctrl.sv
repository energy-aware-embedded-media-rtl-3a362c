// xf_sdram_ctrl - single-data-rate mobile SDRAM controller with page-mode
// bursts and software-directed low-power mode.
//
// The data transfer tasks of the Streaming Memory Controller move whole
// stream segments, laid out sequentially in SDRAM, so every transfer is a
// run of consecutive words. This controller opens the row once (ACTIVE),
// issues one READ or WRITE per cycle to consecutive columns (page mode, burst
// length 1), and closes the row (PRECHARGE) at the end of the run or at the
// end of the row, reopening the next row if the run continues. Every burst
// closes its row, so the device idles with all banks precharged.
//
// Low-power policy (from the document): the SDRAM is put into its single
// low-power mode as soon as a data transfer task ends and woken just before
// the next one starts. Here lp_req = 1 asks for power-down (CKE low) whenever
// the controller is idle; a request arriving while powered down first raises
// CKE and waits T_XP cycles. Periodic AUTO REFRESH wakes the device when due.
// The exit latency of "a few cycles" is from the document; every timing
// number below is this design's assumption, in clock cycles.
//
// Interface: req_valid/req_ready handshake accepts one burst {we, addr, len}.
// Writes pull data with wr_take (one word per cycle while wr_valid is high);
// reads return rd_valid/rd_data, CL+1 cycles after the READ command. The
// pins are registered; dq is split into dq_o / dq_oe / dq_i for an external
// pad. Reset runs the power-up sequence (T_INIT wait, PRECHARGE ALL, two
// AUTO REFRESH, LOAD MODE REGISTER).
//
// Simulation-only assertions at the end of the module check the protocol
// rules named there. They switch off during reset with `disable iff
// (!rst_n)`, so rst_n is also sampled by the clock; lint reports this as a
// net used both synchronously and asynchronously, which affects no logic.
module xf_sdram_ctrl
  import xf_pkg::*;
#(
  parameter int unsigned T_INIT = 20000,  // power-up wait (200 us at 100 MHz)
  parameter int unsigned T_RCD  = 2,
  parameter int unsigned T_RP   = 2,
  parameter int unsigned T_RFC  = 8,
  parameter int unsigned T_WR   = 2,
  parameter int unsigned T_MRD  = 2,
  parameter int unsigned T_XP   = 2,      // power-down exit latency
  parameter int unsigned T_REFI = 1500,   // average refresh interval
  parameter int unsigned CL     = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // burst request
  input  logic                 req_valid,
  input  sd_req_t              req,
  output logic                 req_ready,
  input  logic [DATA_W-1:0]    wr_data,
  input  logic                 wr_valid,
  output logic                 wr_take,
  output logic [DATA_W-1:0]    rd_data,
  output logic                 rd_valid,
  // power policy
  input  logic                 lp_req,
  output logic                 in_lp,
  output logic                 init_done,
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

  typedef enum logic [3:0] {
    S_INIT, S_INIT_PRE, S_INIT_REF1, S_INIT_REF2, S_INIT_MRS,
    S_IDLE, S_PD, S_PD_EXIT, S_REF, S_ACT, S_BURST, S_WREC, S_PRE
  } state_e;

  state_e                state;
  logic [15:0]           tmr;
  logic [15:0]           ref_cnt;
  logic                  ref_due;
  logic                  cur_we;
  logic [SD_ADDR_W-1:0]  cur_addr;
  logic [15:0]           remaining;
  logic [CL:0]           rd_pipe;   // read commands in flight

  wire [SD_BANK_W-1:0] cur_bank = cur_addr[SD_ADDR_W-1 -: SD_BANK_W];
  wire [SD_ROW_W-1:0]  cur_row  = cur_addr[SD_COL_W +: SD_ROW_W];
  wire [SD_COL_W-1:0]  cur_col  = cur_addr[SD_COL_W-1:0];
  wire                 last_col = &cur_col;

  assign req_ready = (state == S_IDLE) && !ref_due;
  assign in_lp     = (state == S_PD);
  assign wr_take   = (state == S_BURST) && cur_we && wr_valid && tmr == 0;

  always_ff @(posedge clk or negedge rst_n) begin
    sd_cmd_e cmd;
    cmd = SD_NOP;
    if (!rst_n) begin
      state     <= S_INIT;
      tmr       <= 16'(T_INIT);
      ref_cnt   <= '0;
      ref_due   <= 1'b0;
      cur_we    <= 1'b0;
      cur_addr  <= '0;
      remaining <= '0;
      rd_pipe   <= '0;
      rd_valid  <= 1'b0;
      rd_data   <= '0;
      init_done <= 1'b0;
      sd_cke    <= 1'b1;
      {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= SD_NOP;
      sd_ba     <= '0;
      sd_a      <= '0;
      sd_dq_o   <= '0;
      sd_dq_oe  <= 1'b0;
    end else begin
      cmd = SD_NOP;
      sd_dq_oe <= 1'b0;

      // read data return
      rd_pipe  <= {rd_pipe[CL-1:0], 1'b0};
      rd_valid <= rd_pipe[CL];
      if (rd_pipe[CL]) rd_data <= sd_dq_i;

      // refresh interval
      if (init_done) begin
        if (ref_cnt >= 16'(T_REFI - 1)) begin
          ref_cnt <= '0;
          ref_due <= 1'b1;
        end else begin
          ref_cnt <= ref_cnt + 16'd1;
        end
      end

      if (tmr != 0) begin
        tmr <= tmr - 16'd1;
      end else begin
        unique case (state)
          S_INIT: begin
            cmd = SD_PRE;
            sd_a <= 11'h400;             // A10: all banks
            tmr <= 16'(T_RP - 1);
            state <= S_INIT_PRE;
          end
          S_INIT_PRE: begin
            cmd = SD_REF;
            tmr <= 16'(T_RFC - 1);
            state <= S_INIT_REF1;
          end
          S_INIT_REF1: begin
            cmd = SD_REF;
            tmr <= 16'(T_RFC - 1);
            state <= S_INIT_REF2;
          end
          S_INIT_REF2: begin
            cmd = SD_MRS;
            sd_ba <= '0;
            sd_a  <= 11'((CL & 7) << 4);  // sequential, burst length 1
            tmr <= 16'(T_MRD - 1);
            state <= S_INIT_MRS;
          end
          S_INIT_MRS: begin
            init_done <= 1'b1;
            state <= S_IDLE;
          end
          S_IDLE: begin
            if (ref_due) begin
              cmd = SD_REF;
              ref_due <= 1'b0;
              tmr <= 16'(T_RFC - 1);
              state <= S_REF;
            end else if (req_valid) begin
              cur_we    <= req.we;
              cur_addr  <= req.addr;
              remaining <= req.len;
              state     <= (req.len == 0) ? S_IDLE : S_ACT;
            end else if (lp_req && rd_pipe == '0) begin
              sd_cke <= 1'b0;
              state  <= S_PD;
            end
          end
          S_PD: begin
            if (req_valid || ref_due || !lp_req) begin
              sd_cke <= 1'b1;
              tmr    <= 16'(T_XP - 1);
              state  <= S_PD_EXIT;
            end
          end
          S_PD_EXIT: state <= S_IDLE;
          S_REF:     state <= S_IDLE;
          S_ACT: begin
            cmd = SD_ACT;
            sd_ba <= cur_bank;
            sd_a  <= cur_row;
            tmr   <= 16'(T_RCD - 1);
            state <= S_BURST;
          end
          S_BURST: begin
            if (!cur_we || wr_valid) begin
              cmd = cur_we ? SD_WR : SD_RD;
              sd_ba <= cur_bank;
              sd_a  <= 11'(cur_col);        // A10 = 0: no auto precharge
              if (cur_we) begin
                sd_dq_o  <= wr_data;
                sd_dq_oe <= 1'b1;
              end else begin
                rd_pipe[0] <= 1'b1;
              end
              cur_addr  <= cur_addr + 1'b1;
              remaining <= remaining - 16'd1;
              if (remaining == 16'd1 || last_col) begin
                tmr   <= cur_we ? 16'(T_WR - 1) : 16'd0;
                state <= S_WREC;
              end
            end
          end
          S_WREC: begin
            cmd = SD_PRE;
            sd_a  <= 11'h400;
            tmr   <= 16'(T_RP - 1);
            state <= S_PRE;
          end
          S_PRE: state <= (remaining != 0) ? S_ACT : S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
      {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= cmd;
    end
  end

  // ---- protocol rules, checked in simulation ----
  // only NOP/deselect while the clock is disabled (power-down)
  a_pd_nop: assert property (@(posedge clk) disable iff (!rst_n)
      !sd_cke |-> (sd_cs_n || {sd_ras_n, sd_cas_n, sd_we_n} == 3'b111));
  // no request is accepted before the power-up sequence has finished
  a_ready_init: assert property (@(posedge clk) disable iff (!rst_n)
      req_ready |-> init_done);

endmodule
