// xf_task_sched - dynamic scheduler of data transfer and processing tasks.
//
// The application is decomposed into a chain of task pairs
// DT_0 -> P_0 -> DT_1 -> P_1 -> ... (for the MPEG2 decoder: Task1_DT, Task1_P,
// Task2_DT, Task2_P). One pass over the chain processes one "set" of nobj basic
// data objects (the task granularity g). The scheduling rules follow the
// document:
//  * processing task P_j may start as soon as the first object of DT_j is in
//    the Streaming Memory (SMC first_obj), not when DT_j has finished;
//  * DT_{j+1} is started when P_j completes (the processor writes a doorbell,
//    p_done); DT_0 of the next set starts when the synchronization unit allows
//    another set (allow);
//  * the SDRAM is asked into its low-power mode whenever no data transfer task
//    is running (lp_req), and woken as the next one starts.
// Should P_j finish while DT_j is still running (the document relies on task
// delays to rule this out), DT_{j+1} waits for the controller; such waits are
// counted in dt_stalls. The counters are this design's addition.
//
// Interface: all inputs are sampled on the rising clock edge; smc_start and
// set_done are one-cycle pulses; p_ready stays high from release of P_j until
// its p_done. A set starts at the earliest two cycles after the previous
// set_done, so that the synchronization unit has updated allow.
//
// Simulation-only assertions at the end of the module check the protocol
// rules named there. They switch off during reset with `disable iff
// (!rst_n)`, so rst_n is also sampled by the clock; lint reports this as a
// net used both synchronously and asynchronously, which affects no logic.
module xf_task_sched #(
  parameter int unsigned NTASK = 4,
  localparam int unsigned TW = $clog2(NTASK)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic [TW:0]   n_tasks,      // task pairs in the chain, 1..NTASK
  // synchronization unit
  input  logic          allow,
  input  logic [7:0]    set_objs,
  output logic          set_done,
  output logic [7:0]    cur_objs,
  // Streaming Memory Controller
  output logic          smc_start,
  output logic [TW-1:0] smc_task_id,
  input  logic          smc_busy,
  input  logic          smc_first_obj,
  // processor
  output logic          p_ready,
  output logic [TW-1:0] p_id,
  input  logic          p_done,
  // SDRAM power policy
  output logic          lp_req,
  // statistics
  output logic [15:0]   dt_stalls,
  output logic [15:0]   sets_run
);

  typedef enum logic [2:0] {T_IDLE, T_GAP, T_START_DT, T_DT_RUN, T_P_RUN} tstate_e;
  tstate_e      st;
  logic [TW-1:0] cur;

  assign smc_task_id = cur;
  assign p_id        = cur;
  assign smc_start   = (st == T_START_DT) && !smc_busy;
  assign lp_req      = !(smc_busy || smc_start);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= T_IDLE;
      cur       <= '0;
      cur_objs  <= '0;
      p_ready   <= 1'b0;
      set_done  <= 1'b0;
      dt_stalls <= '0;
      sets_run  <= '0;
    end else begin
      set_done <= 1'b0;
      unique case (st)
        T_IDLE: if (enable && allow && n_tasks != 0) begin
          cur      <= '0;
          cur_objs <= set_objs;
          st       <= T_START_DT;
        end
        T_GAP: st <= T_IDLE;
        T_START_DT: begin
          if (smc_busy) dt_stalls <= dt_stalls + 16'd1;
          else          st <= T_DT_RUN;
        end
        T_DT_RUN: if (smc_first_obj) begin
          p_ready <= 1'b1;
          st      <= T_P_RUN;
        end
        T_P_RUN: if (p_done) begin
          p_ready <= 1'b0;
          if ((TW+1)'(cur) + 1'b1 < n_tasks) begin
            cur <= cur + 1'b1;
            st  <= T_START_DT;
          end else begin
            set_done <= 1'b1;
            sets_run <= sets_run + 16'd1;
            st       <= T_GAP;
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  // ---- scheduling rule, checked in simulation ----
  // a transfer task is only started on an idle controller
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
      smc_start |-> !smc_busy);

endmodule
