// xf_smc - Streaming Memory Controller: executes data transfer tasks.
//
// A data transfer task is a short program of stream instructions kept in a
// small program memory that the processor writes over the bus. The document
// describes a task such as the MPEG2 decoder's Task1_DT as one "store stream"
// instruction followed by one "load stream" instruction, with region power
// control done by the same controller; the instruction set here (LOAD, STORE,
// LOADI, PWR_ON, PWR_OFF, END, see xf_pkg::smc_instr_t) and its encoding are
// this design's own.
//
//  * LOAD  region, stream, words: prefetch nobj objects of `words` words from
//    the sequential stream whose SDRAM pointer is descriptor `stream` into the
//    region, as one page-mode burst; the pointer then advances.
//  * STORE region, stream, words: write the region's nobj objects back to the
//    sequential stream, likewise.
//  * LOADI region, table, offset, words: for each object o, read an SDRAM
//    address from word (offset + o) of the table region (filled in by a
//    processing task, e.g. from motion vectors) and fetch `words` words from
//    it; an address with bit 31 set means "no object" and is skipped. This
//    serves data-dependent fetches such as motion-compensation macroblocks.
//  * PWR_ON / PWR_OFF mask: power up / Vdd-gate all sub-regions of the
//    regions in the 6-bit mask.
//  * The two unused opcodes end the task and set the sticky error flag, as
//    does an instruction whose reserved bit 28 is set (it is otherwise
//    executed).
// Flag `prev` makes a LOAD/STORE/LOADI use the object count of the previous
// set instead of the current one: the write-back at the head of a task moves
// the outputs of the previous set, which may differ in size (remainder
// burst), and is skipped for the very first set. Flag `rel` marks the load
// whose first object releases the next processing task.
//
// nobj is the number of basic data objects of the current task, normally the
// task granularity g; it may be smaller for the remainder burst of a
// synchronization block. A task starts on `start` with its entry point taken
// from the task-entry register of `task_id`; `first_obj` pulses when the first
// object of the load flagged `rel` is in the Streaming Memory (so the next
// processing task may start early; for LOADI, a skipped slot counts as
// arrived), or at END if no load is flagged; `done` pulses at END.
//
// Register map (word offsets): 0x000-0x03F program, 0x100-0x107 stream
// pointers (SDRAM word addresses), 0x110-0x113 task entry points, 0x118
// status {err, busy}. Registers read with one cycle latency.
//
// Simulation-only assertions at the end of the module check the protocol
// rules named there. They switch off during reset with `disable iff
// (!rst_n)`, so rst_n is also sampled by the clock; lint reports this as a
// net used both synchronously and asynchronously, which affects no logic.
module xf_smc
  import xf_pkg::*;
#(
  parameter int unsigned G          = 2,
  parameter int unsigned PROG_DEPTH = 64,
  parameter int unsigned NSTREAM    = 8,
  parameter int unsigned NTASK      = 4,
  localparam int unsigned NSUB = NREG * G,
  localparam int unsigned OW   = $clog2(G * 384 / BE_W),
  localparam int unsigned PCW  = $clog2(PROG_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // register bus
  input  logic                 reg_en,
  input  logic                 reg_we,
  input  logic [8:0]           reg_addr,
  input  logic [DATA_W-1:0]    reg_wdata,
  output logic [DATA_W-1:0]    reg_rdata,
  // task control
  input  logic                 start,
  input  logic [$clog2(NTASK)-1:0] task_id,
  input  logic [7:0]           nobj,
  output logic                 busy,
  output logic                 first_obj,
  output logic                 done,
  output logic                 err,
  // Streaming Memory port B
  output logic                 sm_en,
  output logic                 sm_we,
  output logic [2:0]           sm_region,
  output logic [OW-1:0]        sm_off,
  output logic [DATA_W-1:0]    sm_wdata,
  input  logic [DATA_W-1:0]    sm_rdata,
  input  logic                 sm_fault,
  output logic [NSUB-1:0]      pwr_on,
  output logic [NSUB-1:0]      pwr_off,
  // SDRAM controller
  output logic                 sd_req_valid,
  output sd_req_t              sd_req,
  input  logic                 sd_req_ready,
  output logic [DATA_W-1:0]    sd_wr_data,
  output logic                 sd_wr_valid,
  input  logic                 sd_wr_take,
  input  logic [DATA_W-1:0]    sd_rd_data,
  input  logic                 sd_rd_valid
);

  typedef enum logic [3:0] {
    X_IDLE, X_EXEC, X_LD_REQ, X_LD_DATA, X_ST_REQ, X_ST_DATA,
    X_TAB_RD, X_TAB_WAIT, X_LI_REQ, X_LI_DATA
  } xstate_e;

  logic [DATA_W-1:0]    prog   [PROG_DEPTH];
  logic [SD_ADDR_W-1:0] sptr   [NSTREAM];
  logic [PCW-1:0]       entry  [NTASK];

  xstate_e              st;
  logic [PCW-1:0]       pc;
  smc_instr_t           ins;
  logic [7:0]           nobj_q;
  logic [7:0]           nobj_prev; // object count of the previous set
  logic [7:0]           n_i;       // object count of the current instruction
  logic [15:0]          cnt;       // words moved in the current burst
  logic [15:0]          len;       // words of the current burst
  logic [7:0]           oidx;      // object index (LOADI)
  logic [OW-1:0]        obase;     // region offset of the current burst
  logic [SD_ADDR_W-1:0] li_addr;
  logic                 primed;    // sm_rdata holds word `cnt` (STORE)
  logic                 first_seen;
  logic                 err_q;

  assign ins  = smc_instr_t'(prog[pc]);
  assign n_i  = ins.prev ? nobj_prev : nobj_q;
  assign busy = (st != X_IDLE);
  assign err  = err_q;

  // ---------------- Streaming Memory port B ----------------
  logic [15:0] st_next;
  assign st_next = cnt + 16'(sd_wr_take);

  always_comb begin
    sm_en     = 1'b0;
    sm_we     = 1'b0;
    sm_region = ins.region;
    sm_off    = '0;
    sm_wdata  = sd_rd_data;
    unique case (st)
      X_LD_DATA, X_LI_DATA: begin
        sm_en  = sd_rd_valid;
        sm_we  = 1'b1;
        sm_off = OW'(obase + OW'(cnt));
      end
      X_ST_REQ, X_ST_DATA: begin
        sm_en  = (st_next < len);
        sm_off = OW'(st_next);
      end
      X_TAB_RD: begin
        sm_en     = 1'b1;
        sm_region = ins.sel;
        sm_off    = OW'(ins.tab_off + 10'(oidx));
      end
      default: ;
    endcase
  end

  // ---------------- SDRAM request ----------------
  always_comb begin
    sd_req_valid = 1'b0;
    sd_req       = '0;
    unique case (st)
      X_LD_REQ: begin
        sd_req_valid = 1'b1;
        sd_req       = '{we: 1'b0, addr: sptr[ins.sel], len: len};
      end
      X_ST_REQ: begin
        sd_req_valid = primed;
        sd_req       = '{we: 1'b1, addr: sptr[ins.sel], len: len};
      end
      X_LI_REQ: begin
        sd_req_valid = 1'b1;
        sd_req       = '{we: 1'b0, addr: li_addr, len: len};
      end
      default: ;
    endcase
  end
  assign sd_wr_data  = sm_rdata;
  assign sd_wr_valid = (st == X_ST_DATA) && primed;

  // ---------------- power gating ----------------
  always_comb begin
    pwr_on  = '0;
    pwr_off = '0;
    if (st == X_EXEC && (ins.op == OP_PWR_ON || ins.op == OP_PWR_OFF))
      for (int r = 0; r < NREG; r++)
        if (ins.tab_off[r])
          for (int s = 0; s < int'(G); s++) begin
            if (ins.op == OP_PWR_ON) pwr_on[r * int'(G) + s]  = 1'b1;
            else                     pwr_off[r * int'(G) + s] = 1'b1;
          end
  end

  // ---------------- registers ----------------
  always_ff @(posedge clk) begin
    if (reg_en && reg_we && reg_addr[8] == 1'b0 && reg_addr[7:0] < 8'(PROG_DEPTH))
      prog[reg_addr[PCW-1:0]] <= reg_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_rdata <= '0;
      for (int t = 0; t < int'(NTASK); t++) entry[t] <= '0;
    end else if (reg_en) begin
      if (reg_we) begin
        if (reg_addr[8:4] == 5'h11 && reg_addr[3:0] < 4'(NTASK))
          entry[reg_addr[$clog2(NTASK)-1:0]] <= PCW'(reg_wdata);
      end else begin
        reg_rdata <= '0;
        if (reg_addr[8] == 1'b0 && reg_addr[7:0] < 8'(PROG_DEPTH))
          reg_rdata <= prog[reg_addr[PCW-1:0]];
        else if (reg_addr[8:4] == 5'h10 && reg_addr[3:0] < 4'(NSTREAM))
          reg_rdata <= DATA_W'(sptr[reg_addr[$clog2(NSTREAM)-1:0]]);
        else if (reg_addr[8:4] == 5'h11 && reg_addr[3:0] < 4'(NTASK))
          reg_rdata <= DATA_W'(entry[reg_addr[$clog2(NTASK)-1:0]]);
        else if (reg_addr == 9'h118)
          reg_rdata <= DATA_W'({err_q, busy});
      end
    end
  end

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= X_IDLE;
      pc         <= '0;
      nobj_q     <= '0;
      nobj_prev  <= '0;
      cnt        <= '0;
      len        <= '0;
      oidx       <= '0;
      obase      <= '0;
      li_addr    <= '0;
      primed     <= 1'b0;
      first_seen <= 1'b0;
      first_obj  <= 1'b0;
      done       <= 1'b0;
      err_q      <= 1'b0;
      for (int s = 0; s < int'(NSTREAM); s++) sptr[s] <= '0;
    end else begin
      first_obj <= 1'b0;
      done      <= 1'b0;
      if (sm_fault) err_q <= 1'b1;

      // processor writes to stream descriptors
      if (reg_en && reg_we && reg_addr[8:4] == 5'h10 && reg_addr[3:0] < 4'(NSTREAM))
        sptr[reg_addr[$clog2(NSTREAM)-1:0]] <= SD_ADDR_W'(reg_wdata);

      unique case (st)
        X_IDLE: if (start) begin
          pc         <= entry[task_id];
          nobj_q     <= nobj;
          // a new set starts with task 0: remember the size of the last one
          if (task_id == '0) nobj_prev <= nobj_q;
          first_seen <= 1'b0;
          st         <= X_EXEC;
        end
        X_EXEC: begin
          cnt    <= '0;
          obase  <= '0;
          oidx   <= '0;
          primed <= 1'b0;
          len    <= 16'(n_i) * 16'(ins.words);
          unique case (ins.op)
            OP_END: begin
              if (!first_seen) first_obj <= 1'b1;
              done <= 1'b1;
              st   <= X_IDLE;
            end
            OP_BAD6, OP_BAD7: begin
              // undefined opcode: flag the error and end the task
              err_q <= 1'b1;
              if (!first_seen) first_obj <= 1'b1;
              done  <= 1'b1;
              st    <= X_IDLE;
            end
            OP_LOAD:  st <= (n_i == 0) ? X_EXEC : X_LD_REQ;
            OP_STORE: st <= (n_i == 0) ? X_EXEC : X_ST_REQ;
            OP_LOADI: begin
              len <= 16'(ins.words);
              st  <= (n_i == 0) ? X_EXEC : X_TAB_RD;
            end
            default: ;  // PWR_ON / PWR_OFF act combinationally this cycle
          endcase
          if (ins.op != OP_END && ins.op != OP_BAD6 && ins.op != OP_BAD7 &&
              (n_i == 0 || ins.op == OP_PWR_ON || ins.op == OP_PWR_OFF))
            pc <= pc + 1'b1;
          // the reserved bit must be 0
          if (ins.rsvd) err_q <= 1'b1;
        end
        X_LD_REQ: if (sd_req_ready) st <= X_LD_DATA;
        X_LD_DATA: if (sd_rd_valid) begin
          cnt <= cnt + 16'd1;
          if (ins.rel && !first_seen && cnt + 16'd1 == 16'(ins.words)) begin
            first_seen <= 1'b1;
            first_obj  <= 1'b1;
          end
          if (cnt + 16'd1 == len) begin
            sptr[ins.sel] <= sptr[ins.sel] + SD_ADDR_W'(len);
            pc <= pc + 1'b1;
            st <= X_EXEC;
          end
        end
        X_ST_REQ: begin
          primed <= 1'b1;
          if (primed && sd_req_ready) st <= X_ST_DATA;
        end
        X_ST_DATA: if (sd_wr_take) begin
          cnt <= cnt + 16'd1;
          if (cnt + 16'd1 == len) begin
            sptr[ins.sel] <= sptr[ins.sel] + SD_ADDR_W'(len);
            pc <= pc + 1'b1;
            st <= X_EXEC;
          end
        end
        X_TAB_RD: st <= X_TAB_WAIT;
        X_TAB_WAIT: begin
          cnt     <= '0;
          obase   <= OW'(16'(oidx) * 16'(ins.words));
          li_addr <= sm_rdata[SD_ADDR_W-1:0];
          if (sm_rdata[31]) begin
            // no object to fetch for this slot
            if (ins.rel && !first_seen) begin
              first_seen <= 1'b1;
              first_obj  <= 1'b1;
            end
            if (oidx + 8'd1 == n_i) begin
              pc <= pc + 1'b1;
              st <= X_EXEC;
            end else begin
              oidx <= oidx + 8'd1;
              st   <= X_TAB_RD;
            end
          end else begin
            st <= X_LI_REQ;
          end
        end
        X_LI_REQ: if (sd_req_ready) st <= X_LI_DATA;
        X_LI_DATA: if (sd_rd_valid) begin
          cnt <= cnt + 16'd1;
          if (cnt + 16'd1 == len) begin
            if (ins.rel && !first_seen) begin
              first_seen <= 1'b1;
              first_obj  <= 1'b1;
            end
            if (oidx + 8'd1 == n_i) begin
              pc <= pc + 1'b1;
              st <= X_EXEC;
            end else begin
              oidx <= oidx + 8'd1;
              st   <= X_TAB_RD;
            end
          end
        end
        default: st <= X_IDLE;
      endcase
    end
  end

  // ---- handshake rule, checked in simulation ----
  // a burst request is held, unchanged, until the SDRAM controller takes it
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
      sd_req_valid && !sd_req_ready |=> sd_req_valid && $stable(sd_req));

endmodule
