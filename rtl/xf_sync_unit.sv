// xf_sync_unit - synchronization and throughput constraints for several
// media applications sharing one platform.
//
// Each application a processes G_a basic data objects per synchronization
// block, in sets of g_a objects (its task granularity), i.e. n_a = G_a / g_a
// sets; when g_a does not divide G_a the last set of the block is a shorter
// remainder burst of G_a - n_a * g_a objects. Block i of any application may
// only start once every application has completed block i-1
// (s_i >= c_{i-1}). These rules are the document's; the counting scheme is
// this design's: per application a counter of objects done in the current
// block, a set size min(g_a, G_a - done_a), and a barrier that clears all
// counters once every application has reached G_a.
//
// A throughput constraint bounds the time between the start of block i and
// block i-X (X = 1 is the hard form 1/r >= s_i - s_{i-1}; X > 1 the soft,
// windowed form). A free-running cycle counter time-stamps block starts and
// `violation` pulses for every start that breaks the bound.
//
// Interface: configuration inputs are static while enable is high. allow_a is
// a level; the client pulses set_done_a once per set it finishes and must not
// start a new set in the cycle after set_done. block_start pulses one cycle
// after the barrier opens (and once when enabled).
module xf_sync_unit #(
  parameter int unsigned NAPPS = 3,
  parameter int unsigned X     = 1,    // throughput window in blocks
  parameter int unsigned CW    = 16,   // object counter width
  parameter int unsigned TSW   = 32    // time stamp width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic [CW-1:0]        cfg_G [NAPPS],  // synchronization granularity
  input  logic [7:0]           cfg_g [NAPPS],  // task granularity
  input  logic [TSW-1:0]       bound,          // max cycles over X blocks, 0 = none
  input  logic [NAPPS-1:0]     set_done,
  output logic [NAPPS-1:0]     allow,
  output logic [7:0]           set_objs [NAPPS],
  output logic                 block_start,
  output logic [15:0]          blocks_done,
  output logic [15:0]          remainder_sets,
  output logic                 violation,
  output logic [15:0]          violations
);

  logic [CW-1:0]  done_cnt [NAPPS];
  logic [TSW-1:0] now;
  logic [TSW-1:0] hist [X];        // start times of the last X blocks
  logic [$clog2(X+1)-1:0] nhist;
  logic           started;
  logic           all_done;

  always_comb begin
    all_done = 1'b1;
    for (int a = 0; a < int'(NAPPS); a++) begin
      logic [CW-1:0] left;
      left = cfg_G[a] - done_cnt[a];
      set_objs[a] = (left < CW'(cfg_g[a])) ? left[7:0] : cfg_g[a];
      allow[a]    = enable && started && (done_cnt[a] < cfg_G[a]);
      if (done_cnt[a] < cfg_G[a]) all_done = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now            <= '0;
      started        <= 1'b0;
      nhist          <= '0;
      block_start    <= 1'b0;
      blocks_done    <= '0;
      remainder_sets <= '0;
      violation      <= 1'b0;
      violations     <= '0;
      for (int a = 0; a < int'(NAPPS); a++) done_cnt[a] <= '0;
      for (int k = 0; k < int'(X); k++) hist[k] <= '0;
    end else begin
      logic open_block;
      now         <= now + 1'b1;
      block_start <= 1'b0;
      violation   <= 1'b0;
      open_block  = 1'b0;

      for (int a = 0; a < int'(NAPPS); a++)
        if (set_done[a] && allow[a]) begin
          done_cnt[a] <= done_cnt[a] + CW'(set_objs[a]);
          if (CW'(set_objs[a]) < CW'(cfg_g[a])) remainder_sets <= remainder_sets + 16'd1;
        end

      if (enable && !started) begin
        started    <= 1'b1;
        open_block = 1'b1;
      end else if (started && all_done) begin
        for (int a = 0; a < int'(NAPPS); a++) done_cnt[a] <= '0;
        blocks_done <= blocks_done + 16'd1;
        open_block  = 1'b1;
      end

      if (open_block) begin
        block_start <= 1'b1;
        // throughput check against the start X blocks back
        if (nhist == ($clog2(X+1))'(X) && bound != 0 && (now - hist[X-1]) > bound) begin
          violation  <= 1'b1;
          violations <= violations + 16'd1;
        end
        hist[0] <= now;
        for (int k = 1; k < int'(X); k++) hist[k] <= hist[k-1];
        if (nhist != ($clog2(X+1))'(X)) nhist <= nhist + 1'b1;
      end
    end
  end

endmodule
