// xf_streaming_memory - region-organised, software-controlled on-chip
// Streaming Memory with per-sub-region power gating.
//
// The memory holds one region per stream of the application (see
// xf_pkg::OBJ_WORDS for the MPEG2 decoder table). Region r holds G basic data
// objects of OBJ_WORDS[r] words, so the whole memory scales linearly with the
// task granularity G, as the document prescribes. Each object slot (a
// "sub-region") has its own supply gate: the document shuts sub-regions down
// as soon as the data in them is dead and keeps whole regions off between the
// tasks that use them. A gated sub-region loses its contents; here a write to
// it is dropped, a read returns zero and the access is flagged on *_fault.
//
// Regions are laid out back to back in one word address space (region 0 at
// word 0). Port A serves the processor (linear word address, byte enables);
// port B serves the Streaming Memory Controller (region number plus word
// offset). Both ports read with one cycle latency and write at the clock edge;
// if both write the same word in one cycle, port B wins. Power state changes
// through pwr_on/pwr_off masks (one bit per sub-region, off wins) and resets to
// all off. Dual-port organisation, fault reporting and reset state are this
// design's choices; the document does not detail the memory's ports.
module xf_streaming_memory
  import xf_pkg::*;
#(
  parameter int unsigned G = 2,  // task granularity (objects per region)
  localparam int unsigned NSUB  = NREG * G,
  localparam int unsigned WORDS = G * (128 + 384 + 64 + 384 + 384 + 384) / BE_W,
  localparam int unsigned AW    = $clog2(WORDS),
  localparam int unsigned OW    = $clog2(G * 384 / BE_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // port A: processor
  input  logic              a_en,
  input  logic              a_we,
  input  logic [BE_W-1:0]   a_be,
  input  logic [AW-1:0]     a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  output logic              a_fault,
  // port B: Streaming Memory Controller
  input  logic              b_en,
  input  logic              b_we,
  input  logic [2:0]        b_region,
  input  logic [OW-1:0]     b_off,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata,
  output logic              b_fault,
  // power gating
  input  logic [NSUB-1:0]   pwr_on,
  input  logic [NSUB-1:0]   pwr_off,
  output logic [NSUB-1:0]   pwr_state,
  output logic [AW:0]       powered_words
);

  // first word of each region, and of the word after the last region
  function automatic int region_base(int r);
    int b = 0;
    for (int q = 0; q < r; q++) b += int'(G) * OBJ_WORDS[q];
    return b;
  endfunction

  // flat sub-region index (r*G + object) of a linear word address, or -1
  function automatic int sub_of(int lin);
    for (int r = 0; r < NREG; r++)
      for (int s = 0; s < int'(G); s++) begin
        int lo = region_base(r) + s * OBJ_WORDS[r];
        if (lin >= lo && lin < lo + OBJ_WORDS[r]) return r * int'(G) + s;
      end
    return -1;
  endfunction

  logic [DATA_W-1:0] mem [WORDS];
  logic [NSUB-1:0]   pwr_q;

  int  a_sub, b_sub, b_lin;
  logic a_ok, b_ok;

  always_comb begin
    a_sub = sub_of(int'(a_addr));
    a_ok  = (a_sub >= 0) && pwr_q[a_sub[$clog2(NSUB+1)-1:0]];
    b_lin = 0;
    for (int r = 0; r < NREG; r++)
      if (int'(b_region) == r) b_lin = region_base(r) + int'(b_off);
    b_sub = (int'(b_region) < NREG && int'(b_off) < int'(G) * OBJ_WORDS[int'(b_region) % NREG])
            ? sub_of(b_lin) : -1;
    b_ok  = (b_sub >= 0) && pwr_q[b_sub[$clog2(NSUB+1)-1:0]];
  end

  // storage: two ports, port B written last so it wins a collision
  always_ff @(posedge clk) begin
    if (a_en && a_we && a_ok)
      for (int b = 0; b < BE_W; b++)
        if (a_be[b]) mem[a_addr][8*b +: 8] <= a_wdata[8*b +: 8];
    if (b_en && b_we && b_ok)
      mem[b_lin[AW-1:0]] <= b_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_rdata <= '0;
      b_rdata <= '0;
      a_fault <= 1'b0;
      b_fault <= 1'b0;
      pwr_q   <= '0;
    end else begin
      a_fault <= a_en && !a_ok;
      b_fault <= b_en && !b_ok;
      if (a_en && !a_we) a_rdata <= a_ok ? mem[a_addr] : '0;
      if (b_en && !b_we) b_rdata <= b_ok ? mem[b_lin[AW-1:0]] : '0;
      pwr_q <= (pwr_q | pwr_on) & ~pwr_off;
    end
  end

  assign pwr_state = pwr_q;

  // number of words currently powered (leakage proxy)
  always_comb begin
    powered_words = '0;
    for (int r = 0; r < NREG; r++)
      for (int s = 0; s < int'(G); s++)
        if (pwr_q[r * int'(G) + s]) powered_words += (AW+1)'(OBJ_WORDS[r]);
  end

endmodule
