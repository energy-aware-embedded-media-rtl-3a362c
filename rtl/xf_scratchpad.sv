// xf_scratchpad - on-chip Scratch-Pad SRAM for constants and scalars.
//
// The media application's constants (quantisation and IDCT coefficient tables,
// header code tables) and its scalar variables live here instead of in off-chip
// memory. It occupies its own address range on the processor data bus, disjoint
// from main memory. The 2 KB default follows the document; the single-port,
// word-organised array with byte enables is this design's choice.
//
// Interface: one request per cycle (en, we, be, word addr, wdata). Timing: a
// read returns rdata on the clock edge after the request (one cycle latency);
// a write updates the enabled bytes at the clock edge. No reset: contents are
// loaded by software before use.
module xf_scratchpad #(
  parameter int unsigned BYTES = 2048,
  localparam int unsigned WORDS = BYTES / xf_pkg::BE_W,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [xf_pkg::BE_W-1:0]  be,
  input  logic [AW-1:0]            addr,
  input  logic [xf_pkg::DATA_W-1:0] wdata,
  output logic [xf_pkg::DATA_W-1:0] rdata
);
  logic [xf_pkg::DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < xf_pkg::BE_W; b++)
          if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end
endmodule
