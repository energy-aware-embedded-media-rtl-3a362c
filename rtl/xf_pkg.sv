// xf_pkg - types and constants shared by the Xtream-Fit data memory subsystem.
//
// The Streaming Memory is organised into regions, one per input, output or
// intermediate data stream of the media application. The region table below is
// the six-region MPEG2 decoder organisation (object sizes in bytes per task
// granularity step: 128 B input stream segment, 384 B decoded macroblock, 64 B
// motion vectors, 384 B DCT coefficients, 384 B backward and 384 B forward
// motion compensation macroblocks). The 32-bit word, the encoding of the
// Streaming Memory Controller (SMC) instructions and the SDRAM geometry
// (4 banks x 2048 rows x 256 columns x 32 bit, a 64 Mbit x32 mobile SDRAM)
// are this design's own choices.
package xf_pkg;

  localparam int DATA_W = 32;
  localparam int BE_W   = DATA_W / 8;

  // ---- Streaming Memory region table (MPEG2 decoder) ----
  localparam int NREG = 6;
  typedef enum logic [2:0] {
    R_IN_STREAM = 3'd0,  // MPEG input stream segments
    R_OUT_MB    = 3'd1,  // decoded macroblocks (DEC_MB)
    R_MV        = 3'd2,  // motion vectors / reference addresses
    R_DCT       = 3'd3,  // intermediate D_dct_MB
    R_MC_B      = 3'd4,  // backward motion compensation macroblock
    R_MC_F      = 3'd5   // forward motion compensation macroblock
  } region_e;

  // Words (32 bit) per basic data object of each region; region r holds
  // G objects, i.e. G * OBJ_WORDS[r] words.
  // (128, 384, 64, 384, 384, 384 bytes)
  localparam int OBJ_WORDS [NREG] = '{32, 96, 16, 96, 96, 96};

  // ---- SMC instruction encoding ----
  typedef enum logic [2:0] {
    OP_END     = 3'd0,  // end of data transfer task
    OP_LOAD    = 3'd1,  // sequential stream -> region (prefetch)
    OP_STORE   = 3'd2,  // region -> sequential stream (write back)
    OP_LOADI   = 3'd3,  // per object, SDRAM address read from a table region
    OP_PWR_ON  = 3'd4,  // power up every sub-region of the masked regions
    OP_PWR_OFF = 3'd5,  // Vdd-gate every sub-region of the masked regions
    OP_BAD6    = 3'd6,  // undefined: ends the task with an error
    OP_BAD7    = 3'd7
  } smc_op_e;

  typedef struct packed {
    smc_op_e     op;       // [31:29]
    logic        rsvd;     // [28]
    logic        rel;      // [27]    release the processing task after this
                           //         instruction's first object (loads)
    logic        prev;     // [26]    use the previous set's object count
                           //         (write-back of the previous outputs)
    logic [2:0]  region;   // [25:23] target region
    logic [2:0]  sel;      // [22:20] stream descriptor (LOAD/STORE) or table region (LOADI)
    logic [9:0]  tab_off;  // [19:10] table word offset (LOADI) / region mask [15:10] (PWR_*)
    logic [9:0]  words;    // [9:0]   words per basic data object
  } smc_instr_t;

  // ---- SDRAM geometry and commands ----
  localparam int SD_BANK_W = 2;
  localparam int SD_ROW_W  = 11;
  localparam int SD_COL_W  = 8;
  localparam int SD_ADDR_W = SD_BANK_W + SD_ROW_W + SD_COL_W;  // word address

  // {cs_n, ras_n, cas_n, we_n}
  typedef enum logic [3:0] {
    SD_NOP  = 4'b0111,
    SD_ACT  = 4'b0011,
    SD_RD   = 4'b0101,
    SD_WR   = 4'b0100,
    SD_PRE  = 4'b0010,
    SD_REF  = 4'b0001,
    SD_MRS  = 4'b0000
  } sd_cmd_e;

  // Burst request from the SMC transfer engine to the SDRAM controller.
  typedef struct packed {
    logic                 we;
    logic [SD_ADDR_W-1:0] addr;
    logic [15:0]          len;   // words
  } sd_req_t;

endpackage
