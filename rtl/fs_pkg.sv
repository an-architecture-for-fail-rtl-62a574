// fs_pkg: types and constants shared by the fail-silent FPGA design.
//
// The configuration image of the FPGA core is a flat vector written in
// CFG_WORD_W-bit words. The low IO_WORDS words hold the I/O buffer settings
// (io_cfg_t, zero-extended) so that the shutdown sequence can rewrite them
// without touching anything else; the words above hold the core settings
// (core_cfg_t, zero-extended): the feedback taps of the two replicated system
// functions and the truth tables of the isolation LUTs. An all-zero image is
// the un-programmed state: every output buffer is an input, every LUT drives
// 0 and both LFSRs have no feedback.
//
// The sizes are this design's choices: the prototype system function is an
// LFSR with a primitive polynomial whose width is not fixed, so an 8-bit LFSR
// with x^8 + x^6 + x^5 + x^4 + 1 is used, with one fail-silent output (the
// LFSR's most significant bit), as in the prototype.
package fs_pkg;

  parameter int unsigned LFSR_WIDTH  = 8;
  // Feedback mask for a left-shifting Fibonacci LFSR: bits 7,5,4,3 are
  // XORed into bit 0, i.e. x^8 + x^6 + x^5 + x^4 + 1 (primitive).
  parameter logic [LFSR_WIDTH-1:0] LFSR_TAPS = 8'hB8;
  parameter logic [LFSR_WIDTH-1:0] LFSR_SEED = 8'h01;

  parameter int unsigned NUM_OUTPUTS = 1;
  parameter int unsigned CFG_WORD_W  = 8;

  // Truth table of a 3-input LUT that passes input 0 through whatever the
  // other two inputs are: the isolation buffer of a PLB.
  parameter logic [7:0] LUT_IDENTITY = 8'hAA;

  typedef struct packed {
    logic [NUM_OUTPUTS-1:0] pull_up;   // 1: pull-up, 0: pull-down
    logic [NUM_OUTPUTS-1:0] pull_en;   // weak pull on the pad enabled
    logic [NUM_OUTPUTS-1:0] drive_en;  // 1: bidirectional buffer, 0: input only (inactive)
  } io_cfg_t;

  typedef struct packed {
    logic [NUM_OUTPUTS-1:0][7:0]  iso2_init; // LUTs isolating region 2 outputs
    logic [NUM_OUTPUTS-1:0][7:0]  iso1_init; // LUTs isolating region 1 pad read-back
    logic [LFSR_WIDTH-1:0]        taps2;     // region 2 system function
    logic [LFSR_WIDTH-1:0]        taps1;     // region 1 system function
  } core_cfg_t;

  parameter int unsigned IO_BITS    = $bits(io_cfg_t);
  parameter int unsigned CORE_BITS  = $bits(core_cfg_t);
  parameter int unsigned IO_WORDS   = (IO_BITS + CFG_WORD_W - 1) / CFG_WORD_W;
  parameter int unsigned CORE_WORDS = (CORE_BITS + CFG_WORD_W - 1) / CFG_WORD_W;
  parameter int unsigned CFG_WORDS  = IO_WORDS + CORE_WORDS;
  parameter int unsigned CFG_BITS   = CFG_WORDS * CFG_WORD_W;
  parameter int unsigned CFG_AW     = (CFG_WORDS > 1) ? $clog2(CFG_WORDS) : 1;

  typedef logic [CFG_BITS-1:0] cfg_image_t;

  function automatic io_cfg_t io_of(cfg_image_t img);
    return io_cfg_t'(img[IO_BITS-1:0]);
  endfunction

  function automatic core_cfg_t core_of(cfg_image_t img);
    return core_cfg_t'(img[IO_WORDS*CFG_WORD_W +: CORE_BITS]);
  endfunction

  function automatic cfg_image_t pack_image(io_cfg_t io, core_cfg_t core);
    cfg_image_t img = '0;
    img[IO_BITS-1:0] = io;
    img[IO_WORDS*CFG_WORD_W +: CORE_BITS] = core;
    return img;
  endfunction

  // The I/O setting the shutdown sequence writes: no driver, weak pull on.
  function automatic io_cfg_t io_inactive(logic pull_up);
    io_cfg_t io;
    io.pull_up  = {NUM_OUTPUTS{pull_up}};
    io.pull_en  = '1;
    io.drive_en = '0;
    return io;
  endfunction

endpackage
