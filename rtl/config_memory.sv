// config_memory: configuration memory of the FPGA core.
//
// CFG_WORDS words of CFG_WORD_W bits, written one word per clock through a
// write-only port (we, addr, wdata): the embedded processor can write the
// configuration but not read it back. Every bit drives the fabric directly,
// so the whole contents are visible at once on image. Reset clears every bit
// to 0, the un-programmed state. A write to an address at or above CFG_WORDS
// is ignored. A write takes effect on image right after the clock edge.
//
// Changing a bit through the write port is also how a configuration upset is
// emulated, and writing the known-good contents again is scrubbing.
// The write-only access follows the described device; word width, depth,
// reset and the address decode are this design's.
module config_memory #(
  parameter int unsigned CFG_WORDS  = fs_pkg::CFG_WORDS,
  parameter int unsigned CFG_WORD_W = fs_pkg::CFG_WORD_W,
  parameter int unsigned CFG_AW     = fs_pkg::CFG_AW
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            we,
  input  logic [CFG_AW-1:0]               addr,
  input  logic [CFG_WORD_W-1:0]           wdata,
  output logic [CFG_WORDS*CFG_WORD_W-1:0] image
);
  logic [CFG_WORDS-1:0][CFG_WORD_W-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mem <= '0;
    else if (we && (32'(addr) < CFG_WORDS)) mem[addr] <= wdata;
  end

  always_comb image = mem;
endmodule
