// lfsr_system_function: the system function placed in each working region.
//
// A left-shifting Fibonacci LFSR. Each cycle with en high the register shifts
// one place towards the MSB and bit 0 takes the XOR of the bits selected by
// taps (the feedback polynomial, read from configuration memory so that an
// upset in it changes the sequence). With a primitive polynomial and a
// non-zero seed the sequence has period 2^WIDTH - 1. A synchronous restart
// (clr) reloads the seed; the asynchronous active-low reset does the same.
// Output out holds the top NUM_OUT bits of the register, registered; with
// NUM_OUT = 1 this is the most significant bit, the primary output of the
// prototype.
//
// The LFSR with primitive polynomial and MSB output follow the described
// prototype; width, polynomial, seed, Fibonacci form and the enable input (the
// region's input set) are this design's choices.
module lfsr_system_function #(
  parameter int unsigned       WIDTH   = fs_pkg::LFSR_WIDTH,
  parameter int unsigned       NUM_OUT = fs_pkg::NUM_OUTPUTS,
  parameter logic [WIDTH-1:0]  SEED    = fs_pkg::LFSR_SEED
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,     // synchronous restart to SEED
  input  logic               en,      // input set of the region: advance one step
  input  logic [WIDTH-1:0]   taps,    // feedback polynomial from configuration
  output logic [WIDTH-1:0]   state,
  output logic [NUM_OUT-1:0] out
);
  logic feedback;
  always_comb feedback = ^(state & taps);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= SEED;
    else if (clr)    state <= SEED;
    else if (en)     state <= {state[WIDTH-2:0], feedback};
  end

  always_comb out = state[WIDTH-1 -: NUM_OUT];

  initial begin
    assert (NUM_OUT >= 1 && NUM_OUT <= WIDTH)
      else $error("lfsr_system_function: NUM_OUT must be 1..WIDTH");
  end
endmodule
