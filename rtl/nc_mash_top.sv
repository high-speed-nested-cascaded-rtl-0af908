// Nested cascaded MASH divider controller (MASH 1-1-1 by default).
//
// Produces, at the reference clock rate, the divide-ratio modulation of a
// fractional-N PLL: a sequence of small integers in -3..+4 whose mean is
// x / 2**M_BITS and whose quantization noise is shaped by (1 - z^-1)^3, like a
// conventional M_BITS-wide MASH 1-1-1. The wide accumulators of that MASH set
// its maximum clock rate; here each is split into N_LEVELS narrow
// accumulators chained by registered carries (nc_mash_core), so the longest
// adder is only ceil(M_BITS/N_LEVELS) bits wide.
//
// Data path: x -> input_align (slice k delayed N_LEVELS-k clocks) ->
// nc_mash_core (N_LEVELS x 3 DDSMs, dither into stage 2 of the last level) ->
// mash_combiner (error cancellation) -> y. The output sequence equals that
// of a conventional M_BITS-bit MASH 1-1-1 with the same dither, delayed by
// N_LEVELS-1 clocks; from x to y the latency is N_LEVELS+2 clocks.
//
// Defaults follow the four-level, 16-bit MASH 1-1-1 of the published design.
// N_LEVELS = 1 gives the conventional MASH 1-1-1. ORDER sets the number of
// first-order stages (at least 2; the output is ORDER+1 bits wide). Reset is
// active-low and asynchronous (this design's choice); x is sampled on every
// rising clock edge, dither_en gates the dither.
module nc_mash_top
  import nc_mash_pkg::*;
#(
  parameter int unsigned M_BITS   = 16,
  parameter int unsigned N_LEVELS = 4,
  parameter int unsigned ORDER    = MASH_ORDER,
  parameter int unsigned LFSR_W   = 23
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [M_BITS-1:0]     x,
  input  logic                  dither_en,
  output logic signed [out_width(ORDER)-1:0] y
);

  logic [M_BITS-1:0] xa;
  logic              dither;
  logic [ORDER-1:0]  ys;

  input_align #(.M_BITS(M_BITS), .N_LEVELS(N_LEVELS)) u_align (
    .clk, .rst_n, .x, .xa
  );

  dither_lfsr #(.LFSR_W(LFSR_W)) u_dither (
    .clk, .rst_n, .en(dither_en), .dither
  );

  nc_mash_core #(.M_BITS(M_BITS), .N_LEVELS(N_LEVELS), .ORDER(ORDER)) u_core (
    .clk, .rst_n, .xa, .dither, .ys
  );

  mash_combiner #(.ORDER(ORDER)) u_comb (
    .clk, .rst_n, .ys, .y
  );

endmodule
