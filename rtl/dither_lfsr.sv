// One-bit pseudo-random dither source for the nested cascaded MASH.
//
// The published design adds one-bit white-noise dither to the carry in of the
// second DDSM of the last level, which gives first-order shaped dither, and
// warns that the period of an LFSR dither source must not itself cause spurs.
// How the dither is generated is not specified; this design uses a Fibonacci
// LFSR with the maximal-length polynomial x^23 + x^18 + 1 (period 2**23-1,
// the PRBS23 sequence): at a reference clock of tens of MHz the sequence
// repeats only a few times per second.
//
// The register shifts every clock: s <= {s[W-2:0], ^(s & TAPS)}. The dither
// bit is the most significant register bit, gated by en (the register keeps
// running while en is low). Reset loads the non-zero SEED.
//
// Ports: en dither enable; dither the one-bit dither, valid for the clock
// edge it precedes.
module dither_lfsr #(
  parameter int unsigned               LFSR_W = 23,
  parameter logic        [LFSR_W-1:0] TAPS   = LFSR_W'(23'h42_0000),
  parameter logic        [LFSR_W-1:0] SEED   = LFSR_W'(1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic dither
);

  logic [LFSR_W-1:0] s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= SEED;
    else        s <= {s[LFSR_W-2:0], ^(s & TAPS)};
  end

  assign dither = en & s[LFSR_W-1];

endmodule
