// Input latency equalisation for an N_LEVELS nested cascaded MASH.
//
// The carry of a level reaches the level above one clock later, so the
// levels work on the same accumulation step in a staircase: level k lags the
// least significant level N_LEVELS by N_LEVELS-k clocks. To keep the output
// exact for a changing input word, slice k of x is delayed by the sum of the
// latencies of the levels below it; with one-clock DDSMs that is
// N_LEVELS-k clocks (Fig. 4: three flip-flops on x_1, two on x_2, one on x_3,
// none on x_4). The last slice passes straight through.
//
// Ports: x the M_BITS-bit fractional input word; xa the same word with each
// slice delayed. Delay registers are cleared by the active-low asynchronous
// reset (this design's choice), which is what makes the cascade start from
// the all-zero state of an equivalent single-word MASH.
module input_align
  import nc_mash_pkg::*;
#(
  parameter int unsigned M_BITS   = 16,
  parameter int unsigned N_LEVELS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [M_BITS-1:0] x,
  output logic [M_BITS-1:0] xa
);

  for (genvar k = 1; k <= N_LEVELS; k++) begin : g_level
    localparam int unsigned WK  = slice_width(M_BITS, N_LEVELS, k);
    localparam int unsigned LSB = slice_lsb(M_BITS, N_LEVELS, k);
    localparam int unsigned DLY = N_LEVELS - k;

    if (DLY == 0) begin : g_direct
      assign xa[LSB +: WK] = x[LSB +: WK];
    end else begin : g_delay
      logic [WK-1:0] pipe [DLY];

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < int'(DLY); i++) pipe[i] <= '0;
        end else begin
          pipe[0] <= x[LSB +: WK];
          for (int i = 1; i < int'(DLY); i++) pipe[i] <= pipe[i-1];
        end
      end

      assign xa[LSB +: WK] = pipe[DLY-1];
    end
  end

endmodule
