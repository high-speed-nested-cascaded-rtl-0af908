// Grid of first-order DDSMs forming an N_LEVELS nested cascaded MASH.
//
// A conventional MASH 1-1-1 chains three M_BITS-wide first-order DDSMs: stage
// 1 accumulates x, stage 2 requantizes the error of stage 1 and stage 3 the
// error of stage 2 (ORDER = 3, the default; other orders add or remove
// stages in the same way). Here every stage is cut into N_LEVELS narrow DDSMs
// (ddsm_acc), one per level. DDSM (k, j) of level k and stage j adds
//   * its data input: the aligned slice x_k for stage 1, the error e_{k,j-1}
//     of the previous stage of its own level otherwise;
//   * its own registered error e_{k,j};
//   * as carry in, the output y_{k+1,j} of the same stage one level below.
// The last level has no level below it; its stage-2 carry in takes the
// one-bit dither, the others are tied to zero. The outputs of level 1,
// y_{1,1..ORDER}, are the MASH stage outputs fed to the error-cancellation
// network. This wiring follows Figs. 3 and 4 of the published design.
//
// Because a carry reaches the next level one clock later, level k works on
// the accumulation step that the last level handled N_LEVELS-k clocks
// earlier, and its input slice must be delayed by as much (input_align).
// With that alignment the outputs are those of a single M_BITS-wide MASH
// delayed by N_LEVELS-1 clocks, while no adder is wider than
// ceil(M_BITS/N_LEVELS) bits.
//
// Ports: xa the aligned input word (slice k at bits given by nc_mash_pkg);
// dither the one-bit dither; ys[j-1] the registered level-1 output of
// stage j.
module nc_mash_core
  import nc_mash_pkg::*;
#(
  parameter int unsigned M_BITS   = 16,
  parameter int unsigned N_LEVELS = 4,
  parameter int unsigned ORDER    = MASH_ORDER
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [M_BITS-1:0] xa,
  input  logic              dither,
  output logic [ORDER-1:0]  ys
);

  localparam int unsigned STAGES = ORDER;

  if (ORDER < 2) begin : g_order_check
    $error("nc_mash_core: ORDER must be at least 2 (dither enters stage 2)");
  end

  // err[j] holds the errors of all levels of stage j side by side, slice k at
  // the bits of level k; car[j][k] is the output y_{k,j} (index N_LEVELS+1
  // is the carry in of the last level).
  logic [M_BITS-1:0] err [1:STAGES];
  logic              car [1:STAGES][1:N_LEVELS+1];

  for (genvar j = 1; j <= STAGES; j++) begin : g_cin_last
    if (j == 2) begin : g_dither
      assign car[j][N_LEVELS+1] = dither;
    end else begin : g_zero
      assign car[j][N_LEVELS+1] = 1'b0;
    end
  end

  for (genvar j = 1; j <= STAGES; j++) begin : g_stage
    for (genvar k = 1; k <= N_LEVELS; k++) begin : g_level
      localparam int unsigned WK  = slice_width(M_BITS, N_LEVELS, k);
      localparam int unsigned LSB = slice_lsb(M_BITS, N_LEVELS, k);

      logic [WK-1:0] din;

      if (j == 1) begin : g_in_x
        assign din = xa[LSB +: WK];
      end else begin : g_in_e
        assign din = err[j-1][LSB +: WK];
      end

      ddsm_acc #(.W(WK)) u_ddsm (
        .clk  (clk),
        .rst_n(rst_n),
        .x    (din),
        .cin  (car[j][k+1]),
        .y    (car[j][k]),
        .e    (err[j][LSB +: WK])
      );
    end
  end

  for (genvar j = 1; j <= STAGES; j++) begin : g_out
    assign ys[j-1] = car[j][1];
  end

endmodule
