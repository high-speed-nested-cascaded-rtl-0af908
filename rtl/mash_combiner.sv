// Error-cancellation network of a MASH 1-1-...-1 of order ORDER.
//
// Combines the one-bit stage outputs y_1..y_L (L = ORDER) into the modulator
// output. For the default MASH 1-1-1 this is
//   Y(z) = z^-2 Y1(z) + z^-1 (1 - z^-1) Y2(z) + (1 - z^-1)^2 Y3(z),
// built in the nested form drawn for the four-level design: an inner node
// forms c_2 = z^-1 y_2 + (y_3 - z^-1 y_3), the outer node
// y = z^-2 y_1 + (c_2 - z^-1 c_2). y_1 passes two flip-flops, y_2 one, and
// each difference node keeps one flip-flop of its own input. The quantization
// errors of all stages but the last cancel; the last is shaped by
// (1 - z^-1)^L. For another order the same nesting is used:
//   c_L = y_L,  c_j = z^-(L-j) y_j + (1 - z^-1) c_{j+1},  y = c_1.
// The generalisation to other orders is this design's; the published design
// details the 1-1-1 case.
//
// Ports: ys[j-1] is the registered output of stage j; y is the output in
// two's complement, ORDER+1 bits (range -3..+4 for order 3), combinational
// from the flip-flops as in the published drawing. Registers clear on the
// active-low asynchronous reset (this design's choice). An assertion checks
// that the output stays inside the range of the modulator.
module mash_combiner
  import nc_mash_pkg::*;
#(
  parameter int unsigned ORDER = MASH_ORDER
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [ORDER-1:0]                  ys,
  output logic signed [out_width(ORDER)-1:0] y
);

  localparam int unsigned YW = out_width(ORDER);

  // ydl[j]: y_j delayed by ORDER-j clocks; c[j]: node j of the nesting;
  // c_d1[j]: c[j] one clock ago, for the difference (1 - z^-1) c_j.
  logic                 ydl  [1:ORDER];
  logic signed [YW-1:0] c    [1:ORDER];
  logic signed [YW-1:0] c_d1 [2:ORDER];

  if (ORDER < 2) begin : g_order_check
    $error("mash_combiner: ORDER must be at least 2");
  end

  for (genvar j = 1; j <= ORDER; j++) begin : g_stage
    localparam int unsigned DLY = ORDER - j;

    if (DLY == 0) begin : g_direct
      assign ydl[j] = ys[j-1];
    end else begin : g_delay
      logic pipe [DLY];   // pipe[0] newest

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < int'(DLY); i++) pipe[i] <= 1'b0;
        end else begin
          pipe[0] <= ys[j-1];
          for (int i = 1; i < int'(DLY); i++) pipe[i] <= pipe[i-1];
        end
      end

      assign ydl[j] = pipe[DLY-1];
    end

    if (j == ORDER) begin : g_last
      assign c[j] = $signed({{(YW-1){1'b0}}, ydl[j]});
    end else begin : g_node
      assign c[j] = $signed({{(YW-1){1'b0}}, ydl[j]}) + c[j+1] - c_d1[j+1];
    end

    if (j > 1) begin : g_diff
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) c_d1[j] <= '0;
        else        c_d1[j] <= c[j];
      end
    end
  end

  assign y = c[1];

  // The output of a MASH of order L never leaves -(2**(L-1) - 1) .. 2**(L-1).
  always_comb begin
    if (rst_n) begin
      a_out_range: assert ((int'(y) >= -((2 ** (ORDER - 1)) - 1)) && (int'(y) <= 2 ** (ORDER - 1)));
    end
  end

endmodule
