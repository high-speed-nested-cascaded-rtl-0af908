// First-order digital delta-sigma modulator with a 1-bit quantizer, built as
// a clocked W-bit adder with carry in.
//
// Each clock the adder forms x + e + cin. The carry out is the modulator
// output y (the quantizer decision) and the W-bit sum is the quantization
// error e, which is both fed back to the adder and brought out so that a
// following stage can requantize it. Both y and e are registered, so the
// block has a latency of one clock, and the mean of y is (x + cin)/2**W.
//
// The adder-with-carry structure, the registered outputs and the use of the
// carry in for the output of the next-lower level follow the published
// design. The active-low asynchronous reset that clears both registers is a
// choice of this design.
//
// Ports: x (W bits, unsigned) data input; cin carry in at LSB weight;
// y registered carry out; e registered error (accumulator state).
module ddsm_acc #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] x,
  input  logic         cin,
  output logic         y,
  output logic [W-1:0] e
);

  logic [W:0] sum;

  always_comb sum = {1'b0, x} + {1'b0, e} + {{W{1'b0}}, cin};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= 1'b0;
      e <= '0;
    end else begin
      y <= sum[W];
      e <= sum[W-1:0];
    end
  end

endmodule
