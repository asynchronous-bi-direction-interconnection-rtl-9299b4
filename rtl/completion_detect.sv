// completion_detect: completion detector for a dual-rail word, acting as a
// multi-input C-element over all its bit pairs.
//
// done rises once every pair of the word holds a valid code (one rail high)
// and falls once every pair is EMPTY; in between it holds. Each pair is ORed,
// the results go to an AND tree (all valid) and to an OR tree (any valid),
// and those two drive one two-input C-element. This replaces a wide
// multi-input C-element with two gate trees and a single C-element; the
// document also avoids a wide C-element, by a circuit that is not shown, so
// this construction is this design's own.
//
// Timing: done follows the word one clock later (the C-element's flip-flop).
module completion_detect #(
  parameter int unsigned BITS = 38   // logical bits, 2*BITS wires
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2*BITS-1:0] rails,
  output logic              done
);

  logic [BITS-1:0] pair_valid;

  always_comb begin
    for (int i = 0; i < BITS; i++) pair_valid[i] = rails[2*i+1] | rails[2*i];
  end

  c_element u_c (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (&pair_valid),
    .b    (|pair_valid),
    .c    (done)
  );

endmodule
