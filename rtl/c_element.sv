// c_element: two-input Muller C-element with reset.
//
// The output follows the inputs when they agree and keeps its value when
// they differ (0,0 -> 0; 1,1 -> 1; otherwise no change), which is how the
// network's handshakes wait for two events. The next-state function is the
// majority of a, b and the present output, i.e. the three AND terms and the
// OR of the gate-level C-element; rst_n clears the output as the reset input
// of the reset variant does.
//
// Timing: this model replaces the feedback loop of the gate-level circuit by
// a flip-flop on clk, so the output takes its new value one clock after the
// inputs agree. The clock stands for the gate delay of the self-timed
// circuit: every handshake in the network is insensitive to how long that
// delay is, so the sampled model behaves like the self-timed one. Using a
// clock this way is this design's choice; the document's circuit has none.
module c_element (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic c
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c <= 1'b0;
    else        c <= (a & b) | (a & c) | (b & c);
  end

endmodule
