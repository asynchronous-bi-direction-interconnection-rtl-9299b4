// fifo_register: one stage of the dual-rail Muller pipeline that forms the
// router FIFO.
//
// Every wire of the stage is a C-element whose inputs are the same wire of
// the previous stage and the inverted acknowledge of the next stage. A stage
// therefore copies a valid codeword forward only when the next stage has
// released the previous one (ack_next low), and returns to EMPTY only after
// the next stage has taken it (ack_next high). The stage's own acknowledge
// to the previous stage is the completion of its outputs: high once all
// pairs are valid, low once all are EMPTY.
//
// Interface: d_in/ack_prev towards the writer, d_out/ack_next towards the
// reader, four-phase dual-rail on both sides.
// Timing: a codeword crosses the stage in one clock; ack_prev follows one
// clock after d_out.
module fifo_register #(
  parameter int unsigned WIRES = 76
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIRES-1:0] d_in,
  output logic             ack_prev,
  output logic [WIRES-1:0] d_out,
  input  logic             ack_next
);

  for (genvar i = 0; i < WIRES; i++) begin : g_rail
    c_element u_c (
      .clk  (clk),
      .rst_n(rst_n),
      .a    (d_in[i]),
      .b    (~ack_next),
      .c    (d_out[i])
    );
  end

  completion_detect #(.BITS(WIRES/2)) u_cd (
    .clk  (clk),
    .rst_n(rst_n),
    .rails(d_out),
    .done (ack_prev)
  );

endmodule
