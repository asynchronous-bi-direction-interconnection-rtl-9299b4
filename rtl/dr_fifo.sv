// dr_fifo: the router's buffer between Arbitrator_One and Arbitrator_Two, a
// dual-rail Muller pipeline of STAGES fifo_register stages.
//
// Packets enter at d_in/ack_in and leave at d_out/ack_out, each side using
// the four-phase dual-rail handshake. Because a Muller pipeline needs an
// EMPTY spacer between two packets, it holds at most about half as many
// packets as it has stages: five stages hold three packets when the reader
// stalls. The five stages follow the document; it sizes the buffer for the
// case that four neighbours deliver at the same moment.
//
// Timing: with the reader ready, a packet crosses the pipe in STAGES clocks.
module dr_fifo
  import torus_pkg::*;
#(
  parameter int unsigned STAGES = 5,
  parameter int unsigned WIRES  = RPKT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIRES-1:0] d_in,
  output logic             ack_in,
  output logic [WIRES-1:0] d_out,
  input  logic             ack_out
);

  logic [WIRES-1:0] d   [STAGES+1];
  logic             ack [STAGES+1];

  assign d[0]        = d_in;
  assign ack_in      = ack[0];
  assign d_out       = d[STAGES];
  assign ack[STAGES] = ack_out;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    fifo_register #(.WIRES(WIRES)) u_reg (
      .clk     (clk),
      .rst_n   (rst_n),
      .d_in    (d[s]),
      .ack_prev(ack[s]),
      .d_out   (d[s+1]),
      .ack_next(ack[s+1])
    );
  end

endmodule
