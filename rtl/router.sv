// router: one node of the torus network.
//
// Arbitrator_One takes packets from the four neighbours, delivers those
// addressed to this node to the processor and passes the rest into the
// FIFO. Arbitrator_Two takes packets from the FIFO and new packets from the
// processor (adding their head on the way) and sends each to the neighbour
// chosen by the routing rule. The FIFO decouples the fast receiving side
// from the slower sending side. This three-part structure follows the
// document.
//
// Interface (four-phase dual-rail on every channel):
//   in_pkt/in_ack[p]   from the neighbour on side p (torus_pkg::port_e)
//   out_pkt/out_ack[p] to the neighbour on side p
//   proc_in/proc_in_ack   new 72-wire packets from the processor
//   proc_out/proc_out_ack arrived 76-wire packets to the processor
//   location             this node's {X, Y}, plain binary, held constant
module router
  import torus_pkg::*;
#(
  parameter int unsigned FIFO_STAGES = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  loc_t  location,
  input  rpkt_t in_pkt  [NPORTS],
  output logic  in_ack  [NPORTS],
  output rpkt_t out_pkt [NPORTS],
  input  logic  out_ack [NPORTS],
  input  ppkt_t proc_in,
  output logic  proc_in_ack,
  output rpkt_t proc_out,
  input  logic  proc_out_ack
);

  rpkt_t a1_to_fifo, fifo_to_a2;
  logic  fifo_in_ack, fifo_out_ack;

  arbitrator_one u_arb1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .location(location),
    .in_pkt  (in_pkt),
    .in_ack  (in_ack),
    .fifo_pkt(a1_to_fifo),
    .fifo_ack(fifo_in_ack),
    .proc_pkt(proc_out),
    .proc_ack(proc_out_ack)
  );

  dr_fifo #(.STAGES(FIFO_STAGES), .WIRES(RPKT_W)) u_fifo (
    .clk    (clk),
    .rst_n  (rst_n),
    .d_in   (a1_to_fifo),
    .ack_in (fifo_in_ack),
    .d_out  (fifo_to_a2),
    .ack_out(fifo_out_ack)
  );

  arbitrator_two u_arb2 (
    .clk     (clk),
    .rst_n   (rst_n),
    .location(location),
    .fifo_pkt(fifo_to_a2),
    .fifo_ack(fifo_out_ack),
    .proc_pkt(proc_in),
    .proc_ack(proc_in_ack),
    .out_pkt (out_pkt),
    .out_ack (out_ack)
  );

endmodule
