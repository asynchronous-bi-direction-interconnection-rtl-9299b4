// torus_top: the 4 x 4 bi-directional torus network.
//
// Sixteen identical routers sit on an X-Y grid; router (x, y) has index
// 4*y + x and location {x, y}. X grows to the right and Y upwards, and each
// row and column closes into a ring, so (0, y) and (3, y) are neighbours, as
// are (x, 0) and (x, 3). Every router drives one channel to each of its four
// neighbours, 64 channels in all. Packets travel first along X, then along
// Y, each way in the direction fixed by the source router's head builder;
// every packet between the same two routers therefore takes the same path
// and packets arrive in the order they were sent.
//
// The processors are not part of the network: each router's processor
// channels are brought out as ports, indexed by router index.
//   proc_in[r]/proc_in_ack[r]   new packets into router r (72 wires)
//   proc_out[r]/proc_out_ack[r] packets delivered by router r (76 wires)
// All channels are four-phase dual-rail (see torus_pkg).
module torus_top
  import torus_pkg::*;
#(
  parameter int unsigned FIFO_STAGES = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ppkt_t proc_in      [NODES_X*NODES_Y],
  output logic  proc_in_ack  [NODES_X*NODES_Y],
  output rpkt_t proc_out     [NODES_X*NODES_Y],
  input  logic  proc_out_ack [NODES_X*NODES_Y]
);

  localparam int unsigned N = NODES_X * NODES_Y;

  // link_pkt[r][p]: what router r drives towards its neighbour on side p;
  // link_ack[r][p]: that neighbour's acknowledge of it.
  rpkt_t link_pkt [N][NPORTS];
  logic  link_ack [N][NPORTS];
  rpkt_t rin_pkt  [N][NPORTS];
  logic  rin_ack  [N][NPORTS];

  for (genvar y = 0; y < NODES_Y; y++) begin : g_y
    for (genvar x = 0; x < NODES_X; x++) begin : g_x
      localparam int R  = NODES_X*y + x;
      localparam int RR = NODES_X*y + (x + 1) % NODES_X;             // right
      localparam int RL = NODES_X*y + (x + NODES_X - 1) % NODES_X;   // left
      localparam int RU = NODES_X*((y + 1) % NODES_Y) + x;           // up
      localparam int RD = NODES_X*((y + NODES_Y - 1) % NODES_Y) + x; // down

      // A packet entering on side p comes from the neighbour on side p,
      // which sends it through its port on the opposite side.
      assign rin_pkt[R][PORT_LEFT]  = link_pkt[RL][PORT_RIGHT];
      assign rin_pkt[R][PORT_RIGHT] = link_pkt[RR][PORT_LEFT];
      assign rin_pkt[R][PORT_DOWN]  = link_pkt[RD][PORT_UP];
      assign rin_pkt[R][PORT_UP]    = link_pkt[RU][PORT_DOWN];

      assign link_ack[R][PORT_RIGHT] = rin_ack[RR][PORT_LEFT];
      assign link_ack[R][PORT_LEFT]  = rin_ack[RL][PORT_RIGHT];
      assign link_ack[R][PORT_UP]    = rin_ack[RU][PORT_DOWN];
      assign link_ack[R][PORT_DOWN]  = rin_ack[RD][PORT_UP];

      router #(.FIFO_STAGES(FIFO_STAGES)) u_router (
        .clk         (clk),
        .rst_n       (rst_n),
        .location    ({2'(x), 2'(y)}),
        .in_pkt      (rin_pkt[R]),
        .in_ack      (rin_ack[R]),
        .out_pkt     (link_pkt[R]),
        .out_ack     (link_ack[R]),
        .proc_in     (proc_in[R]),
        .proc_in_ack (proc_in_ack[R]),
        .proc_out    (proc_out[R]),
        .proc_out_ack(proc_out_ack[R])
      );
    end
  end

endmodule
