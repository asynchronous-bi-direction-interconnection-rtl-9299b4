// compare_1: arrival check of Arbitrator_One (Algorithm 1).
//
// Temp_X is the OR of the XORs of the packet's X coordinate and the router's
// X location, Temp_Y likewise for Y. The packet has arrived when both are 0;
// then it goes to the processor, otherwise to the FIFO. The coordinates are
// read from the true rails of the router packet, wires 73/71 (X) and 67/65
// (Y), as the document gives them. Purely combinational.
module compare_1
  import torus_pkg::*;
(
  input  loc_t  location,
  input  rpkt_t packet,
  output logic  arrived    // 1: to processor, 0: to FIFO
);

  logic temp_x, temp_y;

  always_comb begin
    temp_x  = |({packet[73], packet[71]} ^ location[3:2]);
    temp_y  = |({packet[67], packet[65]} ^ location[1:0]);
    arrived = ~(temp_x | temp_y);
  end

endmodule
