// compare_2: output-port decision of Arbitrator_Two (Algorithm 2).
//
// A packet first travels along X until its X coordinate matches the router,
// then along Y. While X differs the decision is 00 for X direction 01 (right)
// and 01 otherwise (left); once X matches it is 10 for Y direction 01 (up)
// and 11 otherwise (down). This X-then-Y order follows Algorithm 2 and the
// routing examples of the document. Purely combinational; the decision is
// the port number of torus_pkg::port_e.
module compare_2
  import torus_pkg::*;
(
  input  loc_t       location,
  input  rpkt_t      packet,
  output logic [1:0] decision
);

  logic       temp_x;
  logic [1:0] x_direct, y_direct;

  always_comb begin
    temp_x   = |({packet[73], packet[71]} ^ location[3:2]);
    x_direct = packet[75:74];
    y_direct = packet[69:68];
    if (temp_x) decision = (x_direct == DIR_POS) ? PORT_RIGHT : PORT_LEFT;
    else        decision = (y_direct == DIR_POS) ? PORT_UP    : PORT_DOWN;
  end

endmodule
