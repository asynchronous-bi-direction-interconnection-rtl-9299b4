// head_builder: turns a processor packet into a router packet (Algorithm 3).
//
// The processor only knows where a packet must go. The head builder compares
// the destination (X, Y) with the router's own location and adds one travel
// direction per dimension: with d = destination - location, d in {1, 2, -3}
// gives 01 (right for X, up for Y) and d in {0, -1, -2, 3} gives 10 (left /
// down). The rule and the field layout of both packet formats follow the
// document; see torus_pkg for the layout.
//
// The logic is combinational and keeps the dual-rail protocol: the two
// direction pairs stay EMPTY until all four coordinate pairs are valid, so
// the output word is complete exactly when the input word is, and returns to
// EMPTY with it. location is plain binary and held constant.
module head_builder
  import torus_pkg::*;
(
  input  loc_t  location,
  input  ppkt_t packet_in,
  output rpkt_t packet_out
);

  logic       coord_valid;
  logic [1:0] dst_x, dst_y;
  logic [1:0] x_direct, y_direct;

  always_comb begin
    coord_valid = (packet_in[71] | packet_in[70]) & (packet_in[69] | packet_in[68])
                & (packet_in[67] | packet_in[66]) & (packet_in[65] | packet_in[64]);
    dst_x    = {packet_in[71], packet_in[69]};
    dst_y    = {packet_in[67], packet_in[65]};
    x_direct = coord_valid ? dir_code(dst_x, location[3:2]) : 2'b00;
    y_direct = coord_valid ? dir_code(dst_y, location[1:0]) : 2'b00;
    packet_out = {x_direct, packet_in[71:68], y_direct, packet_in[67:0]};
  end

endmodule
