// torus_pkg: types, constants and helper functions shared by the torus
// network.
//
// Every channel in the network carries dual-rail data: each logical bit is a
// pair of wires {t, f}. {0,0} is EMPTY, {0,1} is a valid 0, {1,0} is a valid
// 1 and {1,1} is never used. Bit i of a word sits on wires [2i+1:2i], with
// the true rail on the odd wire. A packet is handed over with the four-phase,
// return-to-zero protocol: the sender drives a complete valid codeword, the
// receiver raises ack, the sender returns every wire to EMPTY, the receiver
// drops ack.
//
// Two packet formats exist (wire positions, not logical bits):
//   processor -> router, 72 wires: [71:68] X coordinate, [67:64] Y
//                                  coordinate, [63:0] 32 data bits
//   router -> router,    76 wires: [75:74] X direction, [73:70] X
//                                  coordinate, [69:68] Y direction,
//                                  [67:64] Y coordinate, [63:0] 32 data bits
// The true rails of the X coordinate are wires 73 and 71, of Y 67 and 65.
// A direction pair of 01 means right (X) or up (Y); 10 means left or down.
// These field positions follow the document; the pin order inside a pair
// and the 01/10 meaning of the direction code follow it too.
//
// The router location is 4 plain binary bits {X[1:0], Y[1:0]}.
package torus_pkg;

  localparam int unsigned NODES_X  = 4;   // routers per row
  localparam int unsigned NODES_Y  = 4;   // routers per column
  localparam int unsigned COORD_W  = 2;   // bits per coordinate
  localparam int unsigned DATA_W   = 32;  // payload bits
  localparam int unsigned PPKT_W   = 72;  // processor packet wires
  localparam int unsigned RPKT_W   = 76;  // router packet wires
  localparam int unsigned NPORTS   = 4;   // neighbour ports per router

  typedef logic [PPKT_W-1:0] ppkt_t;
  typedef logic [RPKT_W-1:0] rpkt_t;
  typedef logic [2*COORD_W-1:0] loc_t;  // {x, y}

  // Neighbour port numbers. The output chosen by Algorithm 2 is this number
  // (DECISION 00 right, 01 left, 10 up, 11 down); an input is numbered by
  // the side it arrives from.
  typedef enum logic [1:0] {
    PORT_RIGHT = 2'b00,
    PORT_LEFT  = 2'b01,
    PORT_UP    = 2'b10,
    PORT_DOWN  = 2'b11
  } port_e;

  localparam logic [1:0] DIR_POS = 2'b01;  // right / up
  localparam logic [1:0] DIR_NEG = 2'b10;  // left / down

  // Encode one 2-bit coordinate as four dual-rail wires.
  function automatic logic [3:0] dr_enc2(input logic [1:0] v);
    return {v[1], ~v[1], v[0], ~v[0]};
  endfunction

  // Encode the 32-bit payload as 64 dual-rail wires.
  function automatic logic [2*DATA_W-1:0] dr_enc_data(input logic [DATA_W-1:0] v);
    logic [2*DATA_W-1:0] r;
    for (int i = 0; i < DATA_W; i++) r[2*i +: 2] = {v[i], ~v[i]};
    return r;
  endfunction

  // Decode the true rails of a dual-rail payload.
  function automatic logic [DATA_W-1:0] dr_dec_data(input logic [2*DATA_W-1:0] r);
    logic [DATA_W-1:0] v;
    for (int i = 0; i < DATA_W; i++) v[i] = r[2*i+1];
    return v;
  endfunction

  // Build a processor packet addressed to (x, y).
  function automatic ppkt_t mk_ppkt(input logic [1:0] x, input logic [1:0] y,
                                    input logic [DATA_W-1:0] data);
    return {dr_enc2(x), dr_enc2(y), dr_enc_data(data)};
  endfunction

  // Destination coordinates carried by a router packet.
  function automatic logic [1:0] rpkt_x(input rpkt_t p);
    return {p[73], p[71]};
  endfunction
  function automatic logic [1:0] rpkt_y(input rpkt_t p);
    return {p[67], p[65]};
  endfunction

  // Algorithm 3 / Table 6: direction code for d = destination - local,
  // d in -3..3. 1, 2 and -3 give 01; 0, -1, -2 and 3 give 10.
  function automatic logic [1:0] dir_code(input logic [1:0] dst, input logic [1:0] loc);
    int d;
    d = int'(dst) - int'(loc);
    return (d == 1 || d == 2 || d == -3) ? DIR_POS : DIR_NEG;
  endfunction

endpackage
