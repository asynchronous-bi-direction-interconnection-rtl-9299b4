// arbitrator_two: the sending side of a router (Head-builder, MUX, REGISTER,
// COMPARE_2 and DEMUX_2).
//
// Two channels come in: packets from the FIFO, which already carry their
// travel directions, and new packets from the processor, which pass through
// the head builder first (Algorithm 3). A completion detector on each marks
// a complete packet and a two-way round-robin scanner picks one, so neither
// source can starve the other. The packet is copied into the REGISTER and
// its source acknowledged; COMPARE_2 (Algorithm 2) picks the neighbour port,
// DEMUX_2 drives the packet onto it and waits for that neighbour's
// acknowledge, then returns the port to EMPTY and waits for the acknowledge
// to fall.
//
// Structure, round robin and routing rule follow the document; the clocked
// controller is this design's own, as the gate-level circuits of MUX,
// REGISTER and DEMUX_2 are not given.
//
// Interface: fifo_pkt/fifo_ack, proc_pkt/proc_ack (72-wire processor
// format), out_pkt/out_ack (x4, by torus_pkg::port_e), all four-phase
// dual-rail; location is plain binary.
// Timing: as arbitrator_one, with a two-entry scan.
module arbitrator_two
  import torus_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  loc_t  location,
  input  rpkt_t fifo_pkt,
  output logic  fifo_ack,
  input  ppkt_t proc_pkt,
  output logic  proc_ack,
  output rpkt_t out_pkt [NPORTS],
  input  logic  out_ack [NPORTS]
);

  typedef enum logic [1:0] {OUT_IDLE, OUT_VALID, OUT_RTZ} out_phase_e;

  localparam int SRC_FIFO = 0;
  localparam int SRC_PROC = 1;

  rpkt_t      src_pkt [2];
  logic [1:0] detect;
  logic       ptr, sel;
  logic       grant, busy, in_held, ack_sel;
  logic [1:0] decision;
  out_phase_e phase;
  rpkt_t      register_q;

  assign src_pkt[SRC_FIFO] = fifo_pkt;

  head_builder u_hb (
    .location  (location),
    .packet_in (proc_pkt),
    .packet_out(src_pkt[SRC_PROC])
  );

  for (genvar i = 0; i < 2; i++) begin : g_det
    completion_detect #(.BITS(RPKT_W/2)) u_cd (
      .clk  (clk),
      .rst_n(rst_n),
      .rails(src_pkt[i]),
      .done (detect[i])
    );
  end

  rr_scanner #(.N(2)) u_scan (
    .clk  (clk),
    .rst_n(rst_n),
    .req  (detect),
    .busy (busy),
    .ptr  (ptr),
    .grant(grant)
  );

  compare_2 u_cmp (
    .location(location),
    .packet  (register_q),
    .decision(decision)
  );

  assign ack_sel = out_ack[decision];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      in_held    <= 1'b0;
      sel        <= 1'b0;
      phase      <= OUT_IDLE;
      register_q <= '0;
    end else if (grant) begin
      busy       <= 1'b1;
      in_held    <= 1'b1;
      sel        <= ptr;
      phase      <= OUT_VALID;
      register_q <= src_pkt[ptr];
    end else if (busy) begin
      if (in_held && !detect[sel]) in_held <= 1'b0;
      unique case (phase)
        OUT_VALID: if (ack_sel)  phase <= OUT_RTZ;
        OUT_RTZ:   if (!ack_sel) phase <= OUT_IDLE;
        default: ;
      endcase
      if (!in_held && phase == OUT_IDLE) busy <= 1'b0;
    end
  end

  always_comb begin
    fifo_ack = in_held && (sel == 1'(SRC_FIFO));
    proc_ack = in_held && (sel == 1'(SRC_PROC));
    for (int i = 0; i < NPORTS; i++)
      out_pkt[i] = (phase == OUT_VALID && decision == 2'(i)) ? register_q : '0;
  end

endmodule
