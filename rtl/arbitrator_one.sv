// arbitrator_one: the receiving side of a router (MUX_ONE, REGISTER,
// COMPARE_1 and DEMUX).
//
// Four neighbour channels come in (numbered by torus_pkg::port_e). A
// completion detector on each marks a complete packet; the round-robin
// scanner picks one, the packet is copied into the REGISTER and the sender is
// acknowledged (in_ack). COMPARE_1 (Algorithm 1) then says whether the packet
// has reached this router: if so the DEMUX hands it to the processor,
// otherwise to the FIFO. The acknowledges of the processor and the FIFO are
// merged with an OR, as in the document. When that acknowledge arrives the
// output is returned to EMPTY (the REGISTER's reset), and once the
// acknowledge falls and the sender has also returned to EMPTY the arbitrator
// scans again.
//
// The block structure, the round robin, the arrival rule and the OR of the
// two acknowledges follow the document. The control is written as a small
// clocked controller, because the gate-level circuits of MUX_ONE, REGISTER
// and DEMUX are not given; the release of the sender and the delivery of the
// packet run side by side.
//
// Interface: in_pkt/in_ack (x4), fifo_pkt/fifo_ack, proc_pkt/proc_ack, all
// four-phase dual-rail; location is plain binary.
// Timing (no contention, ready receiver): detect 1 clock, scan up to 4
// clocks, capture 1 clock, then the receiver's own acknowledge delay.
module arbitrator_one
  import torus_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  loc_t  location,
  input  rpkt_t in_pkt [NPORTS],
  output logic  in_ack [NPORTS],
  output rpkt_t fifo_pkt,
  input  logic  fifo_ack,
  output rpkt_t proc_pkt,
  input  logic  proc_ack
);

  typedef enum logic [1:0] {OUT_IDLE, OUT_VALID, OUT_RTZ} out_phase_e;

  logic [NPORTS-1:0] detect;
  logic [1:0]        ptr, sel;
  logic              grant, busy, in_held, arrived, ack_any;
  out_phase_e        phase;
  rpkt_t             register_q;

  for (genvar i = 0; i < NPORTS; i++) begin : g_det
    completion_detect #(.BITS(RPKT_W/2)) u_cd (
      .clk  (clk),
      .rst_n(rst_n),
      .rails(in_pkt[i]),
      .done (detect[i])
    );
  end

  rr_scanner #(.N(NPORTS)) u_scan (
    .clk  (clk),
    .rst_n(rst_n),
    .req  (detect),
    .busy (busy),
    .ptr  (ptr),
    .grant(grant)
  );

  compare_1 u_cmp (
    .location(location),
    .packet  (register_q),
    .arrived (arrived)
  );

  assign ack_any = fifo_ack | proc_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      in_held    <= 1'b0;
      sel        <= '0;
      phase      <= OUT_IDLE;
      register_q <= '0;
    end else if (grant) begin
      busy       <= 1'b1;
      in_held    <= 1'b1;
      sel        <= ptr;
      phase      <= OUT_VALID;
      register_q <= in_pkt[ptr];
    end else if (busy) begin
      if (in_held && !detect[sel]) in_held <= 1'b0;
      unique case (phase)
        OUT_VALID: if (ack_any)  phase <= OUT_RTZ;
        OUT_RTZ:   if (!ack_any) phase <= OUT_IDLE;
        default: ;
      endcase
      if (!in_held && phase == OUT_IDLE) busy <= 1'b0;
    end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) in_ack[i] = in_held && (sel == 2'(i));
    fifo_pkt = (phase == OUT_VALID && !arrived) ? register_q : '0;
    proc_pkt = (phase == OUT_VALID &&  arrived) ? register_q : '0;
  end

endmodule
