// tb_torus_top: end-to-end test of the 4 x 4 torus at its default size.
//
// Part 1 repeats the latency experiment of the design's evaluation: router
// (0,3) sends one packet at a time to each of the other fifteen routers of
// an idle network, and the testbench prints the latency in clocks as a 4 x 4
// table laid out like the grid, with the hop count of each path. Latency
// must grow with the hop count.
// Part 2 runs random traffic, fifteen processors each keeping one packet in
// flight; part 3 has every processor send back-to-back to one router
// whose processor accepts slowly, which fills the FIFOs on the way.
// (Open-loop random traffic at high load is not used: two neighbouring
// routers that both hold a full FIFO whose oldest packet is bound for the
// other wait on each other for ever; see the design notes.)
// Throughout, every packet is traced through the routers that take it in;
// the testbench checks that the path equals the one worked out here from the
// routing rule (direction chosen at the source by d = dst - src, d in
// {1, 2, -3} -> right/up; X first, then Y), that the packet reaches the
// right processor with the expected head and payload, and that packets
// between one pair of routers arrive in the order sent. It also counts the
// mechanisms of the design and fails if one never happened: head building,
// delivery, forwarding through a FIFO, use of the wrap-around links, input
// contention in both arbitrators, and FIFO back-pressure.
module tb_torus_top;
  import torus_pkg::*;
  localparam int N = 16;
  localparam int RANDOM_PER_NODE = 25;
  localparam int BURST_PER_NODE  = 8;
  localparam int HOT = 6;   // router (2,1)

  logic  clk = 1'b0, rst_n = 1'b0;
  ppkt_t proc_in [N];
  logic  proc_in_ack [N];
  rpkt_t proc_out [N];
  logic  proc_out_ack [N];

  int    checks = 0, failures = 0;
  rpkt_t exp_pkt [int];
  int    exp_path [int][$];
  int    got_path [int][$];
  longint t_sent [int];
  int    last_seq [N][N];
  int    seq_next [N];
  int    slow_rx = 0;
  int    in_flight = 0;
  int    outst [N];
  int    senders_done = 0;
  int    lat_tab [N];
  int    hops_tab [N];
  // mechanism counters
  int    n_heads = 0, n_delivered = 0, n_forwarded = 0, n_wrap = 0;
  int    n_arb1_contend = 0, n_arb2_contend = 0, n_fifo_stall = 0;
  longint cyc = 0;

  torus_top dut (.clk(clk), .rst_n(rst_n), .proc_in(proc_in), .proc_in_ack(proc_in_ack),
                 .proc_out(proc_out), .proc_out_ack(proc_out_ack));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic bit all_valid(input rpkt_t p);
    for (int i = 0; i < RPKT_W/2; i++) if (p[2*i+1] == p[2*i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [1:0] ref_dir(input int d);
    return (d == 1 || d == 2 || d == -3) ? 2'b01 : 2'b10;
  endfunction

  // a random destination reached from src by right and up moves only
  function automatic int pos_dst(input int src);
    int sx, sy, dx, dy;
    sx = src % 4; sy = src / 4;
    do begin
      int cx, cy;
      cx = $urandom % 3; cy = $urandom % 3;
      dx = (cx == 0) ? sx : (cx == 1 || sx >= 2) ? (sx + 1) % 4 : sx + 2;
      dy = (cy == 0) ? sy : (cy == 1 || sy >= 2) ? (sy + 1) % 4 : sy + 2;
    end while (dx == sx && dy == sy);
    return 4 * dy + dx;
  endfunction

  function automatic int pkt_id(input rpkt_t p);
    logic [31:0] d;
    d = dr_dec_data(p[63:0]);
    return int'(d[31:28]) * 4096 + int'(d[27:16]);
  endfunction

  // send one packet from router src to router dst and register what is
  // expected of it
  task automatic send(input int src, input int dst, input int gap);
    int sx, sy, dx, dy, x, y, seq, id;
    logic [1:0] xd, yd;
    logic [31:0] d;
    sx = src % 4; sy = src / 4; dx = dst % 4; dy = dst / 4;
    xd = ref_dir(dx - sx); yd = ref_dir(dy - sy);
    seq = seq_next[src]++;
    id = src * 4096 + seq;
    d = {4'(src), 12'(seq), 16'($urandom)};
    repeat ($urandom % (gap + 1)) @(posedge clk);
    while (proc_in_ack[src]) @(posedge clk);
    exp_pkt[id] = {xd, dr_enc2(2'(dx)), yd, dr_enc2(2'(dy)), dr_enc_data(d)};
    exp_path[id] = {};
    x = sx; y = sy;
    while (x != dx || y != dy) begin
      if (x != dx) x = (xd == 2'b01) ? (x + 1) % 4 : (x + 3) % 4;
      else         y = (yd == 2'b01) ? (y + 1) % 4 : (y + 3) % 4;
      exp_path[id].push_back(4 * y + x);
    end
    got_path[id] = {};
    t_sent[id] = cyc;
    in_flight++;
    outst[src]++;
    proc_in[src] = mk_ppkt(2'(dx), 2'(dy), d);
    n_heads++;
    while (!proc_in_ack[src]) @(posedge clk);
    proc_in[src] = '0;
  endtask

  task automatic receiver(input int r);
    forever begin
      rpkt_t p;
      int id, src, seq;
      @(posedge clk);
      p = proc_out[r];
      if (all_valid(p)) begin
        id = pkt_id(p); src = id / 4096; seq = id % 4096;
        checks++;
        if (!exp_pkt.exists(id) || exp_pkt[id] !== p) begin
          failures++;
          $display("FAIL router %0d got unexpected packet %h", r, p[75:64]);
        end else begin
          checks++;
          if ({p[73], p[71]} != 2'(r % 4) || {p[67], p[65]} != 2'(r / 4)) begin
            failures++; $display("FAIL packet for another router delivered at %0d", r);
          end
          checks++;
          if (got_path[id] != exp_path[id]) begin
            failures++;
            $display("FAIL packet %0d path %p, expected %p", id, got_path[id], exp_path[id]);
          end
          checks++;
          if (seq <= last_seq[src][r]) begin failures++; $display("FAIL order %0d->%0d", src, r); end
          last_seq[src][r] = seq;
          lat_tab[r] = int'(cyc - t_sent[id]);
          hops_tab[r] = exp_path[id].size();
          exp_pkt.delete(id);
          n_delivered++;
          in_flight--;
          outst[src]--;
        end
        repeat ($urandom % ((slow_rx && r == HOT) ? 20 : 4)) @(posedge clk);
        proc_out_ack[r] = 1'b1;
        while (proc_out[r] !== '0) @(posedge clk);
        repeat ($urandom % 3) @(posedge clk);
        proc_out_ack[r] = 1'b0;
      end
    end
  endtask

  // per-router monitors: trace packets into each Arbitrator_One and count
  // the mechanisms
  for (genvar ry = 0; ry < 4; ry++) begin : g_my
    for (genvar rx = 0; rx < 4; rx++) begin : g_mx
      localparam int R = 4 * ry + rx;
      int stall_len = 0;
      always @(posedge clk) begin
        if (dut.g_y[ry].g_x[rx].u_router.u_arb1.grant) begin
          int id, nreq;
          id = pkt_id(dut.g_y[ry].g_x[rx].u_router.u_arb1.in_pkt[dut.g_y[ry].g_x[rx].u_router.u_arb1.ptr]);
          if (got_path.exists(id)) got_path[id].push_back(R);
          nreq = $countones(dut.g_y[ry].g_x[rx].u_router.u_arb1.detect);
          if (nreq > 1) n_arb1_contend++;
          if (id / 4096 < N && exp_path.exists(id) && exp_path[id].size() > 0 &&
              exp_path[id][exp_path[id].size()-1] != R) n_forwarded++;
        end
        if (dut.g_y[ry].g_x[rx].u_router.u_arb2.grant &&
            dut.g_y[ry].g_x[rx].u_router.u_arb2.detect == 2'b11) n_arb2_contend++;
        // a packet that enters a flowing FIFO frees its first stage within
        // four clocks; a first stage held for longer means the FIFO is full
        if (dut.g_y[ry].g_x[rx].u_router.fifo_in_ack) begin
          stall_len++;
          if (stall_len == 10) n_fifo_stall++;
        end else stall_len = 0;
      end
      // wrap-around links: right from x=3, left from x=0, up from y=3,
      // down from y=0; one count per acknowledged transfer
      bit g_prev_ack [NPORTS] = '{default: 1'b0};
      always @(ev_dump)
        $display("  router %0d: arb1 busy %0b held %0b phase %0d sel %0d, FIFO acks %0b %0b, arb2 busy %0b phase %0d sel %0d port %0d",
                 R, dut.g_y[ry].g_x[rx].u_router.u_arb1.busy, dut.g_y[ry].g_x[rx].u_router.u_arb1.in_held,
                 dut.g_y[ry].g_x[rx].u_router.u_arb1.phase, dut.g_y[ry].g_x[rx].u_router.u_arb1.sel,
                 dut.g_y[ry].g_x[rx].u_router.fifo_in_ack, dut.g_y[ry].g_x[rx].u_router.fifo_out_ack,
                 dut.g_y[ry].g_x[rx].u_router.u_arb2.busy, dut.g_y[ry].g_x[rx].u_router.u_arb2.phase,
                 dut.g_y[ry].g_x[rx].u_router.u_arb2.sel, dut.g_y[ry].g_x[rx].u_router.u_arb2.decision);
      always @(posedge clk) begin
        for (int p = 0; p < NPORTS; p++) begin
          bit edge_port;
          edge_port = (p == PORT_RIGHT && rx == 3) || (p == PORT_LEFT && rx == 0) ||
                      (p == PORT_UP && ry == 3) || (p == PORT_DOWN && ry == 0);
          if (edge_port && dut.link_ack[R][p] && !g_prev_ack[p]) n_wrap++;
          g_prev_ack[p] = dut.link_ack[R][p];
        end
      end
    end
  end

  int part = 1;
  event ev_dump;

  initial begin
    for (int r = 0; r < N; r++) begin
      proc_in[r] = '0; proc_out_ack[r] = 1'b0; seq_next[r] = 0; outst[r] = 0; lat_tab[r] = 0; hops_tab[r] = 0;
      for (int s = 0; s < N; s++) last_seq[r][s] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < N; r++) fork automatic int j = r; receiver(j); join_none
    repeat (10) @(posedge clk);

    // part 1: latency from router (0,3) to every router, one packet at a time
    for (int dst = 0; dst < N; dst++) if (dst != 12) begin
      send(12, dst, 0);
      while (in_flight != 0) @(posedge clk);
      repeat (10) @(posedge clk);
    end
    $display("latency in clocks from (0,3), rows y=3..0, columns x=0..3 (hops):");
    for (int y = 3; y >= 0; y--)
      $display("  %4d(%0d) %4d(%0d) %4d(%0d) %4d(%0d)", lat_tab[4*y], hops_tab[4*y],
               lat_tab[4*y+1], hops_tab[4*y+1], lat_tab[4*y+2], hops_tab[4*y+2],
               lat_tab[4*y+3], hops_tab[4*y+3]);
    for (int a = 0; a < N; a++) for (int b = 0; b < N; b++)
      if (a != 12 && b != 12 && hops_tab[a] < hops_tab[b]) begin
        checks++;
        if (lat_tab[a] >= lat_tab[b]) begin
          failures++; $display("FAIL latency to %0d not below latency to %0d", a, b);
        end
      end

    part = 2;
    // part 2: random traffic from fifteen processors, each keeping one
    // packet in flight and sending only to routers reached through right and
    // up moves. A waiting cycle needs four packets in each router of a ring
    // of four, so fifteen packets can never lock the network.
    for (int r = 1; r < N; r++) fork
      automatic int s = r;
      begin
        for (int k = 0; k < RANDOM_PER_NODE; k++) begin
          send(s, pos_dst(s), 6);
          while (outst[s] != 0) @(posedge clk);
        end
        senders_done++;
      end
    join_none
    while (senders_done != N - 1) @(posedge clk);
    senders_done = 0;
    while (in_flight != 0) @(posedge clk);

    part = 3;
    // part 3: every other processor sends back-to-back to router (2,1),
    // whose processor takes its packets slowly
    slow_rx = 1;
    for (int r = 0; r < N; r++) if (r != HOT) fork
      automatic int s = r;
      begin
        for (int k = 0; k < BURST_PER_NODE; k++) send(s, HOT, 0);
        senders_done++;
      end
    join_none
    while (senders_done != N - 1) @(posedge clk);
    while (in_flight != 0) @(posedge clk);
    repeat (20) @(posedge clk);

    checks++;
    if (exp_pkt.num() != 0) begin failures++; $display("FAIL %0d packets lost", exp_pkt.num()); end
    $display("heads built %0d, delivered %0d, forwarded through a FIFO %0d, wrap-link transfers %0d",
             n_heads, n_delivered, n_forwarded, n_wrap);
    $display("arbitrator_one contention %0d, arbitrator_two contention %0d, FIFO stalls %0d",
             n_arb1_contend, n_arb2_contend, n_fifo_stall);
    checks++; if (n_heads == 0)        begin failures++; $display("FAIL no head built"); end
    checks++; if (n_delivered != n_heads) begin failures++; $display("FAIL delivered %0d of %0d", n_delivered, n_heads); end
    checks++; if (n_forwarded == 0)    begin failures++; $display("FAIL nothing forwarded"); end
    checks++; if (n_wrap == 0)         begin failures++; $display("FAIL wrap links unused"); end
    checks++; if (n_arb1_contend == 0) begin failures++; $display("FAIL no Arbitrator_One contention"); end
    checks++; if (n_arb2_contend == 0) begin failures++; $display("FAIL no Arbitrator_Two contention"); end
    checks++; if (n_fifo_stall == 0)   begin failures++; $display("FAIL no FIFO back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: %0d packets still in flight in part %0d", in_flight, part);
    -> ev_dump;
    for (int r = 0; r < N; r++) if (proc_in[r] !== '0 || proc_in_ack[r] || outst[r] != 0)
      $display("  processor %0d: offering %0b, ack %0b, outstanding %0d", r, proc_in[r] !== '0,
               proc_in_ack[r], outst[r]);
    foreach (exp_pkt[id]) $display("  missing packet %0d, path so far %p, expected %p", id, got_path[id], exp_path[id]);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
