// tb_torus_full_load: the network filled with packets, run to find out
// whether it keeps moving.
//
// Every processor sends packets back-to-back to random other routers, so the
// FIFOs fill. Each router has one input register, one FIFO and one output
// register shared by all directions. Router A's Arbitrator_Two can thus
// wait on router B's Arbitrator_One, which waits on B's full FIFO, which
// waits on B's Arbitrator_Two, which may in turn wait on A. A closed chain
// of such waits stops the network for good.
//
// The test checks that every packet delivered is correct, reaches the right
// router and keeps its order per source and destination. When traffic
// stops with packets still inside, it checks that the routers really form
// such a closed chain: following, from a blocked router, the neighbour its
// Arbitrator_Two is offering a packet to, through routers whose
// Arbitrator_One is held by a full FIFO, must lead back to a router already
// visited. It prints how many packets got through first and the chain.
module tb_torus_full_load;
  import torus_pkg::*;
  localparam int N = 16;
  localparam int PKTS = 30;

  logic  clk = 1'b0, rst_n = 1'b0;
  ppkt_t proc_in [N];
  logic  proc_in_ack [N];
  rpkt_t proc_out [N];
  logic  proc_out_ack [N];
  int    checks = 0, failures = 0;
  int    delivered = 0, sent = 0;
  int    last_seq [N][N];
  longint last_progress = 0, cyc = 0;
  // wait-for graph, sampled from the routers
  bit    blocked_in [N];   // Arbitrator_One holds a packet its full FIFO cannot take
  bit    offering   [N];   // Arbitrator_Two is offering a packet to a neighbour
  int    target     [N];   // that neighbour

  torus_top dut (.clk(clk), .rst_n(rst_n), .proc_in(proc_in), .proc_in_ack(proc_in_ack),
                 .proc_out(proc_out), .proc_out_ack(proc_out_ack));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  for (genvar ry = 0; ry < 4; ry++) begin : g_my
    for (genvar rx = 0; rx < 4; rx++) begin : g_mx
      localparam int R = 4 * ry + rx;
      always @(posedge clk) begin
        int d;
        blocked_in[R] = dut.g_y[ry].g_x[rx].u_router.u_arb1.busy &&
                        dut.g_y[ry].g_x[rx].u_router.fifo_in_ack;
        offering[R]   = dut.g_y[ry].g_x[rx].u_router.u_arb2.busy &&
                        dut.g_y[ry].g_x[rx].u_router.u_arb2.phase == 1;
        d = int'(dut.g_y[ry].g_x[rx].u_router.u_arb2.decision);
        target[R] = (d == 0) ? 4 * ry + (rx + 1) % 4 : (d == 1) ? 4 * ry + (rx + 3) % 4 :
                    (d == 2) ? 4 * ((ry + 1) % 4) + rx : 4 * ((ry + 3) % 4) + rx;
      end
    end
  end

  function automatic bit all_valid(input rpkt_t p);
    for (int i = 0; i < RPKT_W/2; i++) if (p[2*i+1] == p[2*i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic stream(input int src);
    for (int k = 0; k < PKTS; k++) begin
      int dst;
      do dst = $urandom % N; while (dst == src);
      while (proc_in_ack[src]) @(posedge clk);
      proc_in[src] = mk_ppkt(2'(dst % 4), 2'(dst / 4), {4'(src), 12'(k), 16'(dst)});
      while (!proc_in_ack[src]) @(posedge clk);
      sent++;
      last_progress = cyc;
      proc_in[src] = '0;
    end
  endtask

  task automatic receiver(input int r);
    forever begin
      @(posedge clk);
      if (all_valid(proc_out[r])) begin
        logic [31:0] d;
        int src, seq;
        d = dr_dec_data(proc_out[r][63:0]);
        src = int'(d[31:28]); seq = int'(d[27:16]);
        checks++;
        if (int'(d[15:0]) != r || seq <= last_seq[src][r]) begin
          failures++;
          $display("FAIL router %0d got %h", r, d);
        end
        last_seq[src][r] = seq;
        delivered++;
        last_progress = cyc;
        proc_out_ack[r] = 1'b1;
        while (proc_out[r] !== '0) @(posedge clk);
        proc_out_ack[r] = 1'b0;
      end
    end
  endtask

  initial begin
    for (int r = 0; r < N; r++) begin
      proc_in[r] = '0; proc_out_ack[r] = 1'b0;
      for (int s = 0; s < N; s++) last_seq[r][s] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < N; r++) fork automatic int j = r; receiver(j); stream(j); join_none
    while (cyc - last_progress < 2000 && delivered < N * PKTS) @(posedge clk);
    $display("sent %0d, delivered %0d of %0d, then %0s", sent, delivered, N * PKTS,
             (delivered < N * PKTS) ? "no progress for 2000 clocks" : "all delivered");
    if (delivered < N * PKTS) begin
      // follow the waits from every offering router; a closed chain must exist
      bit found;
      found = 1'b0;
      for (int start = 0; start < N && !found; start++) if (offering[start]) begin
        int r, steps;
        string chain;
        r = start; steps = 0; chain = $sformatf("%0d", start);
        while (steps < N && offering[r] && blocked_in[target[r]]) begin
          r = target[r]; steps++;
          chain = {chain, $sformatf(" -> %0d", r)};
          if (r == start) begin found = 1'b1; break; end
        end
        if (found) $display("closed chain of waits: %s", chain);
      end
      checks++;
      if (!found) begin failures++; $display("FAIL traffic stopped without a closed chain of waits"); end
    end
    checks++;
    if (delivered == 0) begin failures++; $display("FAIL nothing delivered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
