// tb_arbitrator_two: a FIFO sender (router packets with random directions)
// and a processor sender (processor packets, heads built inside) compete for
// the four neighbour outputs, whose receivers acknowledge after random
// delays. Checks: each packet leaves on the port the routing rule gives
// (X first while X differs, in the packet's X direction, then Y), with the
// head the rule of Table 6 gives for processor packets and the payload
// intact; packets of one source keep their order; the two sources alternate
// under load (neither waits for more than two packets of the other); a lone
// processor packet takes 2 to 3 clocks to appear on its port.
module tb_arbitrator_two;
  import torus_pkg::*;
  localparam int PER_SRC = 150;
  localparam loc_t LOC = 4'b0110;  // (1,2)

  logic  clk = 1'b0, rst_n = 1'b0;
  rpkt_t fifo_pkt;
  ppkt_t proc_pkt;
  logic  fifo_ack, proc_ack;
  rpkt_t out_pkt [NPORTS];
  logic  out_ack [NPORTS];
  int    checks = 0, failures = 0;
  rpkt_t expq [2][$];
  int    n_port [NPORTS];
  int    wait_cnt [2];
  bit    presenting [2];
  int    worst_wait = 0;

  arbitrator_two dut (.clk(clk), .rst_n(rst_n), .location(LOC), .fifo_pkt(fifo_pkt),
                      .fifo_ack(fifo_ack), .proc_pkt(proc_pkt), .proc_ack(proc_ack),
                      .out_pkt(out_pkt), .out_ack(out_ack));

  always #5 clk = ~clk;

  function automatic bit all_valid(input rpkt_t p);
    for (int i = 0; i < RPKT_W/2; i++) if (p[2*i+1] == p[2*i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [1:0] ref_dir(input int d);
    return (d == 1 || d == 2 || d == -3) ? 2'b01 : 2'b10;
  endfunction

  function automatic int ref_port(input rpkt_t p);
    if ({p[73], p[71]} != LOC[3:2]) return (p[75:74] == 2'b01) ? 0 : 1;
    return (p[69:68] == 2'b01) ? 2 : 3;
  endfunction

  task automatic send_fifo(input int n, input int gap);
    for (int k = 0; k < n; k++) begin
      rpkt_t p;
      p = {($urandom % 2) ? 2'b01 : 2'b10, dr_enc2(2'($urandom)),
           ($urandom % 2) ? 2'b01 : 2'b10, dr_enc2(2'($urandom)),
           dr_enc_data({4'd0, 12'($urandom), 16'(k)})};
      repeat ($urandom % (gap + 1)) @(posedge clk);
      while (fifo_ack) @(posedge clk);
      fifo_pkt = p; expq[0].push_back(p); presenting[0] = 1; wait_cnt[0] = 0;
      while (!fifo_ack) @(posedge clk);
      presenting[0] = 0;
      fifo_pkt = '0;
    end
  endtask

  task automatic send_proc(input int n, input int gap);
    for (int k = 0; k < n; k++) begin
      logic [1:0] x, y;
      logic [31:0] d;
      x = 2'($urandom); y = 2'($urandom);
      if ({x, y} == LOC) x = x + 2'd1;
      d = {4'd1, 12'($urandom), 16'(k)};
      repeat ($urandom % (gap + 1)) @(posedge clk);
      while (proc_ack) @(posedge clk);
      proc_pkt = mk_ppkt(x, y, d);
      expq[1].push_back({ref_dir(int'(x) - int'(LOC[3:2])), dr_enc2(x),
                         ref_dir(int'(y) - int'(LOC[1:0])), dr_enc2(y), dr_enc_data(d)});
      presenting[1] = 1; wait_cnt[1] = 0;
      while (!proc_ack) @(posedge clk);
      presenting[1] = 0;
      proc_pkt = '0;
    end
  endtask

  task automatic receiver(input int port);
    forever begin
      rpkt_t p;
      int src;
      @(posedge clk);
      p = out_pkt[port];
      if (all_valid(p)) begin
        src = int'(dr_dec_data(p[63:0]) >> 28);
        checks++;
        if (src > 1 || expq[src].size() == 0 || p !== expq[src][0]) begin
          failures++;
          $display("FAIL unexpected packet on port %0d: %h", port, p);
        end else void'(expq[src].pop_front());
        checks++;
        if (ref_port(p) != port) begin
          failures++;
          $display("FAIL packet %h on port %0d, expected %0d", p[75:64], port, ref_port(p));
        end
        n_port[port]++;
        repeat ($urandom % 4) @(posedge clk);
        out_ack[port] = 1'b1;
        while (out_pkt[port] !== '0) @(posedge clk);
        repeat ($urandom % 3) @(posedge clk);
        out_ack[port] = 1'b0;
      end
    end
  endtask

  always @(posedge clk) begin
    int busy_ports;
    busy_ports = 0;
    for (int i = 0; i < NPORTS; i++) busy_ports += int'(out_pkt[i] !== '0);
    if (busy_ports > 1) begin failures++; $display("FAIL %0d ports driven", busy_ports); end
    if (fifo_ack && proc_ack) begin failures++; $display("FAIL both sources acknowledged"); end
    if (dut.grant) for (int i = 0; i < 2; i++)
      if (presenting[i] && i != int'(dut.ptr)) begin
        wait_cnt[i]++;
        if (wait_cnt[i] > worst_wait) worst_wait = wait_cnt[i];
      end
  end

  initial begin
    int t;
    fifo_pkt = '0; proc_pkt = '0; presenting[0] = 0; presenting[1] = 0;
    for (int i = 0; i < NPORTS; i++) begin out_ack[i] = 1'b0; n_port[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NPORTS; i++) fork automatic int j = i; receiver(j); join_none
    repeat (5) @(posedge clk);
    // lone processor packet: (1,2) -> (3,2): X differs, d = 2 -> right
    @(negedge clk);
    proc_pkt = mk_ppkt(2'd3, 2'd2, {4'd1, 28'd7});
    expq[1].push_back({2'b01, dr_enc2(2'd3), 2'b10, dr_enc2(2'd2), dr_enc_data({4'd1, 28'd7})});
    t = 0;
    while (out_pkt[PORT_RIGHT] === '0) begin @(posedge clk); #1; t++; end
    checks++;
    if (t < 2 || t > 3) begin failures++; $display("FAIL lone latency %0d", t); end
    while (!proc_ack) @(posedge clk);
    proc_pkt = '0;
    repeat (20) @(posedge clk);
    fork send_fifo(PER_SRC, 0); send_proc(PER_SRC, 0); join
    fork send_fifo(PER_SRC, 6); send_proc(PER_SRC, 6); join
    repeat (50) @(posedge clk);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (expq[i].size() != 0) begin failures++; $display("FAIL source %0d lost %0d", i, expq[i].size()); end
    end
    for (int i = 0; i < NPORTS; i++) begin
      checks++;
      if (n_port[i] == 0) begin failures++; $display("FAIL port %0d never used", i); end
    end
    checks++;
    if (worst_wait > 2) begin failures++; $display("FAIL a source waited for %0d packets", worst_wait); end
    $display("per port: %0d %0d %0d %0d, longest wait %0d", n_port[0], n_port[1], n_port[2],
             n_port[3], worst_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
