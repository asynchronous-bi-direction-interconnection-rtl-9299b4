// tb_arbitrator_one: four neighbour senders offer packets, some addressed to
// this router and some passing through, while two receivers (processor and
// FIFO) acknowledge after random delays. Checks: each packet leaves on the
// right output (arrived -> processor, else FIFO) with its wires intact;
// packets of one sender keep their order; round robin (a sender waits for
// at most four other packets once it presents one); only one sender is
// acknowledged at a time; latency of a lone packet is 2 to 5 clocks.
// Each packet carries its sender and sequence number in its payload.
module tb_arbitrator_one;
  import torus_pkg::*;
  localparam int PER_SRC = 60;
  localparam loc_t LOC = 4'b1001;  // (2,1)

  logic  clk = 1'b0, rst_n = 1'b0;
  rpkt_t in_pkt [NPORTS];
  logic  in_ack [NPORTS];
  rpkt_t fifo_pkt, proc_pkt;
  logic  fifo_ack, proc_ack;
  int    checks = 0, failures = 0;
  rpkt_t expq [NPORTS][$];
  int    waiting_others [NPORTS];   // packets served since sender presented
  bit    presenting [NPORTS];
  int    n_proc = 0, n_fifo = 0, done_src = 0, worst_wait = 0;

  arbitrator_one dut (.clk(clk), .rst_n(rst_n), .location(LOC), .in_pkt(in_pkt),
                      .in_ack(in_ack), .fifo_pkt(fifo_pkt), .fifo_ack(fifo_ack),
                      .proc_pkt(proc_pkt), .proc_ack(proc_ack));

  always #5 clk = ~clk;

  function automatic bit all_valid(input rpkt_t p);
    for (int i = 0; i < RPKT_W/2; i++) if (p[2*i+1] == p[2*i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic rpkt_t mk(input int src, input int seq, input bit local_dst);
    logic [1:0] x, y;
    if (local_dst) begin x = LOC[3:2]; y = LOC[1:0]; end
    else begin
      do begin x = 2'($urandom); y = 2'($urandom); end while ({x, y} == LOC);
    end
    return {($urandom % 2) ? 2'b01 : 2'b10, dr_enc2(x), ($urandom % 2) ? 2'b01 : 2'b10,
            dr_enc2(y), dr_enc_data({4'(src), 12'($urandom), 16'(seq)})};
  endfunction

  task automatic sender(input int src, input int n, input int max_gap);
    for (int k = 0; k < n; k++) begin
      rpkt_t p;
      p = mk(src, k, ($urandom % 3) == 0);
      repeat ($urandom % (max_gap + 1)) @(posedge clk);
      while (in_ack[src]) @(posedge clk);
      in_pkt[src] = p;
      expq[src].push_back(p);
      presenting[src] = 1'b1;
      waiting_others[src] = 0;
      while (!in_ack[src]) @(posedge clk);
      presenting[src] = 1'b0;
      in_pkt[src] = '0;
    end
  endtask

  task automatic receiver(input bit is_proc);
    forever begin
      rpkt_t p;
      int src;
      @(posedge clk);
      p = is_proc ? proc_pkt : fifo_pkt;
      if (all_valid(p)) begin
        src = int'(dr_dec_data(p[63:0]) >> 28);
        checks++;
        if (src >= NPORTS || expq[src].size() == 0 || p !== expq[src][0]) begin
          failures++;
          $display("FAIL unexpected packet on %s: %h", is_proc ? "processor" : "FIFO", p);
        end else void'(expq[src].pop_front());
        checks++;
        if ((({p[73], p[71], p[67], p[65]}) == LOC) != is_proc) begin
          failures++;
          $display("FAIL packet for %h sent to %s", {p[73], p[71], p[67], p[65]},
                   is_proc ? "processor" : "FIFO");
        end
        if (is_proc) n_proc++; else n_fifo++;
        repeat ($urandom % 4) @(posedge clk);
        if (is_proc) proc_ack = 1'b1; else fifo_ack = 1'b1;
        while ((is_proc ? proc_pkt : fifo_pkt) !== '0) @(posedge clk);
        repeat ($urandom % 3) @(posedge clk);
        if (is_proc) proc_ack = 1'b0; else fifo_ack = 1'b0;
      end
    end
  endtask

  // round-robin bookkeeping: at each capture, every other presenting sender
  // has waited one more packet
  always @(posedge clk) begin
    int acks;
    acks = 0;
    for (int i = 0; i < NPORTS; i++) acks += int'(in_ack[i]);
    if (acks > 1) begin failures++; $display("FAIL %0d senders acknowledged", acks); end
    if (dut.grant) begin
      for (int i = 0; i < NPORTS; i++)
        if (presenting[i] && i != int'(dut.ptr)) begin
          waiting_others[i]++;
          if (waiting_others[i] > worst_wait) worst_wait = waiting_others[i];
        end
    end
  end

  initial begin
    int t;
    for (int i = 0; i < NPORTS; i++) begin in_pkt[i] = '0; presenting[i] = 0; end
    fifo_ack = 1'b0; proc_ack = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork receiver(1'b1); receiver(1'b0); join_none
    // lone packet latency
    repeat (5) @(posedge clk);
    @(negedge clk);
    in_pkt[PORT_UP] = mk(PORT_UP, 999, 1'b0);
    expq[PORT_UP].push_back(in_pkt[PORT_UP]);
    t = 0;
    while (fifo_pkt === '0) begin @(posedge clk); #1; t++; end
    checks++;
    if (t < 2 || t > 5) begin failures++; $display("FAIL lone latency %0d", t); end
    while (!in_ack[PORT_UP]) @(posedge clk);
    in_pkt[PORT_UP] = '0;
    repeat (20) @(posedge clk);
    // all four senders saturating, then with random gaps
    fork
      sender(0, PER_SRC, 0); sender(1, PER_SRC, 0); sender(2, PER_SRC, 0); sender(3, PER_SRC, 0);
    join
    fork
      sender(0, PER_SRC, 8); sender(1, PER_SRC, 8); sender(2, PER_SRC, 8); sender(3, PER_SRC, 8);
    join
    repeat (50) @(posedge clk);
    for (int i = 0; i < NPORTS; i++) begin
      checks++;
      if (expq[i].size() != 0) begin failures++; $display("FAIL %0d packets of %0d lost", expq[i].size(), i); end
    end
    checks++;
    if (worst_wait > 4) begin failures++; $display("FAIL a sender waited for %0d others", worst_wait); end
    checks++;
    if (n_proc == 0 || n_fifo == 0) begin failures++; $display("FAIL an output never used"); end
    $display("delivered: processor %0d, FIFO %0d, longest wait %0d packets", n_proc, n_fifo, worst_wait);
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
