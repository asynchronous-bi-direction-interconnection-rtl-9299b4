// tb_router: one router at (1,1) with four neighbour senders, a processor
// sender and receivers on the four neighbour outputs and the processor
// output. Every packet carries a unique id in its payload; the scoreboard
// knows, from the routing rule worked out here, where each must leave and
// with which head. Checks: every packet leaves once, on the right output,
// with the expected wires; packets from one source to one output keep their
// order; the router holds packets while all outputs stall (FIFO back-
// pressure) and drains them afterwards.
module tb_router;
  import torus_pkg::*;
  localparam loc_t LOC = 4'b0101;  // (1,1)
  localparam int PER_SRC = 40;
  localparam int PROC = 4;          // output/source index of the processor

  logic  clk = 1'b0, rst_n = 1'b0;
  rpkt_t in_pkt [NPORTS];
  logic  in_ack [NPORTS];
  rpkt_t out_pkt [NPORTS];
  logic  out_ack [NPORTS];
  ppkt_t proc_in;
  logic  proc_in_ack;
  rpkt_t proc_out;
  logic  proc_out_ack;
  int    checks = 0, failures = 0;
  rpkt_t exp_pkt [int];
  int    exp_port [int];
  int    last_seq [5][5];
  int    n_out [5];
  bit    stall_all;
  int    max_inside = 0, sent_cnt = 0, recv_cnt = 0;
  int    seq_next [5] = '{default: 0};

  router dut (.clk(clk), .rst_n(rst_n), .location(LOC), .in_pkt(in_pkt), .in_ack(in_ack),
              .out_pkt(out_pkt), .out_ack(out_ack), .proc_in(proc_in),
              .proc_in_ack(proc_in_ack), .proc_out(proc_out), .proc_out_ack(proc_out_ack));

  always #5 clk = ~clk;

  function automatic bit all_valid(input rpkt_t p);
    for (int i = 0; i < RPKT_W/2; i++) if (p[2*i+1] == p[2*i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [1:0] ref_dir(input int d);
    return (d == 1 || d == 2 || d == -3) ? 2'b01 : 2'b10;
  endfunction

  function automatic int ref_port(input rpkt_t p);
    if ({p[73], p[71], p[67], p[65]} == LOC) return PROC;
    if ({p[73], p[71]} != LOC[3:2]) return (p[75:74] == 2'b01) ? 0 : 1;
    return (p[69:68] == 2'b01) ? 2 : 3;
  endfunction

  task automatic send(input int src, input int n, input int gap);
    for (int k = 0; k < n; k++) begin
      logic [1:0] x, y;
      logic [31:0] d;
      rpkt_t r;
      int id, seq;
      seq = seq_next[src]++;
      id = src * 4096 + seq;
      x = 2'($urandom); y = 2'($urandom);
      d = {4'(src), 12'(seq), 16'($urandom)};
      repeat ($urandom % (gap + 1)) @(posedge clk);
      if (src == PROC) begin
        if ({x, y} == LOC) y = y + 2'd1;
        r = {ref_dir(int'(x) - int'(LOC[3:2])), dr_enc2(x), ref_dir(int'(y) - int'(LOC[1:0])),
             dr_enc2(y), dr_enc_data(d)};
        while (proc_in_ack) @(posedge clk);
        exp_pkt[id] = r; exp_port[id] = ref_port(r); sent_cnt++;
        proc_in = mk_ppkt(x, y, d);
        while (!proc_in_ack) @(posedge clk);
        proc_in = '0;
      end else begin
        r = {($urandom % 2) ? 2'b01 : 2'b10, dr_enc2(x), ($urandom % 2) ? 2'b01 : 2'b10,
             dr_enc2(y), dr_enc_data(d)};
        while (in_ack[src]) @(posedge clk);
        exp_pkt[id] = r; exp_port[id] = ref_port(r); sent_cnt++;
        in_pkt[src] = r;
        while (!in_ack[src]) @(posedge clk);
        in_pkt[src] = '0;
      end
    end
  endtask

  task automatic receiver(input int port);
    forever begin
      rpkt_t p;
      int src, seq, id;
      @(posedge clk);
      p = (port == PROC) ? proc_out : out_pkt[port];
      if (all_valid(p) && !stall_all) begin
        src = int'(dr_dec_data(p[63:0]) >> 28);
        seq = int'(dr_dec_data(p[63:0]) >> 16) & 4095;
        id  = src * 4096 + seq;
        checks++;
        if (!exp_pkt.exists(id) || exp_pkt[id] !== p || exp_port[id] != port) begin
          failures++;
          $display("FAIL packet %h on output %0d", p[75:64], port);
        end else begin
          exp_pkt.delete(id);
          checks++;
          if (seq <= last_seq[src][port]) begin failures++; $display("FAIL order"); end
          last_seq[src][port] = seq;
        end
        n_out[port]++;
        recv_cnt++;
        repeat ($urandom % 4) @(posedge clk);
        if (port == PROC) proc_out_ack = 1'b1; else out_ack[port] = 1'b1;
        while (((port == PROC) ? proc_out : out_pkt[port]) !== '0) @(posedge clk);
        repeat ($urandom % 3) @(posedge clk);
        if (port == PROC) proc_out_ack = 1'b0; else out_ack[port] = 1'b0;
      end
    end
  endtask

  always @(posedge clk) if (sent_cnt - recv_cnt > max_inside) max_inside = sent_cnt - recv_cnt;

  initial begin
    for (int i = 0; i < NPORTS; i++) begin in_pkt[i] = '0; out_ack[i] = 1'b0; end
    for (int i = 0; i < 5; i++) begin n_out[i] = 0; for (int j = 0; j < 5; j++) last_seq[i][j] = -1; end
    proc_in = '0; proc_out_ack = 1'b0; stall_all = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5; i++) fork automatic int j = i; receiver(j); join_none
    // back-pressure: all outputs stall while traffic is offered
    stall_all = 1'b1;
    fork
      send(0, 3, 0); send(1, 3, 0); send(2, 3, 0); send(3, 3, 0); send(PROC, 3, 0);
      begin repeat (300) @(posedge clk); stall_all = 1'b0; end
    join
    // mixed traffic from all five sources
    fork
      send(0, PER_SRC, 5); send(1, PER_SRC, 5); send(2, PER_SRC, 5); send(3, PER_SRC, 5);
      send(PROC, PER_SRC, 5);
    join
    repeat (300) @(posedge clk);
    checks++;
    if (exp_pkt.num() != 0) begin failures++; $display("FAIL %0d packets not delivered", exp_pkt.num()); end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (n_out[i] == 0) begin failures++; $display("FAIL output %0d never used", i); end
    end
    checks++;
    if (max_inside < 4) begin failures++; $display("FAIL router never held 4 packets"); end
    $display("outputs R L U D P: %0d %0d %0d %0d %0d; most packets held %0d",
             n_out[0], n_out[1], n_out[2], n_out[3], n_out[4], max_inside);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
