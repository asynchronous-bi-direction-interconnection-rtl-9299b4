// tb_dr_fifo: pushes random packets through the five-stage dual-rail FIFO
// with the four-phase handshake on both sides and a reader that stalls at
// random, and checks that every packet leaves intact and in order. It also
// checks: the latency of one packet through an empty pipe (one clock per
// stage), that a stalled reader lets the pipe take exactly three packets,
// and that no pair ever carries the unused code 11.
module tb_dr_fifo;
  import torus_pkg::*;
  localparam int STAGES = 5;
  localparam int NPKT   = 200;

  logic  clk = 1'b0, rst_n = 1'b0;
  rpkt_t d_in, d_out;
  logic  ack_in, ack_out;
  int    checks = 0, failures = 0;
  rpkt_t sent [$];
  bit    stall_reader;
  int    received = 0;

  dr_fifo #(.STAGES(STAGES)) dut (.clk(clk), .rst_n(rst_n), .d_in(d_in), .ack_in(ack_in),
                                  .d_out(d_out), .ack_out(ack_out));

  always #5 clk = ~clk;

  function automatic bit all_valid(input rpkt_t p);
    for (int i = 0; i < RPKT_W/2; i++) if (p[2*i+1] == p[2*i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit no_illegal(input rpkt_t p);
    for (int i = 0; i < RPKT_W/2; i++) if (p[2*i+1] && p[2*i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic rpkt_t rand_pkt();
    return {($urandom % 2) ? 2'b01 : 2'b10, dr_enc2(2'($urandom)),
            ($urandom % 2) ? 2'b01 : 2'b10, dr_enc2(2'($urandom)), dr_enc_data($urandom)};
  endfunction

  task automatic send(input rpkt_t p);
    while (ack_in) @(posedge clk);
    d_in = p;
    sent.push_back(p);
    while (!ack_in) @(posedge clk);
    d_in = '0;
  endtask

  // reader
  initial begin
    ack_out = 1'b0;
    forever begin
      @(posedge clk);
      if (!stall_reader && all_valid(d_out)) begin
        rpkt_t exp;
        repeat ($urandom % 4) @(posedge clk);
        exp = sent.pop_front();
        checks++;
        if (d_out !== exp) begin
          failures++;
          $display("FAIL packet %0d: got %h exp %h", received, d_out, exp);
        end
        received++;
        ack_out = 1'b1;
        while (d_out !== '0) @(posedge clk);
        ack_out = 1'b0;
      end
    end
  end

  always @(posedge clk) if (rst_n && (!no_illegal(d_out) || !no_illegal(d_in))) begin
    failures++;
    $display("FAIL illegal 11 code");
  end

  initial begin
    int t0, accepted;
    d_in = '0;
    stall_reader = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // latency through an empty pipe
    stall_reader = 1'b1;
    @(negedge clk);
    d_in = rand_pkt();
    sent.push_back(d_in);
    t0 = 0;
    while (d_out === '0) begin @(posedge clk); #1; t0++; end
    checks++;
    if (t0 != STAGES) begin failures++; $display("FAIL latency %0d clocks", t0); end
    // release the writer side and, while the reader stalls, count packets taken
    while (!ack_in) @(posedge clk);
    d_in = '0;
    accepted = 1;
    fork
      begin
        forever begin
          rpkt_t p;
          p = rand_pkt();
          while (ack_in) @(posedge clk);
          d_in = p; sent.push_back(p);
          while (!ack_in) @(posedge clk);
          accepted++;
          d_in = '0;
        end
      end
      begin repeat (100) @(posedge clk); end
    join_any
    disable fork;
    checks++;
    if (accepted != 3) begin failures++; $display("FAIL stalled FIFO took %0d packets", accepted); end
    // the fourth packet is only queued once the pipe releases the third
    stall_reader = 1'b0;
    for (int i = 0; i < NPKT; i++) begin
      repeat ($urandom % 3) @(posedge clk);
      send(rand_pkt());
    end
    while (sent.size() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (received != NPKT + 3) begin failures++; $display("FAIL received %0d", received); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
