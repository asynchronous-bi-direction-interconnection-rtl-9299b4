// tb_compare_2: checks the output-port decision for every location,
// destination and direction pair: X first (00 for direction 01, else 01)
// while the X coordinate differs, then Y (10 for direction 01, else 11).
// Includes the two worked examples of the routing rule.
module tb_compare_2;
  import torus_pkg::*;
  int checks = 0, failures = 0;
  loc_t  location;
  rpkt_t pkt;
  logic [1:0] decision;

  compare_2 dut (.location(location), .packet(pkt), .decision(decision));

  task automatic check(input int l, input int d, input logic [1:0] xd,
                       input logic [1:0] yd, input logic [1:0] exp);
    location = 4'(l);
    pkt = {xd, dr_enc2(2'(d >> 2)), yd, dr_enc2(2'(d & 3)), dr_enc_data($urandom)};
    #1;
    checks++;
    if (decision !== exp) begin
      failures++;
      $display("FAIL loc=%0d dst=%0d xd=%b yd=%b got %b exp %b", l, d, xd, yd, decision, exp);
    end
  endtask

  initial begin
    // location (1,1), head (2,2), directions 01/01 -> 00
    check(4'b0101, 4'b1010, 2'b01, 2'b01, 2'b00);
    // location (1,1), packet (1,0), directions 01/10 -> 11
    check(4'b0101, 4'b0100, 2'b01, 2'b10, 2'b11);
    for (int l = 0; l < 16; l++) for (int d = 0; d < 16; d++)
      for (int xi = 0; xi < 2; xi++) for (int yi = 0; yi < 2; yi++) begin
        logic [1:0] xd, yd, exp;
        xd = xi ? 2'b01 : 2'b10;
        yd = yi ? 2'b01 : 2'b10;
        if ((l >> 2) != (d >> 2)) exp = xi ? 2'b00 : 2'b01;
        else                      exp = yi ? 2'b10 : 2'b11;
        check(l, d, xd, yd, exp);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
