// tb_compare_1: for every location and destination, checks that a router
// packet is marked arrived exactly when its coordinates equal the location,
// whatever its direction and data wires hold.
module tb_compare_1;
  import torus_pkg::*;
  int checks = 0, failures = 0;
  loc_t  location;
  rpkt_t pkt;
  logic  arrived;

  compare_1 dut (.location(location), .packet(pkt), .arrived(arrived));

  initial begin
    for (int l = 0; l < 16; l++) for (int d = 0; d < 16; d++) repeat (4) begin
      location = 4'(l);
      pkt = {($urandom % 2) ? 2'b01 : 2'b10, dr_enc2(2'(d >> 2)),
             ($urandom % 2) ? 2'b01 : 2'b10, dr_enc2(2'(d & 3)),
             dr_enc_data($urandom)};
      #1;
      checks++;
      if (arrived !== (l == d)) begin
        failures++;
        $display("FAIL loc=%0d dst=%0d arrived=%0b", l, d, arrived);
      end
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
