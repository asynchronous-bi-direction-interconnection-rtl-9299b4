// tb_head_builder: drives every destination from every location and checks
// the 76-wire output: coordinates and data unchanged, direction pairs from
// the rule d = destination - location, d in {1, 2, -3} -> 01, else 10,
// written here as a lookup on d independent of the RTL. Also checks that an
// EMPTY input gives an EMPTY output and that direction pairs stay EMPTY
// while any coordinate pair is EMPTY.
module tb_head_builder;
  import torus_pkg::*;
  int checks = 0, failures = 0;
  loc_t  location;
  ppkt_t pin;
  rpkt_t pout;

  head_builder dut (.location(location), .packet_in(pin), .packet_out(pout));

  function automatic logic [1:0] ref_dir(input int d);
    case (d)
      1, 2, -3:    return 2'b01;
      default:     return 2'b10;   // 0, -1, -2, 3
    endcase
  endfunction

  initial begin
    for (int lx = 0; lx < 4; lx++) for (int ly = 0; ly < 4; ly++)
      for (int dx = 0; dx < 4; dx++) for (int dy = 0; dy < 4; dy++) begin
        logic [31:0] data;
        rpkt_t exp;
        data = $urandom;
        location = {2'(lx), 2'(ly)};
        pin = mk_ppkt(2'(dx), 2'(dy), data);
        #1;
        exp = {ref_dir(dx - lx), dr_enc2(2'(dx)), ref_dir(dy - ly), dr_enc2(2'(dy)),
               dr_enc_data(data)};
        checks++;
        if (pout !== exp) begin
          failures++;
          $display("FAIL loc=(%0d,%0d) dst=(%0d,%0d) got %h exp %h", lx, ly, dx, dy,
                   pout[75:64], exp[75:64]);
        end
      end
    // the document's routing example: from (2,2) to (0,0) X is -2 -> 10, Y -2 -> 10
    location = 4'b1010; pin = mk_ppkt(2'd0, 2'd0, 32'h1234_5678); #1;
    checks++; if (pout[75:74] !== 2'b10 || pout[69:68] !== 2'b10) failures++;
    // from (3,3) to (0,0): -3 -> 01 (right, up), one hop through each wrap link
    location = 4'b1111; #1;
    checks++; if (pout[75:74] !== 2'b01 || pout[69:68] !== 2'b01) failures++;
    pin = '0; #1;
    checks++; if (pout !== '0) failures++;
    pin = mk_ppkt(2'd1, 2'd2, 32'hffff_0000); pin[65:64] = 2'b00; #1;
    checks++; if (pout[75:74] !== 2'b00 || pout[69:68] !== 2'b00) failures++;
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
