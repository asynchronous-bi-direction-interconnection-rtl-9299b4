// tb_c_element: checks the C-element against its truth table: output 0
// after (0,0), 1 after (1,1), unchanged after (0,1) or (1,0), cleared by
// reset. Random input sequences are compared with a reference state kept in
// the testbench.
module tb_c_element;
  logic clk = 1'b0, rst_n = 1'b0, a = 1'b0, b = 1'b0, c;
  int checks = 0, failures = 0;
  logic ref_c;

  c_element dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic na, input logic nb);
    a = na; b = nb;
    @(posedge clk); #1;
    if (na == nb) ref_c = na;
    checks++;
    if (c !== ref_c) begin
      failures++;
      $display("FAIL a=%0b b=%0b c=%0b expected %0b", na, nb, c, ref_c);
    end
  endtask

  initial begin
    ref_c = 1'b0;
    repeat (2) @(posedge clk);
    #1; checks++; if (c !== 1'b0) failures++;
    rst_n = 1'b1;
    // the table rows in order, from both starting states
    step(0, 0); step(0, 1); step(1, 0); step(1, 1);
    step(0, 1); step(1, 0); step(0, 0); step(1, 0); step(1, 1);
    repeat (500) step(1'($urandom), 1'($urandom));
    // reset clears a set output
    step(1, 1);
    rst_n = 1'b0; #1; ref_c = 1'b0;
    checks++; if (c !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
