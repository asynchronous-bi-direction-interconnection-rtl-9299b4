// rr_scanner: the SCANNER/DELAY ring that gives the arbitrators' input
// multiplexers their round-robin order.
//
// A pointer steps through the N inputs, one per clock, while the arbitrator
// is idle. When the input under the pointer has a complete packet
// (req[ptr]), grant pulses for that clock and the arbitrator takes the
// packet; the pointer has moved on by then, so the next scan starts at the
// following input and every input is served within N scans. The document
// gives the scanner and its delay loop only as blocks; this stepping pointer
// is this design's reading of them.
module rr_scanner #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 busy,
  output logic [$clog2(N)-1:0] ptr,
  output logic                 grant
);

  assign grant = req[ptr] & ~busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ptr <= '0;
    else if (!busy) ptr <= (ptr == ($clog2(N))'(N-1)) ? '0 : ptr + 1'b1;
  end

endmodule
