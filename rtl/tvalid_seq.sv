// tvalid_seq: the transmitter's validity flag.
//
// The transmitter accepts a new frame every clock and has no input strobe,
// so its output is meaningful once every pipeline register holds data that
// entered after reset. This block counts clock cycles after reset is
// released and raises tvalid when LATENCY cycles have passed, i.e. on the
// same edge that the first frame applied after reset reaches the output;
// tvalid then stays high until the next reset. The counter saturates at
// LATENCY. The source shows a sequential block driving tvalid and gives the
// 17-cycle latency; the counting scheme is this design's choice.
//
// Interface: clk, synchronous active-high reset, tvalid output (low during
// and for LATENCY cycles after reset).
module tvalid_seq #(
  parameter int unsigned LATENCY = 17
) (
  input  logic clk,
  input  logic reset,
  output logic tvalid
);
  localparam int unsigned CW = $clog2(LATENCY + 1);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (reset)                       count <= '0;
    else if (count != CW'(LATENCY))  count <= count + 1'b1;
  end

  assign tvalid = (count == CW'(LATENCY));

endmodule
