// transmitter: N-lane parallel QAM transmitter that shapes its pulses in the
// frequency domain.
//
// An FPGA clocked well below 1 GHz reaches a giga-sample rate by handling N
// samples per clock. The chain is
//
//   in -> [input reg] -> qam -> dft -> srrc_filter -> idft -> modulator -> out
//                                                               tvalid_seq -> tvalid
//
// Each clock a frame of N symbols (FORMAT bits each, symbol i in
// in[FORMAT*i +: FORMAT], symbol 0 first in time) is mapped to N complex
// baseband samples, transformed with an N-point DFT, multiplied bin by bin with
// the SRRC filter's frequency response (convolution becomes multiplication),
// transformed back with the IDFT and up-converted with a quadrature carrier.
// `out` carries N 16-bit samples, sample n in out[16*n +: 16].
//
// The filtering is circular within each N-sample frame: the frames are
// processed independently, as in the source's block diagram, with no overlap
// between frames.
//
// Timing: fully pipelined, one frame per clock, a latency of
// 1 + 2*($clog2(N)+2) + 2 + 2 = 17 cycles for N = 16, the source's figure.
// tvalid rises when the first frame applied after reset reaches `out`.
// Reset is synchronous and active high. The block structure, the parameters
// N and FORMAT, the port names and the 17-cycle latency follow the source; the
// input register and the split of the latency between blocks are this
// design's choices.
module transmitter #(
  parameter int unsigned N      = 16,
  parameter int unsigned FORMAT = 4
) (
  input  logic                clk,
  input  logic                reset,
  input  logic [FORMAT*N-1:0] in,
  output logic                tvalid,
  output logic [16*N-1:0]     out
);
  import qam_tx_pkg::tx_latency;

  localparam int unsigned LATENCY = tx_latency(N);

  logic [FORMAT*N-1:0] in_q;
  logic [16*N-1:0]     i_sym, q_sym;
  logic [16*N-1:0]     xk_re, xk_im;
  logic [16*N-1:0]     y_re, y_im;
  logic [16*N-1:0]     sn_re, sn_im;

  always_ff @(posedge clk) begin
    if (reset) in_q <= '0;
    else       in_q <= in;
  end

  qam #(.N(N), .W(16), .FORMAT(FORMAT)) u_qam (
    .in_bits (in_q),
    .i_out   (i_sym),
    .q_out   (q_sym)
  );

  dft #(.N(N)) u_dft (
    .clk   (clk),
    .reset (reset),
    .xn_re (i_sym),
    .xn_im (q_sym),
    .xk_re (xk_re),
    .xk_im (xk_im)
  );

  srrc_filter #(.N(N)) u_filter (
    .clk   (clk),
    .reset (reset),
    .xk_re (xk_re),
    .xk_im (xk_im),
    .y_re  (y_re),
    .y_im  (y_im)
  );

  idft #(.N(N)) u_idft (
    .clk   (clk),
    .reset (reset),
    .xk_re (y_re),
    .xk_im (y_im),
    .xn_re (sn_re),
    .xn_im (sn_im)
  );

  modulator #(.N(N)) u_modulator (
    .clk   (clk),
    .reset (reset),
    .sn_re (sn_re),
    .sn_im (sn_im),
    .out   (out)
  );

  tvalid_seq #(.LATENCY(LATENCY)) u_tvalid (
    .clk    (clk),
    .reset  (reset),
    .tvalid (tvalid)
  );

endmodule
