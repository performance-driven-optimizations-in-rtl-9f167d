// modulator: quadrature up-conversion of one frame of N baseband samples per
// clock.
//
//   out[n] = I[n] * cos(2*pi*f0*n) - Q[n] * sin(2*pi*f0*n)
//
// The real part of the IDFT output is I, the imaginary part Q. Each lane has
// its own pair of carrier samples (the local oscillator and its 90-degree
// shifted copy), held in a Q1.15 table: 2N multipliers and N subtractors, the
// difference rescaled by 2^16, as in the source, so the gain is 1/2.
// The carrier is taken to complete an integer number CARRIER_CYCLES of
// periods per N-sample frame, so lane n always sees the same carrier phase
// 2*pi*CARRIER_CYCLES*n/N and the table has one entry per lane; that reading
// of the source's per-lane carrier table and the default of one period per
// frame are this design's choices.
//
// Timing: products registered, rescaled difference registered: out appears
// two cycles after I/Q. Reset is synchronous and active high. The result
// cannot overflow: |I cos - Q sin| <= sqrt(I^2 + Q^2) * 32767 < 2^31.
module modulator #(
  parameter int unsigned N              = 16,
  parameter int unsigned CARRIER_CYCLES = 1
) (
  input  logic            clk,
  input  logic            reset,
  input  logic [16*N-1:0] sn_re,
  input  logic [16*N-1:0] sn_im,
  output logic [16*N-1:0] out
);
  import qam_tx_pkg::sample_t;
  import qam_tx_pkg::carrier_cos;
  import qam_tx_pkg::carrier_sin;
  import qam_tx_pkg::MOD_SHIFT;

  typedef logic signed [32:0] prod_t;

  function automatic logic [16*N-1:0] cos_table();
    logic [16*N-1:0] t;
    for (int n = 0; n < N; n++) t[16*n +: 16] = carrier_cos(N, CARRIER_CYCLES, n);
    return t;
  endfunction

  function automatic logic [16*N-1:0] sin_table();
    logic [16*N-1:0] t;
    for (int n = 0; n < N; n++) t[16*n +: 16] = carrier_sin(N, CARRIER_CYCLES, n);
    return t;
  endfunction

  localparam logic [16*N-1:0] LO_COS = cos_table();
  localparam logic [16*N-1:0] LO_SIN = sin_table();

  prod_t p_i [N];
  prod_t p_q [N];

  always_ff @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (reset) begin
        p_i[n] <= '0;
        p_q[n] <= '0;
      end else begin
        p_i[n] <= prod_t'(sample_t'(sn_re[16*n +: 16])) * prod_t'(sample_t'(LO_COS[16*n +: 16]));
        p_q[n] <= prod_t'(sample_t'(sn_im[16*n +: 16])) * prod_t'(sample_t'(LO_SIN[16*n +: 16]));
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (reset) out[16*n +: 16] <= '0;
      else       out[16*n +: 16] <= sample_t'((p_i[n] - p_q[n]) >>> MOD_SHIFT);
    end
  end

endmodule
