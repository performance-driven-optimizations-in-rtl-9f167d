// srrc_filter: square-root raised cosine pulse shaping done in the frequency
// domain, one frame of N DFT bins per clock.
//
//   Y[k] = X[k] * H[k]
//
// Convolution with the 11-tap SRRC filter becomes one multiplication per bin.
// H[k] is real: it is the zero-phase response of the symmetric taps c0..c10
// (centred on c5) sampled at the N bins, stored in Q2.14. Real and imaginary
// parts are multiplied separately, 2N multipliers in all, and the products
// are rescaled by 2^16, as in the source, so the block's gain is H[k]/4.
// Because the taps are symmetric the linear-phase response of the padded
// taps differs from this one only by a circular delay of five samples; using
// the real response, the Q2.14 format and the truncating shift are this
// design's choices, made so that 2N real multipliers suffice.
//
// Timing: products registered, rescaled result registered: Y appears two
// cycles after X. Reset is synchronous and active high and clears the
// pipeline. No saturation is needed: |X*H| / 2^16 stays below 2^14.
module srrc_filter #(
  parameter int unsigned N = 16
) (
  input  logic            clk,
  input  logic            reset,
  input  logic [16*N-1:0] xk_re,
  input  logic [16*N-1:0] xk_im,
  output logic [16*N-1:0] y_re,
  output logic [16*N-1:0] y_im
);
  import qam_tx_pkg::sample_t;
  import qam_tx_pkg::filter_coeff;
  import qam_tx_pkg::FILTER_SHIFT;

  typedef logic signed [31:0] prod_t;

  function automatic logic [16*N-1:0] coeff_table();
    logic [16*N-1:0] t;
    for (int k = 0; k < N; k++) t[16*k +: 16] = filter_coeff(N, k);
    return t;
  endfunction

  localparam logic [16*N-1:0] H = coeff_table();

  prod_t p_re [N];
  prod_t p_im [N];

  always_ff @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      if (reset) begin
        p_re[k] <= '0;
        p_im[k] <= '0;
      end else begin
        p_re[k] <= prod_t'(sample_t'(xk_re[16*k +: 16])) * prod_t'(sample_t'(H[16*k +: 16]));
        p_im[k] <= prod_t'(sample_t'(xk_im[16*k +: 16])) * prod_t'(sample_t'(H[16*k +: 16]));
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      if (reset) begin
        y_re[16*k +: 16] <= '0;
        y_im[16*k +: 16] <= '0;
      end else begin
        y_re[16*k +: 16] <= sample_t'(p_re[k] >>> FILTER_SHIFT);
        y_im[16*k +: 16] <= sample_t'(p_im[k] >>> FILTER_SHIFT);
      end
    end
  end

endmodule
