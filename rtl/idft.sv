// idft: fully parallel N-point inverse discrete Fourier transform, one frame
// per clock, the mirror of the dft block.
//
//   x[n] = sum_{k=0}^{N-1} X[k] * W^(-k*n),  W = exp(-j*2*pi/N)
//
// The bins X[0..N-1] arrive on two packed buses (real, imaginary; bin k in
// bits [16*k +: 16]). As in the source the transform is a direct matrix
// product: N^2 complex multipliers against the conjugated Q1.15 twiddle
// table, then per output sample a balanced adder tree of 2(N-1) real adders,
// a rescale by 2^17 (arithmetic shift) and saturation to 16 bits. The gain
// is 1/4; with the DFT's 1/4 the pair scales a frame by 1/16, the 1/N of the
// inverse transform for N = 16.
//
// Timing: products, every adder-tree level and the rescaled result are
// registered, so x appears $clog2(N)+2 cycles (6 for N = 16) after X. Reset
// is synchronous and active high and clears the pipeline. The pipeline cut
// points, the full-precision partial sums, the truncating shift and the
// saturation are this design's choices.
module idft #(
  parameter int unsigned N = 16
) (
  input  logic            clk,
  input  logic            reset,
  input  logic [16*N-1:0] xk_re,
  input  logic [16*N-1:0] xk_im,
  output logic [16*N-1:0] xn_re,
  output logic [16*N-1:0] xn_im
);
  import qam_tx_pkg::sample_t;
  import qam_tx_pkg::twiddle_cos;
  import qam_tx_pkg::twiddle_sin;
  import qam_tx_pkg::DFT_SHIFT;

  localparam int unsigned L  = $clog2(N);
  localparam int unsigned P  = 1 << L;       // leaves of each adder tree
  localparam int unsigned AW = 33 + L;       // product width plus tree growth

  typedef logic signed [AW-1:0] acc_t;

  function automatic logic [16*N-1:0] cos_table();
    logic [16*N-1:0] t;
    for (int m = 0; m < N; m++) t[16*m +: 16] = twiddle_cos(N, m);
    return t;
  endfunction

  function automatic logic [16*N-1:0] sin_table();
    logic [16*N-1:0] t;
    for (int m = 0; m < N; m++) t[16*m +: 16] = twiddle_sin(N, m);
    return t;
  endfunction

  localparam logic [16*N-1:0] TW_COS = cos_table();
  localparam logic [16*N-1:0] TW_SIN = sin_table();

  function automatic sample_t saturate(acc_t v);
    if (v > acc_t'(32767))  return sample_t'(32767);
    if (v < -acc_t'(32768)) return sample_t'(-32768);
    return sample_t'(v);
  endfunction

  // Heap-ordered adder trees, one per output sample: node i = node 2i + node 2i+1,
  // leaves at P..2P-1, the root at 1.
  acc_t node_re [N][2*P];
  acc_t node_im [N][2*P];

  always_ff @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      for (int n = 0; n < P; n++) begin
        if (reset || n >= N) begin
          node_re[k][P+n] <= '0;
          node_im[k][P+n] <= '0;
        end else begin
          // (Xr + j Xi) * (c + j s) = (Xr c - Xi s) + j (Xi c + Xr s)
          node_re[k][P+n] <= acc_t'(sample_t'(xk_re[16*n +: 16])) * acc_t'(sample_t'(TW_COS[16*((k*n)%N) +: 16]))
                           - acc_t'(sample_t'(xk_im[16*n +: 16])) * acc_t'(sample_t'(TW_SIN[16*((k*n)%N) +: 16]));
          node_im[k][P+n] <= acc_t'(sample_t'(xk_im[16*n +: 16])) * acc_t'(sample_t'(TW_COS[16*((k*n)%N) +: 16]))
                           + acc_t'(sample_t'(xk_re[16*n +: 16])) * acc_t'(sample_t'(TW_SIN[16*((k*n)%N) +: 16]));
        end
      end
      for (int i = 1; i < P; i++) begin
        node_re[k][i] <= reset ? '0 : node_re[k][2*i] + node_re[k][2*i+1];
        node_im[k][i] <= reset ? '0 : node_im[k][2*i] + node_im[k][2*i+1];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      if (reset) begin
        xn_re[16*k +: 16] <= '0;
        xn_im[16*k +: 16] <= '0;
      end else begin
        xn_re[16*k +: 16] <= saturate(node_re[k][1] >>> DFT_SHIFT);
        xn_im[16*k +: 16] <= saturate(node_im[k][1] >>> DFT_SHIFT);
      end
    end
  end

endmodule
