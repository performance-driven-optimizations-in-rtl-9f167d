// tb_idft: self-checking testbench of the parallel N-point inverse DFT (N = 16).
//
// Streams a new random frame of complex bins every clock, plus frames
// that drive bins into saturation, and compares every output sample, LAT = $clog2(N)+2
// = 6 cycles later, with the bit-accurate model in tx_ref_pkg. Unsaturated
// bins are also checked against a floating-point inverse DFT scaled by 1/4 (within
// 12 LSB, the truncation of twiddles and of the final shift). A reset in
// mid-stream must clear the output.
module tb_idft;
  import tx_ref_pkg::*;

  localparam int N   = 16;
  localparam int LAT = $clog2(N) + 2;
  localparam int FRAMES = 200;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic [16*N-1:0] xr_bus, xi_bus, yr_bus, yi_bus;

  idft #(.N(N)) dut (.clk(clk), .reset(reset), .xk_re(xr_bus), .xk_im(xi_bus),
                     .xn_re(yr_bus), .xn_im(yi_bus));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, saturated = 0;
  vec_t exp_r [FRAMES + LAT + 1];
  vec_t exp_i [FRAMES + LAT + 1];
  vec_t in_r [FRAMES + LAT + 1];
  vec_t in_i [FRAMES + LAT + 1];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint lane(logic [16*N-1:0] b, int i);
    return longint'(signed'(b[16*i +: 16]));
  endfunction

  task automatic check_frame(int f);
    real fr, fi, a;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (lane(yr_bus, k) != exp_r[f][k] || lane(yi_bus, k) != exp_i[f][k]) begin
        failures++;
        if (failures < 10)
          $display("frame %0d bin %0d: got %0d,%0d expected %0d,%0d", f, k,
                   lane(yr_bus, k), lane(yi_bus, k), exp_r[f][k], exp_i[f][k]);
      end
      // Floating-point cross-check of the unsaturated bins.
      fr = 0.0; fi = 0.0;
      for (int n = 0; n < N; n++) begin
        a = 2.0 * M_PI * real'(k * n) / real'(N);
        fr += real'(in_r[f][n]) * $cos(a) - real'(in_i[f][n]) * $sin(a);
        fi += real'(in_i[f][n]) * $cos(a) + real'(in_r[f][n]) * $sin(a);
      end
      fr /= 4.0; fi /= 4.0;
      if (fr < 32000.0 && fr > -32000.0 && fi < 32000.0 && fi > -32000.0) begin
        checks++;
        if ((real'(lane(yr_bus, k)) - fr) > 12.0 || (fr - real'(lane(yr_bus, k))) > 12.0 ||
            (real'(lane(yi_bus, k)) - fi) > 12.0 || (fi - real'(lane(yi_bus, k))) > 12.0) begin
          failures++;
          $display("frame %0d bin %0d: %0d,%0d far from %f,%f", f, k,
                   lane(yr_bus, k), lane(yi_bus, k), fr, fi);
        end
      end
    end
  endtask

  initial begin
    xr_bus = '0;
    xi_bus = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    for (int c = 0; c < FRAMES + LAT; c++) begin
      // Check what entered LAT cycles ago (inputs change 1 time unit after
      // each rising edge).
      if (c >= LAT) check_frame(c - LAT);
      if (c < FRAMES) begin
        for (int n = 0; n < N; n++) begin
          if (c % 20 == 7) begin
            // All lanes at full scale: bin 0 saturates.
            in_r[c][n] = (c % 40 == 7) ? 32767 : -32768;
            in_i[c][n] = (c % 40 == 7) ? 32767 : -32768;
          end else if (c % 20 == 13) begin
            in_r[c][n] = 17726;
            in_i[c][n] = -17726;
          end else begin
            in_r[c][n] = longint'($signed(16'($urandom)));
            in_i[c][n] = longint'($signed(16'($urandom)));
          end
          xr_bus[16*n +: 16] = 16'(in_r[c][n]);
          xi_bus[16*n +: 16] = 16'(in_i[c][n]);
        end
        saturated += dft(N, 1'b1, in_r[c], in_i[c], exp_r[c], exp_i[c]);
      end
      @(posedge clk);
      #1;
    end
    if (saturated == 0) begin
      failures++;
      $display("no frame drove the saturation logic");
    end
    // Reset in mid-stream clears the outputs.
    reset = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (yr_bus != '0 || yi_bus != '0) begin
      failures++;
      $display("reset did not clear the output");
    end
    $display("saturated outputs seen: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
