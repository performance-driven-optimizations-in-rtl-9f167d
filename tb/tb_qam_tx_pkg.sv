// tb_qam_tx_pkg: checks the constant tables of qam_tx_pkg against values
// computed here in floating point.
//
// For N = 16 (and N = 8 for the twiddles): every twiddle and carrier sample
// within 1 LSB of 32767*cos/sin, every filter coefficient within 1 LSB of
// 16384*H[k] with H[k] summed here from the 11 taps, the DC gain H[0] equal
// to the sum of the taps, the QAM levels d and 3d = c5, the stop-band bins
// small, and the pipeline latency of 17 cycles at N = 16 (15 at N = 8).
module tb_qam_tx_pkg;
  import qam_tx_pkg::*;

  localparam real TAU = 6.283185307179586;
  localparam real TAPS [11] = '{0.022507907903927645, 0.028298439380057477,
                                -0.076801948979409798, -0.037500771921555154,
                                0.3076724792547561, 0.54098593171027443,
                                0.3076724792547561, -0.037500771921555154,
                                -0.076801948979409798, 0.028298439380057477,
                                0.022507907903927645};

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(string what, real got, real exp, real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("%s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    real h, sum;
    for (int np = 8; np <= 16; np += 8)
      for (int m = 0; m < np; m++) begin
        near($sformatf("twiddle cos N=%0d m=%0d", np, m), real'(twiddle_cos(np, m)),
             32767.0 * $cos(TAU * m / np), 1.0);
        near($sformatf("twiddle sin N=%0d m=%0d", np, m), real'(twiddle_sin(np, m)),
             32767.0 * $sin(TAU * m / np), 1.0);
      end
    for (int n = 0; n < 16; n++) begin
      near($sformatf("carrier cos lane %0d", n), real'(carrier_cos(16, 1, n)), 32767.0 * $cos(TAU * n / 16), 1.0);
      near($sformatf("carrier sin lane %0d", n), real'(carrier_sin(16, 1, n)), 32767.0 * $sin(TAU * n / 16), 1.0);
      near($sformatf("carrier cos 3 cycles lane %0d", n), real'(carrier_cos(16, 3, n)),
           32767.0 * $cos(TAU * 3 * n / 16), 1.0);
    end
    sum = 0.0;
    for (int m = 0; m < 11; m++) sum += TAPS[m];
    near("filter DC gain", real'(filter_coeff(16, 0)), 16384.0 * sum, 1.0);
    for (int k = 0; k < 16; k++) begin
      h = 0.0;
      for (int m = 0; m < 11; m++) h += TAPS[m] * $cos(TAU * k * (m - 5) / 16);
      near($sformatf("filter bin %0d", k), real'(filter_coeff(16, k)), 16384.0 * h, 1.0);
      if (k >= 6 && k <= 10) near($sformatf("stop band bin %0d", k), real'(filter_coeff(16, k)), 0.0, 500.0);
    end
    near("16-QAM d", real'(qam_level(2, 0)), 17726.0 / 3.0, 1.0);
    near("16-QAM 3d = c5", real'(qam_level(2, 1)), 32767.0 * TAPS[5], 1.0);
    near("64-QAM 7d = c5", real'(qam_level(3, 3)), 32767.0 * TAPS[5], 1.0);
    near("latency N=16", real'(tx_latency(16)), 17.0, 0.0);
    near("latency N=8", real'(tx_latency(8)), 15.0, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
