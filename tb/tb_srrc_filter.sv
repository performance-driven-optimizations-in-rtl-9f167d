// tb_srrc_filter: self-checking testbench of the frequency-domain SRRC filter
// (N = 16).
//
// Streams random bins every clock and checks, two cycles later, that every
// output equals (X[k] * H[k]) >>> 16 with H[k] recomputed here from the 11
// filter taps. It also checks the shape of the response independently: the
// pass band (bin 0 and its neighbours) has a gain near 1/4 and the stop band
// (bins 6..10) is at least 30 times smaller.
module tb_srrc_filter;
  import tx_ref_pkg::*;

  localparam int N   = 16;
  localparam int LAT = 2;
  localparam int FRAMES = 300;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic [16*N-1:0] xr_bus, xi_bus, yr_bus, yi_bus;

  srrc_filter #(.N(N)) dut (.clk(clk), .reset(reset), .xk_re(xr_bus), .xk_im(xi_bus),
                            .y_re(yr_bus), .y_im(yi_bus));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  vec_t in_r [FRAMES], in_i [FRAMES], exp_r [FRAMES], exp_i [FRAMES];

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

  initial begin
    // Response shape: pass band near unity (gain 1/4 after the 2^16 shift
    // of a Q2.14 coefficient), stop band well below.
    for (int k = 0; k < N; k++) begin
      checks++;
      if ((k <= 3 || k >= 13) && (filter_h(N, k) < 15000 || filter_h(N, k) > 17500)) begin
        failures++;
        $display("pass band bin %0d: H = %0d", k, filter_h(N, k));
      end
      if ((k >= 6 && k <= 10) && (filter_h(N, k) > 500 || filter_h(N, k) < -500)) begin
        failures++;
        $display("stop band bin %0d: H = %0d", k, filter_h(N, k));
      end
    end
    xr_bus = '0;
    xi_bus = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    for (int c = 0; c < FRAMES + LAT; c++) begin
      if (c >= LAT) begin
        for (int k = 0; k < N; k++) begin
          checks++;
          if (lane(yr_bus, k) != exp_r[c-LAT][k] || lane(yi_bus, k) != exp_i[c-LAT][k]) begin
            failures++;
            if (failures < 10)
              $display("frame %0d bin %0d: got %0d,%0d expected %0d,%0d", c - LAT, k,
                       lane(yr_bus, k), lane(yi_bus, k), exp_r[c-LAT][k], exp_i[c-LAT][k]);
          end
        end
      end
      if (c < FRAMES) begin
        for (int n = 0; n < N; n++) begin
          in_r[c][n] = (c == 5) ? -32768 : longint'($signed(16'($urandom)));
          in_i[c][n] = (c == 5) ? 32767 : longint'($signed(16'($urandom)));
          xr_bus[16*n +: 16] = 16'(in_r[c][n]);
          xi_bus[16*n +: 16] = 16'(in_i[c][n]);
        end
        filter(N, in_r[c], in_i[c], exp_r[c], exp_i[c]);
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
