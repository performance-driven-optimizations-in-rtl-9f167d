// tb_modulator: self-checking testbench of the quadrature modulator (N = 16,
// one carrier period per frame).
//
// Streams random I/Q frames every clock and checks, two cycles later, that
// lane n carries (I*cos - Q*sin) >>> 16 with the carrier samples recomputed
// here. Two directed frames check the carriers themselves: a frame with
// Q = 0 and I = 32767 must trace the cosine, and one with I = 0 and
// Q = -32767 the sine, each within 1 LSB of 0.5*32767*cos/sin(2*pi*n/16).
module tb_modulator;
  import tx_ref_pkg::*;

  localparam int N   = 16;
  localparam int LAT = 2;
  localparam int FRAMES = 300;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic [16*N-1:0] ir_bus, qi_bus, o_bus;

  modulator #(.N(N)) dut (.clk(clk), .reset(reset), .sn_re(ir_bus), .sn_im(qi_bus), .out(o_bus));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  vec_t in_i [FRAMES], in_q [FRAMES], exp_o [FRAMES];

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
    real ideal;
    ir_bus = '0;
    qi_bus = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    for (int c = 0; c < FRAMES + LAT; c++) begin
      if (c >= LAT) begin
        for (int n = 0; n < N; n++) begin
          checks++;
          if (lane(o_bus, n) != exp_o[c-LAT][n]) begin
            failures++;
            if (failures < 10)
              $display("frame %0d lane %0d: got %0d expected %0d", c - LAT, n,
                       lane(o_bus, n), exp_o[c-LAT][n]);
          end
          if (c - LAT == 0 || c - LAT == 1) begin
            ideal = 0.5 * 32767.0 * ((c - LAT == 0) ? $cos(2.0 * M_PI * n / N)
                                                    : $sin(2.0 * M_PI * n / N));
            checks++;
            if (real'(lane(o_bus, n)) - ideal > 1.5 || ideal - real'(lane(o_bus, n)) > 1.5) begin
              failures++;
              $display("carrier lane %0d: got %0d ideal %f", n, lane(o_bus, n), ideal);
            end
          end
        end
      end
      if (c < FRAMES) begin
        for (int n = 0; n < N; n++) begin
          if (c == 0) begin
            in_i[c][n] = 32767; in_q[c][n] = 0;
          end else if (c == 1) begin
            in_i[c][n] = 0; in_q[c][n] = -32767;
          end else begin
            in_i[c][n] = longint'($signed(16'($urandom)));
            in_q[c][n] = longint'($signed(16'($urandom)));
          end
          ir_bus[16*n +: 16] = 16'(in_i[c][n]);
          qi_bus[16*n +: 16] = 16'(in_q[c][n]);
        end
        modulate(N, 1, in_i[c], in_q[c], exp_o[c]);
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
