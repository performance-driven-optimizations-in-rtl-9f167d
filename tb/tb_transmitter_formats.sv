// tb_transmitter_formats: end-to-end testbench of the transmitter in its
// other QAM formats, at the full width of N = 16 lanes (latency 17), plus a
// 16-QAM transmitter reduced to N = 8 lanes (latency 1 + 2*(3+2) + 2 + 2 = 15).
//
// The transmitters for 8-QAM (FORMAT = 3), 32-QAM (5) and 64-QAM (6) at
// N = 16 and the 16-QAM one at N = 8 are fed random symbol frames every
// clock; every output frame is compared with the chain model in tx_ref_pkg
// exactly one latency after its symbols were applied, and each tvalid must
// rise on exactly that edge.
module tb_transmitter_formats;
  import tx_ref_pkg::*;

  localparam int N      = 16;
  localparam int NS     = 8;
  localparam int FRAMES = 150;
  localparam int LATS [4] = '{17, 15, 17, 17};   // FORMAT 3, 4 (N = 8), 5, 6

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic [3*N-1:0]  in3;
  logic [4*NS-1:0] in4;
  logic [5*N-1:0]  in5;
  logic [6*N-1:0]  in6;
  logic [16*N-1:0]  out3, out5, out6;
  logic [16*NS-1:0] out4;
  logic v3, v4, v5, v6;

  transmitter #(.N(N),  .FORMAT(3)) dut3 (.clk(clk), .reset(reset), .in(in3), .tvalid(v3), .out(out3));
  transmitter #(.N(NS), .FORMAT(4)) dut4 (.clk(clk), .reset(reset), .in(in4), .tvalid(v4), .out(out4));
  transmitter #(.N(N),  .FORMAT(5)) dut5 (.clk(clk), .reset(reset), .in(in5), .tvalid(v5), .out(out5));
  transmitter #(.N(N),  .FORMAT(6)) dut6 (.clk(clk), .reset(reset), .in(in6), .tvalid(v6), .out(out6));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  vec_t syms [4][FRAMES], exp_o [4][FRAMES];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int lanes(int f);
    return (f == 1) ? NS : N;
  endfunction

  initial begin
    logic [16*N-1:0] o;
    logic v;
    int lat;
    in3 = '0; in4 = '0; in5 = '0; in6 = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    for (int c = 0; c < FRAMES + 17; c++) begin
      for (int f = 0; f < 4; f++) begin
        o = (f == 0) ? out3 : (f == 1) ? (16*N)'(out4) : (f == 2) ? out5 : out6;
        v = (f == 0) ? v3 : (f == 1) ? v4 : (f == 2) ? v5 : v6;
        lat = LATS[f];
        if (c > 0) check($sformatf("FORMAT %0d tvalid after %0d edges", f + 3, c), longint'(v),
                         (c >= lat) ? 1 : 0);
        if (c >= lat && c - lat < FRAMES)
          for (int n = 0; n < lanes(f); n++)
            check($sformatf("FORMAT %0d frame %0d lane %0d", f + 3, c - lat, n),
                  longint'(signed'(o[16*n +: 16])), exp_o[f][c-lat][n]);
      end
      if (c < FRAMES) begin
        for (int f = 0; f < 4; f++) begin
          for (int n = 0; n < lanes(f); n++) begin
            syms[f][c][n] = longint'($urandom_range((1 << (f + 3)) - 1));
            case (f)
              0: in3[3*n +: 3] = 3'(syms[f][c][n]);
              1: in4[4*n +: 4] = 4'(syms[f][c][n]);
              2: in5[5*n +: 5] = 5'(syms[f][c][n]);
              default: in6[6*n +: 6] = 6'(syms[f][c][n]);
            endcase
          end
          void'(transmit(lanes(f), f + 3, syms[f][c], exp_o[f][c]));
        end
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
