// tb_transmitter: end-to-end, full-size testbench of the transmitter at its
// default parameters (N = 16 lanes, FORMAT = 4, i.e. 16-QAM).
//
// Streams a new frame of 16 random 16-QAM symbols every clock for 400 clocks
// and compares each output frame, exactly 17 cycles after its symbols were
// applied, with the bit-accurate chain model (QAM, DFT, filter, IDFT,
// modulator) in tx_ref_pkg. It checks tvalid on every edge: low for the 17
// cycles of pipeline fill after reset, high afterwards. Mechanisms that must
// each happen at least once, counted and reported: a pipeline fill ending in
// tvalid rising, a DFT/IDFT output saturating (frames of one repeated outer
// symbol push bin 0 past 16 bits), and a reset in mid-stream that drops
// tvalid and restarts the fill.
module tb_transmitter;
  import tx_ref_pkg::*;

  localparam int N      = 16;
  localparam int FORMAT = 4;
  localparam int LAT    = 17;
  localparam int FRAMES = 400;
  localparam int RESET_AT = 250;   // frame index of the mid-stream reset

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic [FORMAT*N-1:0] in;
  logic tvalid;
  logic [16*N-1:0] out;

  transmitter dut (.clk(clk), .reset(reset), .in(in), .tvalid(tvalid), .out(out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fill = 0, n_sat = 0, n_reset = 0;
  vec_t syms [FRAMES], exp_o [FRAMES];
  int since_reset;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint lane(logic [16*N-1:0] b, int i);
    return longint'(signed'(b[16*i +: 16]));
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int seg_start;
    in = '0;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    since_reset = 0;
    seg_start = 0;
    for (int c = 0; c < FRAMES + LAT; c++) begin
      // State after the edge that just passed (since_reset edges since reset
      // was released).
      if (since_reset > 0) begin
        check($sformatf("tvalid %0d edges after reset", since_reset), longint'(tvalid),
              (since_reset >= LAT) ? 1 : 0);
        if (since_reset == LAT && tvalid) n_fill++;
      end
      if (since_reset >= LAT && c - LAT >= seg_start) begin
        for (int n = 0; n < N; n++)
          check($sformatf("frame %0d lane %0d", c - LAT, n), lane(out, n), exp_o[c-LAT][n]);
      end
      if (c == RESET_AT) begin
        // One clock of reset in mid-stream: tvalid drops and the fill restarts.
        reset = 1'b1;
        @(posedge clk);
        #1;
        check("tvalid during reset", longint'(tvalid), 0);
        check("output cleared by reset", longint'(out == '0), 1);
        n_reset++;
        reset = 1'b0;
        since_reset = 0;
        seg_start = c;
      end
      if (c < FRAMES) begin
        for (int n = 0; n < N; n++) begin
          // Every 25th frame repeats the outer symbol 0101 (3d + j3d).
          syms[c][n] = (c % 25 == 3) ? 5 : longint'($urandom_range(15));
          in[FORMAT*n +: FORMAT] = FORMAT'(syms[c][n]);
        end
        n_sat += (transmit(N, FORMAT, syms[c], exp_o[c]) > 0) ? 1 : 0;
      end
      @(posedge clk);
      #1;
      since_reset++;
    end
    $display("pipeline fills: %0d, saturating frames: %0d, mid-stream resets: %0d",
             n_fill, n_sat, n_reset);
    checks++;
    if (n_fill < 2 || n_sat == 0 || n_reset == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
