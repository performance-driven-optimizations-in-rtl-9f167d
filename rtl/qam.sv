// qam: parallel Gray-coded rectangular QAM mapper, purely combinational.
//
// The input bus carries N clusters of FORMAT bits (log2 of the QAM order:
// 3, 4, 5, 6 for 8-, 16-, 32- and 64-QAM); cluster i sits in
// in_bits[FORMAT*i +: FORMAT] and becomes lane i of the I and Q output buses
// (16-bit words, lane i in bits [W*i +: W]).
//
// Within a cluster the upper ceil(FORMAT/2) bits select the I level and the
// lower floor(FORMAT/2) bits the Q level. For each axis the first (most
// significant) bit is the sign, 0 meaning positive, and the remaining bits are
// the Gray code of the magnitude index, so neighbouring points differ in one
// bit. For 16-QAM this gives 00 -> d, 01 -> 3d, 10 -> -d, 11 -> -3d on each
// axis and the constellation of the source, with 3d equal to the SRRC centre
// tap c5 in Q1.15. Following the source, only the selected format's circuit
// is generated. The 4x2 and 8x4 rectangles used for 8- and 32-QAM, the
// sign/Gray layout for axes of more than two bits and placing the outermost
// level of every axis at c5 are this design's choices.
module qam #(
  parameter int unsigned N      = 16,
  parameter int unsigned W      = 16,
  parameter int unsigned FORMAT = 4
) (
  input  logic [FORMAT*N-1:0] in_bits,
  output logic [W*N-1:0]      i_out,
  output logic [W*N-1:0]      q_out
);
  import qam_tx_pkg::SAMPLE_W;
  import qam_tx_pkg::qam_level;

  localparam int unsigned IB = (FORMAT + 1) / 2;  // bits on the I axis
  localparam int unsigned QB = FORMAT / 2;        // bits on the Q axis

  initial begin
    assert (FORMAT >= 3 && FORMAT <= 6)
      else $error("qam: FORMAT %0d unsupported (8- to 64-QAM)", FORMAT);
    assert (W >= SAMPLE_W) else $error("qam: W must be at least %0d", SAMPLE_W);
  end

  // Magnitude levels of each axis, index = binary magnitude (Gray decoded):
  // entry j holds (2j+1)*d widened to W bits.
  function automatic logic [4*W-1:0] level_table(int unsigned bits);
    logic [4*W-1:0] t;
    t = '0;
    for (int j = 0; j < (1 << (bits - 1)); j++)
      t[W*j +: W] = (W)'(qam_level(bits, j)) <<< (W - SAMPLE_W);
    return t;
  endfunction

  localparam logic [4*W-1:0] LVL_I = level_table(IB);
  localparam logic [4*W-1:0] LVL_Q = level_table(QB);

  // Signed level of one axis field: sign bit on top, Gray-coded magnitude below.
  function automatic logic signed [W-1:0] axis_map(int unsigned bits, logic [4*W-1:0] lvl,
                                                   logic [2:0] field);
    logic [2:0]          gray;
    logic [2:0]          bin;
    logic signed [W-1:0] mag;
    gray = '0;
    bin  = '0;
    if (bits > 1) gray = field & 3'((1 << (bits - 1)) - 1);
    for (int b = 2; b >= 0; b--)
      bin[b] = (b == 2) ? gray[2] : (bin[b+1] ^ gray[b]);
    mag = lvl[W*bin[1:0] +: W];
    return field[bits-1] ? -mag : mag;
  endfunction

  for (genvar i = 0; i < N; i++) begin : g_lane
    logic [FORMAT-1:0] sym;
    assign sym = in_bits[FORMAT*i +: FORMAT];
    always_comb begin
      i_out[W*i +: W] = axis_map(IB, LVL_I, 3'(sym[FORMAT-1 -: IB]));
      q_out[W*i +: W] = axis_map(QB, LVL_Q, 3'(sym[QB-1:0]));
    end
  end

endmodule
