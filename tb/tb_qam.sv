// tb_qam: self-checking testbench of the parallel QAM mapper.
//
// 16-QAM (N = 16): every one of the 16 symbols is placed in every lane and
// checked against the constellation written out below (I from the upper bit
// pair, Q from the lower: 00 -> d, 01 -> 3d, 10 -> -d, 11 -> -3d, with
// 3d = 17726 and d = 5909), then random buses are checked lane by lane.
// 8-, 32- and 64-QAM (N = 4): every symbol against the reference model, and
// the Gray property: the codes of neighbouring levels on an axis differ in
// exactly one bit, and each axis uses 2^bits distinct, symmetric levels.
module tb_qam;
  import tx_ref_pkg::*;

  localparam int N = 16;

  int checks = 0, failures = 0;

  logic [4*N-1:0]  in16;
  logic [16*N-1:0] i16, q16;
  logic [3*4-1:0]  in8;
  logic [16*4-1:0] i8, q8;
  logic [5*4-1:0]  in32;
  logic [16*4-1:0] i32, q32;
  logic [6*4-1:0]  in64;
  logic [16*4-1:0] i64, q64;

  qam #(.N(N), .W(16), .FORMAT(4)) dut16 (.in_bits(in16), .i_out(i16), .q_out(q16));
  qam #(.N(4),  .W(16), .FORMAT(3)) dut8  (.in_bits(in8),  .i_out(i8),  .q_out(q8));
  qam #(.N(4),  .W(16), .FORMAT(5)) dut32 (.in_bits(in32), .i_out(i32), .q_out(q32));
  qam #(.N(4),  .W(16), .FORMAT(6)) dut64 (.in_bits(in64), .i_out(i64), .q_out(q64));

  // Level of a 2-bit axis code in the 16-QAM constellation.
  localparam longint LV16 [4] = '{5909, 17726, -5909, -17726};

  initial begin
    #1000000;
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

  // Ascending insertion sort of signed levels.
  task automatic sort_levels(ref longint q [$]);
    longint t;
    for (int a = 1; a < q.size(); a++)
      for (int b = a; b > 0 && q[b-1] > q[b]; b--) begin
        t = q[b]; q[b] = q[b-1]; q[b-1] = t;
      end
  endtask

  // One axis of a FORMAT-bit mapper, N = 4: all symbols, Gray neighbours.
  task automatic check_format(int format);
    longint iv, qv, ri, rq;
    longint seen_i [longint], seen_q [longint];
    int ib, qb, code_of_i [longint], code_of_q [longint];
    longint li [$], lq [$];
    ib = (format + 1) / 2;
    qb = format / 2;
    for (int s = 0; s < (1 << format); s++) begin
      for (int l = 0; l < 4; l++) begin
        case (format)
          3: in8[3*l +: 3]  = 3'((s + l) % 8);
          5: in32[5*l +: 5] = 5'((s + l) % 32);
          default: in64[6*l +: 6] = 6'((s + l) % 64);
        endcase
      end
      #1;
      for (int l = 0; l < 4; l++) begin
        iv = (format == 3) ? longint'(signed'(i8[16*l +: 16])) :
             (format == 5) ? longint'(signed'(i32[16*l +: 16])) : longint'(signed'(i64[16*l +: 16]));
        qv = (format == 3) ? longint'(signed'(q8[16*l +: 16])) :
             (format == 5) ? longint'(signed'(q32[16*l +: 16])) : longint'(signed'(q64[16*l +: 16]));
        qam_map(format, (s + l) % (1 << format), ri, rq);
        check($sformatf("%0d-QAM symbol %0d I", 1 << format, (s + l) % (1 << format)), iv, ri);
        check($sformatf("%0d-QAM symbol %0d Q", 1 << format, (s + l) % (1 << format)), qv, rq);
        code_of_i[iv] = ((s + l) % (1 << format)) >> qb;
        code_of_q[qv] = ((s + l) % (1 << format)) & ((1 << qb) - 1);
      end
    end
    // Distinct symmetric levels and Gray neighbours along each axis.
    foreach (code_of_i[v]) li.push_back(v);
    foreach (code_of_q[v]) lq.push_back(v);
    sort_levels(li);
    sort_levels(lq);
    check($sformatf("%0d-QAM I level count", 1 << format), li.size(), 1 << ib);
    check($sformatf("%0d-QAM Q level count", 1 << format), lq.size(), 1 << qb);
    check($sformatf("%0d-QAM I symmetry", 1 << format), li[0], -li[li.size()-1]);
    check($sformatf("%0d-QAM outer level", 1 << format), li[li.size()-1], 17726);
    for (int j = 1; j < li.size(); j++)
      check($sformatf("%0d-QAM I Gray step %0d", 1 << format, j),
            $countones(code_of_i[li[j]] ^ code_of_i[li[j-1]]), 1);
    for (int j = 1; j < lq.size(); j++)
      check($sformatf("%0d-QAM Q Gray step %0d", 1 << format, j),
            $countones(code_of_q[lq[j]] ^ code_of_q[lq[j-1]]), 1);
  endtask

  initial begin
    in8 = '0; in32 = '0; in64 = '0; in16 = '0;
    // 16-QAM: each symbol in each lane, rotated across lanes.
    for (int s = 0; s < 16; s++) begin
      for (int l = 0; l < N; l++) in16[4*l +: 4] = 4'((s + l) % 16);
      #1;
      for (int l = 0; l < N; l++) begin
        check($sformatf("16-QAM lane %0d symbol %0d I", l, (s + l) % 16), lane(i16, l), LV16[((s + l) % 16) >> 2]);
        check($sformatf("16-QAM lane %0d symbol %0d Q", l, (s + l) % 16), lane(q16, l), LV16[((s + l) % 16) & 3]);
      end
    end
    for (int r = 0; r < 200; r++) begin
      in16 = {$urandom, $urandom};
      #1;
      for (int l = 0; l < N; l++) begin
        check("16-QAM random I", lane(i16, l), LV16[in16[4*l+2 +: 2]]);
        check("16-QAM random Q", lane(q16, l), LV16[in16[4*l +: 2]]);
      end
    end
    check_format(3);
    check_format(5);
    check_format(6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
