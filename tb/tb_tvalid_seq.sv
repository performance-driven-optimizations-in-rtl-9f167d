// tb_tvalid_seq: self-checking testbench of the validity flag sequencer
// (LATENCY = 17).
//
// After each release of reset tvalid must stay low for exactly 17 rising
// edges, rise on the 17th and then stay high; a reset in mid-run must drop
// it at once and restart the count. Checked over three resets, one of them
// before the count has finished.
module tb_tvalid_seq;
  localparam int LATENCY = 17;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic tvalid;

  tvalid_seq #(.LATENCY(LATENCY)) dut (.clk(clk), .reset(reset), .tvalid(tvalid));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_flag(logic v, int edge_no);
    checks++;
    if (tvalid !== v) begin
      failures++;
      $display("edge %0d after reset: tvalid=%0b expected %0b", edge_no, tvalid, v);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 expect_flag(1'b0, 0);
    for (int run = 0; run < 3; run++) begin
      reset = 1'b0;
      // Run 1 is cut short by a reset before the flag rises.
      for (int e = 1; e <= ((run == 1) ? 9 : LATENCY + 40); e++) begin
        @(posedge clk);
        #1 expect_flag((e >= LATENCY) ? 1'b1 : 1'b0, e);
      end
      reset = 1'b1;
      @(posedge clk);
      #1 expect_flag(1'b0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
