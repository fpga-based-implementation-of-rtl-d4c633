// tb_seq_controller: self-checking test of the sequence controller.
//
// Runs a 7-tap controller through several sampling intervals and checks, cycle by
// cycle against a schedule worked out from the edge count, that each interval
// has exactly N processing cycles, that mux_sel steps 0..N-1 with the processing
// strobe, that each register strobe clk_r[m] comes half a processing cycle after
// the processing strobe, and that the controller is idle between intervals. It
// also raises Clk_S in the middle of an interval and checks that this edge is
// dropped and flagged on overrun.
module tb_seq_controller;
  localparam int unsigned N      = 7;
  localparam int unsigned SEL_W  = $clog2(N);
  localparam int unsigned PERIOD = 2 * N + 12;   // system clocks per sample

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic clk_s = 1'b0;
  logic             sample_start;
  logic [SEL_W-1:0] mux_sel;
  logic             clk_p;
  logic [N-1:0]     clk_r;
  logic             busy;
  logic             overrun;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int edge_cycle = -1000;     // cycle at which the last counted Clk_S edge was driven
  int overrun_seen = 0;
  int overrun_expected_at = -1;

  seq_controller #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // Expected outputs as a function of the number k of rising edges since clk_s rose.
  always @(negedge clk) begin
    int k;
    if (!rst) begin
      k = cycle - edge_cycle;
      if (k == 2) check(sample_start, "sample_start two edges after Clk_S");
      else        check(!sample_start, "no sample_start");
      if (k >= 3 && k < 3 + 2 * int'(N)) begin
        int m;
        m = (k - 3) / 2;
        check(busy, "busy during interval");
        check(int'(mux_sel) == m, $sformatf("mux_sel=%0d expected %0d", mux_sel, m));
        if ((k - 3) % 2 == 0) begin
          check(clk_p && clk_r == '0, "phase P: clk_p only");
        end else begin
          check(!clk_p && clk_r == (N'(1) << m), $sformatf("phase R: clk_r[%0d] only", m));
        end
      end else begin
        check(!busy && !clk_p && clk_r == '0, "idle between intervals");
      end
      if (overrun) begin
        overrun_seen++;
        check(cycle == overrun_expected_at, "overrun at the expected cycle");
      end
    end
  end

  initial begin : stim
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int s = 0; s < 6; s++) begin
      @(posedge clk);
      clk_s = 1'b1;
      edge_cycle = cycle;
      if (s == 3) begin
        // Extra Clk_S pulse while the interval runs: it must be dropped.
        repeat (4) @(posedge clk);
        clk_s = 1'b0;
        repeat (4) @(posedge clk);
        clk_s = 1'b1;
        overrun_expected_at = cycle + 3;
        repeat (PERIOD / 2 - 8) @(posedge clk);
      end else begin
        repeat (PERIOD / 2) @(posedge clk);
      end
      clk_s = 1'b0;
      repeat (PERIOD / 2 - 1) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    check(overrun_seen == 1, "exactly one overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
