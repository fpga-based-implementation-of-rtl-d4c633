// seq_controller: sequence controller of the sequential multiply-accumulate filter.
//
// On every rising edge of the sampling clock Clk_S it runs one sampling interval of
// N processing cycles. Processing cycle j (j = 1..N, tap index m = j-1) takes two
// system-clock cycles:
//   phase P: clk_p is high; Reg B and Reg C load the outputs of MUX-H and MUX-R,
//            which are both steered by mux_sel = m;
//   phase R: clk_r[m] is high; register Reg m loads the multiplier-adder result.
// So the register load strobes are active half a processing cycle away from the
// processing strobe, and mux_sel changes together with the processing strobe, as
// the published sequence controller does with separate clocks. Here all of them
// are clock enables in the single system-clock domain (a design choice), so one
// processing cycle is two system clocks and the system clock must exceed
// 2 * N * fs plus a few cycles (12.25 MHz for N = 513 at 10 kHz gives the
// published 6.125 MHz processing rate).
//
// Clk_S comes from the codec side and is synchronised with two flip-flops.
// A Clk_S edge that arrives while an interval is still running is dropped and
// reported on `overrun` for one cycle (this flag is this design's addition).
//
// Interface: clk_s in; sample_start (one-cycle pulse when an interval begins,
// used to capture x(n)), mux_sel, clk_p, clk_r[N] (one-hot), busy, overrun out.
// Timing: counting rising clk edges after the Clk_S rising edge, sample_start is
// high after the 2nd edge, busy and the first clk_p after the 3rd, clk_r[0] after
// the 4th, and busy falls with the (3 + 2N)-th edge.
module seq_controller #(
  parameter int unsigned N      = comb_pkg::N_TAPS,
  localparam int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clk_s,
  output logic             sample_start,
  output logic [SEL_W-1:0] mux_sel,
  output logic             clk_p,
  output logic [N-1:0]     clk_r,
  output logic             busy,
  output logic             overrun
);

  typedef enum logic {PH_P = 1'b0, PH_R = 1'b1} phase_e;

  logic [2:0]       clk_s_sync;   // two synchroniser stages and the edge-detect stage
  logic             clk_s_rise;
  phase_e           phase;
  logic [SEL_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) clk_s_sync <= '0;
    else     clk_s_sync <= {clk_s_sync[1:0], clk_s};
  end

  assign clk_s_rise   = clk_s_sync[1] & ~clk_s_sync[2];
  assign sample_start = clk_s_rise & ~busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      phase   <= PH_P;
      cnt     <= '0;
      overrun <= 1'b0;
    end else begin
      overrun <= clk_s_rise & busy;
      if (sample_start) begin
        busy  <= 1'b1;
        phase <= PH_P;
        cnt   <= '0;
      end else if (busy) begin
        if (phase == PH_P) begin
          phase <= PH_R;
        end else begin
          phase <= PH_P;
          if (32'(cnt) == N - 1) busy <= 1'b0;
          else                   cnt  <= cnt + 1'b1;
        end
      end
    end
  end

  assign mux_sel = cnt;
  assign clk_p   = busy & (phase == PH_P);

  always_comb begin
    clk_r = '0;
    if (busy && phase == PH_R) clk_r[cnt] = 1'b1;
  end

  // Exactly one register is loaded per R phase, and never during a P phase.
  a_onehot_r: assert property (@(posedge clk) disable iff (rst)
                               (busy && phase == PH_R) |-> $onehot(clk_r));
  a_no_r_in_p: assert property (@(posedge clk) disable iff (rst) clk_p |-> (clk_r == '0));

endmodule
