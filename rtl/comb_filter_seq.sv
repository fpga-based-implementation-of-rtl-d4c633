// comb_filter_seq: one comb filter, an N-tap FIR filter computed with a single
// multiplier and a single adder used N times per sample (sequential
// multiply-accumulate).
//
// Datapath (as published): tap-weight multiplexer MUX-H (inside coeff_rom) feeding
// buffer Reg B; intermediate-result multiplexer MUX-R feeding buffer Reg C; the
// multiplier x(n) * Reg B and the adder (+ Reg C); N b-bit registers Reg 0..Reg N-1
// that all take the adder output, each on its own load strobe clk_r[I].
// In processing cycle m (0..N-1) MUX-H selects h_m and MUX-R selects Reg m+1
// (zero for the last cycle), so that
//   Reg m <= h_m * x(n) + Reg m+1 (value from the previous sample),
//   Reg N-1 <= h_{N-1} * x(n).
// Because the cycles run from Reg 0 upward, Reg m+1 is read before it is
// overwritten. Reg 0 then holds y(n) = sum_k h_k x(n-k): this is the transposed
// direct form evaluated one tap at a time. The register contents follow the
// published operation table row by row.
//
// Own choices: x(n) is captured in an input register when the interval starts
// and held for all N cycles; all registers reset to zero; products are a x a ->
// 2a bits, sign-extended or truncated to b bits, and the adder wraps modulo 2**b.
//
// Interface: clk_s (sampling clock), x_in (signed a bits) in; y (signed b bits,
// Reg 0), y_valid, busy (an interval is running), overrun out. Timing: y_valid pulses for one cycle when Reg 0
// has been loaded, i.e. after the first processing cycle of the interval: it
// rises with the 5th rising clk edge after the Clk_S rising edge (two edges of
// synchronisation, one of edge detection, phase P, phase R). The remaining N-1
// processing cycles prepare Reg 1..Reg N-1 for the next sample; the interval
// lasts 2N system clocks after the 3rd edge.
module comb_filter_seq #(
  parameter int unsigned N         = comb_pkg::N_TAPS,
  parameter int unsigned A_W       = comb_pkg::A_W,
  parameter int unsigned B_W       = comb_pkg::B_W,
  parameter int unsigned FS_HZ     = comb_pkg::FS_HZ,
  parameter int unsigned COEF_FRAC = comb_pkg::COEF_FRAC,
  parameter comb_pkg::ear_e EAR    = comb_pkg::EAR_LEFT,
  localparam int unsigned SEL_W    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  clk_s,
  input  logic signed [A_W-1:0] x_in,
  output logic signed [B_W-1:0] y,
  output logic                  y_valid,
  output logic                  busy,
  output logic                  overrun
);

  logic             sample_start;
  logic [SEL_W-1:0] mux_sel;
  logic             clk_p;
  logic [N-1:0]     clk_r;

  seq_controller #(.N(N)) u_ctrl (
    .clk, .rst, .clk_s,
    .sample_start, .mux_sel, .clk_p, .clk_r, .busy, .overrun
  );

  logic signed [A_W-1:0] h_sel;    // MUX-H output

  coeff_rom #(
    .N(N), .A_W(A_W), .FS_HZ(FS_HZ), .COEF_FRAC(COEF_FRAC), .EAR(EAR)
  ) u_rom (
    .sel(mux_sel), .h(h_sel)
  );

  logic signed [A_W-1:0]   x_reg;
  logic signed [A_W-1:0]   reg_b;
  logic signed [B_W-1:0]   reg_c;
  logic signed [B_W-1:0]   regs [N];      // Reg 0 .. Reg N-1
  logic signed [B_W-1:0]   mux_r_in [N];  // MUX-R inputs: Reg 1 .. Reg N-1, zero
  logic signed [B_W-1:0]   mux_r;
  logic signed [2*A_W-1:0] product;
  logic signed [B_W-1:0]   sum;

  always_comb begin
    for (int unsigned i = 0; i < N - 1; i++) mux_r_in[i] = regs[i + 1];
    mux_r_in[N - 1] = '0;
    mux_r = (32'(mux_sel) < N) ? mux_r_in[mux_sel] : '0;
  end

  assign product = x_reg * reg_b;
  assign sum     = B_W'(product) + reg_c;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_reg <= '0;
      reg_b <= '0;
      reg_c <= '0;
    end else begin
      if (sample_start) x_reg <= x_in;
      if (clk_p) begin
        reg_b <= h_sel;
        reg_c <= mux_r;
      end
    end
  end

  for (genvar gi = 0; gi < N; gi++) begin : g_reg
    always_ff @(posedge clk) begin
      if (rst)            regs[gi] <= '0;
      else if (clk_r[gi]) regs[gi] <= sum;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) y_valid <= 1'b0;
    else     y_valid <= clk_r[0];
  end

  assign y = regs[0];

endmodule
