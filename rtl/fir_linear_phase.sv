// Linear-phase FIR filter with folded (minimum-multiplier) realization.
//
// An N-tap FIR filter whose impulse response is symmetric, h(n) =
// h(N-1-n), has only M = ceil(N/2) distinct coefficients. This filter
// adds each pair of samples that share a coefficient before multiplying,
// so it uses M multipliers instead of N:
//   y(n) = sum_{k<N/2} b_k (x(n-k) + x(n-N+1+k))  [+ b_mid x(n-(N-1)/2) if N odd]
// It is built from the four units of the block diagram: the register unit
// (delay line), the coefficient storage unit, the inner product unit (one
// inner product cell per distinct coefficient) and the adder unit.
// With ANTISYM set the filter realizes the antisymmetric types,
// h(n) = -h(N-1-n), by subtracting each pair instead.
//
// Interface:
//   coef_we/coef_addr/coef_data  write distinct coefficient b_addr (signed).
//   in_valid/in_data             one signed input sample per valid cycle;
//                                with in_valid low the filter holds its state.
//   out_valid/out_data           the full-precision output y(n), signed,
//                                DATA_W+1+COEF_W+$clog2(M) bits.
// Timing: one sample per clock at most; y(n) for the sample accepted on a
// clock edge appears on out_data after that edge (latency one cycle), with
// out_valid high for that one cycle (an assertion checks this). Reset
// (active-low, synchronous) clears
// the sample history, the coefficients and the output.
// The structure and the default 7-tap, 8-bit sizes follow the document;
// the handshake, the reset and the output register are this design's own.
module fir_linear_phase #(
  parameter int unsigned TAPS    = fir_pkg::TAPS_DEF,
  parameter int unsigned DATA_W  = fir_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W  = fir_pkg::COEF_W_DEF,
  parameter bit          ANTISYM = 1'b0,
  localparam int unsigned M      = fir_pkg::n_coefs(TAPS),
  localparam int unsigned ADDR_W = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned PW     = fir_pkg::prod_w(DATA_W, COEF_W),
  localparam int unsigned OUT_W  = fir_pkg::sum_w(DATA_W, COEF_W, TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_we,
  input  logic        [ADDR_W-1:0] coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_data
);

  logic signed [DATA_W-1:0] taps  [TAPS];
  logic signed [COEF_W-1:0] coefs [M];
  logic signed [PW-1:0]     prods [M];
  logic signed [OUT_W-1:0]  sum;

  fir_register_unit #(.TAPS(TAPS), .DATA_W(DATA_W)) u_regs (
    .clk, .rst_n, .in_valid, .in_data, .taps
  );

  fir_coef_store #(.TAPS(TAPS), .COEF_W(COEF_W)) u_coefs (
    .clk, .rst_n,
    .wr_en  (coef_we),
    .wr_addr(coef_addr),
    .wr_data(coef_data),
    .coefs
  );

  fir_ipu #(.TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .ANTISYM(ANTISYM)) u_ipu (
    .taps, .coefs, .prods
  );

  fir_adder_unit #(.N_IN(M), .IN_W(PW)) u_add (
    .terms(prods), .sum
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= sum;
    end
  end

  // An output is produced exactly for each accepted sample, one cycle later.
  a_out_follows_in: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid == $past(in_valid && rst_n));

endmodule
