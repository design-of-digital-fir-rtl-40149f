// Linear-phase inner product cell (IPC).
//
// One IPC serves one distinct coefficient b_k of a symmetric filter. It
// first folds the two samples that share b_k, x(n-k) and x(n-(N-1-k)),
// with a pre-adder and then multiplies the sum by b_k, so one multiplier
// does the work of two:  prod = (x_a + x_b) * coef.
// For an antisymmetric filter (h(n) = -h(N-1-n)) the pre-adder subtracts:
// prod = (x_a - x_b) * coef. In a CENTER cell (middle tap of an
// odd-length filter) there is no partner sample: prod = x_a * coef and
// x_b is unused.
//
// Purely combinational. Widths: samples DATA_W, coefficient COEF_W, the
// pair sum DATA_W+1 and the product DATA_W+1+COEF_W bits, all signed, so
// no result ever overflows.
// Folding the pair before the multiplier follows the document; the
// antisymmetric option covers the other two of the four linear-phase
// filter types it lists; the full-precision widths are this design's choice.
module fir_ipc #(
  parameter int unsigned DATA_W  = fir_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W  = fir_pkg::COEF_W_DEF,
  parameter bit          CENTER  = 1'b0,
  parameter bit          ANTISYM = 1'b0,
  localparam int unsigned PW     = fir_pkg::prod_w(DATA_W, COEF_W)
) (
  input  logic signed [DATA_W-1:0] x_a,
  input  logic signed [DATA_W-1:0] x_b,
  input  logic signed [COEF_W-1:0] coef,
  output logic signed [PW-1:0]     prod
);

  logic signed [DATA_W:0] pair;

  always_comb begin
    if (CENTER)       pair = (DATA_W+1)'(x_a);
    else if (ANTISYM) pair = (DATA_W+1)'(x_a) - (DATA_W+1)'(x_b);
    else              pair = (DATA_W+1)'(x_a) + (DATA_W+1)'(x_b);
    prod = PW'(pair) * PW'(coef);
  end

endmodule
