// Inner product unit (IPU) of the linear-phase FIR filter.
//
// The IPU is an array of M = ceil(TAPS/2) inner product cells. Cell k
// receives the symmetric sample pair taps[k] and taps[TAPS-1-k] and the
// shared coefficient coefs[k], and produces prods[k] = (taps[k] +
// taps[TAPS-1-k]) * coefs[k]. For an odd tap count the last cell is the
// centre tap taps[(TAPS-1)/2] * coefs[M-1], with no pre-adder. With
// ANTISYM set the pairs are subtracted instead, and for an odd tap count
// the centre product is zero because an antisymmetric response has
// h((N-1)/2) = 0.
//
// Purely combinational; the products are summed by the adder unit.
// The division into cells follows the document; the centre-tap handling
// follows from its symmetry condition h(n) = h(N-1-n).
module fir_ipu #(
  parameter int unsigned TAPS    = fir_pkg::TAPS_DEF,
  parameter int unsigned DATA_W  = fir_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W  = fir_pkg::COEF_W_DEF,
  parameter bit          ANTISYM = 1'b0,
  localparam int unsigned M      = fir_pkg::n_coefs(TAPS),
  localparam int unsigned PW     = fir_pkg::prod_w(DATA_W, COEF_W)
) (
  input  logic signed [DATA_W-1:0] taps  [TAPS],
  input  logic signed [COEF_W-1:0] coefs [M],
  output logic signed [PW-1:0]     prods [M]
);

  localparam bit ODD = (TAPS % 2) == 1;

  for (genvar k = 0; k < M; k++) begin : g_cell
    if (ODD && k == M - 1) begin : g_center
      if (ANTISYM) begin : g_zero
        assign prods[k] = '0;
      end else begin : g_mult
        fir_ipc #(.DATA_W(DATA_W), .COEF_W(COEF_W), .CENTER(1'b1), .ANTISYM(1'b0)) u_ipc (
          .x_a (taps[k]),
          .x_b (taps[k]),
          .coef(coefs[k]),
          .prod(prods[k])
        );
      end
    end else begin : g_pair
      fir_ipc #(.DATA_W(DATA_W), .COEF_W(COEF_W), .CENTER(1'b0), .ANTISYM(ANTISYM)) u_ipc (
        .x_a (taps[k]),
        .x_b (taps[TAPS-1-k]),
        .coef(coefs[k]),
        .prod(prods[k])
      );
    end
  end

endmodule
