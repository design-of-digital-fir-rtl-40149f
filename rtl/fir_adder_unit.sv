// Adder unit of the linear-phase FIR filter.
//
// Adds the M products of the inner product unit into the filter output
// y(n) = sum_k prods[k]. The sum is kept at full precision: it is
// $clog2(M) bits wider than one product, so it never overflows.
//
// Purely combinational; the filter top registers the result.
// The document gives only the function of this unit; a plain sum, which a
// synthesis tool maps to an adder chain or tree, is this design's choice.
module fir_adder_unit #(
  parameter int unsigned N_IN = fir_pkg::n_coefs(fir_pkg::TAPS_DEF),
  parameter int unsigned IN_W = fir_pkg::prod_w(fir_pkg::DATA_W_DEF, fir_pkg::COEF_W_DEF),
  localparam int unsigned OUT_W = IN_W + $clog2(N_IN)
) (
  input  logic signed [IN_W-1:0]  terms [N_IN],
  output logic signed [OUT_W-1:0] sum
);

  always_comb begin
    sum = '0;
    for (int k = 0; k < N_IN; k++) sum += OUT_W'(terms[k]);
  end

endmodule
