// Register unit: the tapped delay line of the FIR filter.
//
// It holds the N-1 most recent past input samples. The sample being
// presented on in_data is tap 0 (combinational pass-through), tap k is the
// sample that arrived k accepted samples earlier: taps[k] = x(n-k). On a
// clock edge with in_valid high the line shifts by one place and in_data
// enters; with in_valid low it holds. Reset clears every stored sample to
// zero, so the filter starts from a zero history.
//
// Interface: clk, active-low synchronous reset rst_n, in_valid/in_data
// (one signed sample), taps[0..TAPS-1].
// Timing: taps[1..] change one cycle after an accepted sample.
// The document names this unit only as the data-holding registers; the
// shift-on-valid control and the reset to zero are this design's choices.
module fir_register_unit #(
  parameter int unsigned TAPS   = fir_pkg::TAPS_DEF,
  parameter int unsigned DATA_W = fir_pkg::DATA_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic signed [DATA_W-1:0] taps [TAPS]
);

  // Stored history x(n-1) .. x(n-TAPS+1).
  logic signed [DATA_W-1:0] hist [TAPS-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS - 1; k++) hist[k] <= '0;
    end else if (in_valid) begin
      hist[0] <= in_data;
      for (int k = 1; k < TAPS - 1; k++) hist[k] <= hist[k-1];
    end
  end

  always_comb begin
    taps[0] = in_data;
    for (int k = 1; k < TAPS; k++) taps[k] = hist[k-1];
  end

endmodule
