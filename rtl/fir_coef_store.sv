// Coefficient storage unit of the linear-phase FIR filter.
//
// Because h(n) = h(N-1-n), only the M = ceil(TAPS/2) distinct coefficients
// b0 .. b(M-1) are kept; entry k serves both tap k and tap TAPS-1-k. The
// store is a small register file written one word per cycle through
// wr_en/wr_addr/wr_data and read in parallel by all inner product cells.
// Writes to an address at or beyond M are ignored. Reset clears all
// entries to zero (the filter then outputs zero).
//
// Timing: a write is visible on coefs[] from the cycle after it.
// The document says only that the coefficient values are stored here;
// the write port, its address width and the reset value are this
// design's choices.
module fir_coef_store #(
  parameter int unsigned TAPS   = fir_pkg::TAPS_DEF,
  parameter int unsigned COEF_W = fir_pkg::COEF_W_DEF,
  localparam int unsigned M      = fir_pkg::n_coefs(TAPS),
  localparam int unsigned ADDR_W = (M > 1) ? $clog2(M) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic        [ADDR_W-1:0] wr_addr,
  input  logic signed [COEF_W-1:0] wr_data,
  output logic signed [COEF_W-1:0] coefs [M]
);

  logic signed [COEF_W-1:0] mem [M];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < M; k++) mem[k] <= '0;
    end else if (wr_en && (32'(wr_addr) < M)) begin
      mem[wr_addr] <= wr_data;
    end
  end

  assign coefs = mem;

endmodule
