// Reusable checking harness for fir_linear_phase at any tap count and
// symmetry. It resets the filter, loads random coefficients, streams
// random samples with idle cycles and compares every output with a
// direct-form convolution over all TAPS taps, the response being
// expanded by h(i) = h(TAPS-1-i) (or -h(TAPS-1-i), with a zero centre
// tap, when ANTISYM is set). It reports its counts through its ports and
// raises done when it has finished.
module fir_lp_harness #(
  parameter int unsigned TAPS    = 8,
  parameter bit          ANTISYM = 1'b0,
  parameter int unsigned SAMPLES = 500
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned M      = (TAPS + 1) / 2;
  localparam int unsigned ADDR_W = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned OUT_W  = 8 + 1 + 8 + $clog2(M);

  logic rst_n, coef_we, in_valid, out_valid;
  logic [ADDR_W-1:0] coef_addr;
  logic signed [7:0] coef_data, in_data;
  logic signed [OUT_W-1:0] out_data;

  fir_linear_phase #(.TAPS(TAPS), .ANTISYM(ANTISYM)) dut (.*);

  int hist [TAPS];
  int b    [M];

  function automatic int h(input int i);
    int j = TAPS - 1 - i;
    if (i == j) return ANTISYM ? 0 : b[i];
    if (i < j)  return b[i];
    return ANTISYM ? -b[j] : b[j];
  endfunction

  initial begin
    int exp_y;
    bit v;
    done = 1'b0; checks = 0; failures = 0;
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    rst_n = 1'b0; coef_we = 1'b0; in_valid = 1'b0; coef_addr = '0; coef_data = '0; in_data = '0;
    repeat (3) @(posedge clk);
    for (int k = 0; k < M; k++) begin
      @(negedge clk);
      rst_n = 1'b1; coef_we = 1'b1; coef_addr = ADDR_W'(k);
      b[k] = int'($urandom_range(255)) - 128;
      coef_data = 8'(b[k]);
    end
    @(negedge clk);
    coef_we = 1'b0;
    for (int s = 0; s < SAMPLES; s++) begin
      @(negedge clk);
      v = ($urandom_range(3) != 0);
      in_valid = v;
      in_data = 8'($urandom);
      if (v) begin
        for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = int'(in_data);
        exp_y = 0;
        for (int i = 0; i < TAPS; i++) exp_y += h(i) * hist[i];
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== v) begin
        failures++;
        $display("TAPS=%0d ANTISYM=%0b: out_valid %0b expected %0b", TAPS, ANTISYM, out_valid, v);
      end
      if (v) begin
        checks++;
        if (int'(out_data) != exp_y) begin
          failures++;
          $display("TAPS=%0d ANTISYM=%0b: out_data %0d expected %0d", TAPS, ANTISYM, out_data, exp_y);
        end
      end
    end
    done = 1'b1;
  end
endmodule
