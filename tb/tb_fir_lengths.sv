// Testbench of fir_linear_phase at the filter lengths and types other
// than the default 7-tap symmetric one:
//   - 8 taps symmetric (the even-length structure, h(0)=h(7) .. h(3)=h(4)),
//   - 5 taps with the worked example b = {1/4, 1/2, 3/4} in Q1.7
//     (32, 64, 96), checked by its impulse and step responses,
//   - 7 and 8 taps antisymmetric,
//   - 16 and 15 taps symmetric (longer filters).
// The random parts use fir_lp_harness, which compares every output with
// a direct-form convolution.
module tb_fir_lengths;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int NH = 5;
  logic [NH-1:0] done;
  int hc [NH], hf [NH];

  fir_lp_harness #(.TAPS(8),  .ANTISYM(1'b0)) h8s  (.clk, .done(done[0]), .checks(hc[0]), .failures(hf[0]));
  fir_lp_harness #(.TAPS(7),  .ANTISYM(1'b1)) h7a  (.clk, .done(done[1]), .checks(hc[1]), .failures(hf[1]));
  fir_lp_harness #(.TAPS(8),  .ANTISYM(1'b1)) h8a  (.clk, .done(done[2]), .checks(hc[2]), .failures(hf[2]));
  fir_lp_harness #(.TAPS(16), .ANTISYM(1'b0)) h16s (.clk, .done(done[3]), .checks(hc[3]), .failures(hf[3]));
  fir_lp_harness #(.TAPS(15), .ANTISYM(1'b0)) h15s (.clk, .done(done[4]), .checks(hc[4]), .failures(hf[4]));

  // Worked 5-tap example: y = 1/4 x(n) + 1/2 x(n-1) + 3/4 x(n-2)
  //                         + 1/2 x(n-3) + 1/4 x(n-4).
  logic rst_n, coef_we, in_valid, out_valid;
  logic [1:0] coef_addr;
  logic signed [7:0] coef_data, in_data;
  logic signed [18:0] out_data;

  fir_linear_phase #(.TAPS(5)) ex5 (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit v, input int x, input bit exp_v, input int exp_y);
    @(negedge clk);
    in_valid = v;
    in_data  = 8'(x);
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== exp_v || (exp_v && int'(out_data) != exp_y)) begin
      failures++;
      $display("5-tap example: valid %0b data %0d expected %0b %0d", out_valid, out_data, exp_v, exp_y);
    end
  endtask

  initial begin
    int imp [5] = '{32, 64, 96, 64, 32};
    int acc;
    rst_n = 1'b0; coef_we = 1'b0; in_valid = 1'b0; coef_addr = '0; coef_data = '0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = 2'(k); coef_data = 8'(imp[k]);
    end
    // address 3 does not exist in a 5-tap filter: the write must be ignored
    @(negedge clk);
    coef_addr = 2'd3; coef_data = 8'sd100;
    @(negedge clk);
    coef_we = 1'b0;
    // impulse of 1 (x 1/128 in Q0.7) gives 32, 64, 96, 64, 32 then 0
    step(1, 1, 1, imp[0]);
    for (int i = 1; i < 5; i++) step(1, 0, 1, imp[i]);
    step(0, 0, 0, 0);
    step(1, 0, 1, 0);
    // step of 100: running sum of the response
    acc = 0;
    for (int i = 0; i < 8; i++) begin
      acc += (i < 5) ? 100 * imp[i] : 0;
      step(1, 100, 1, acc);
    end

    wait (&done);
    for (int i = 0; i < NH; i++) begin
      checks += hc[i];
      failures += hf[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
