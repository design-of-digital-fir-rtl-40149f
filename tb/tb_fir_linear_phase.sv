// End-to-end testbench of fir_linear_phase at its default size (7 taps,
// 8-bit samples and coefficients, symmetric).
//
// The reference is a plain direct-form convolution y(n) = sum h(i) x(n-i)
// over all 7 taps, with h(i) expanded from the 4 stored coefficients by
// h(i) = h(6-i); it shares nothing with the folded structure under test.
// Every cycle the testbench checks out_valid (one cycle after in_valid)
// and out_data. The run covers, and counts:
//   - coefficient loading before the stream and reloading during it,
//   - idle cycles with in_valid low (the filter must hold its state),
//   - the impulse response, which must equal h(0..6) and be symmetric,
//   - the worked 5-tap example b = {1/4, 1/2, 3/4}, run with b0 = 0,
//   - the centre tap contributing to the output,
//   - all-extreme operands (largest output magnitude, no overflow),
//   - a reset in the middle of the stream.
// A mechanism that never happens counts as a failure.
module tb_fir_linear_phase;
  localparam int unsigned TAPS   = 7;
  localparam int unsigned M      = 4;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned OUT_W  = 19;

  logic clk = 1'b0;
  logic rst_n;
  logic coef_we;
  logic [1:0] coef_addr;
  logic signed [COEF_W-1:0] coef_data;
  logic in_valid;
  logic signed [DATA_W-1:0] in_data;
  logic out_valid;
  logic signed [OUT_W-1:0] out_data;

  fir_linear_phase dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_coef_load = 0, n_coef_reload = 0, n_hold = 0, n_impulse = 0;
  int n_center = 0, n_extreme = 0, n_reset = 0, n_outputs = 0, n_example = 0;

  int hist [TAPS];   // x(n), x(n-1), ... of the model
  int b    [M];      // stored coefficients of the model
  bit exp_valid;
  int exp_data;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int h(input int i);
    return b[(i < TAPS - 1 - i) ? i : TAPS - 1 - i];
  endfunction

  function automatic int model_y();
    int y = 0;
    for (int i = 0; i < TAPS; i++) y += h(i) * hist[i];
    return y;
  endfunction

  // One clock cycle: apply the stimulus at the falling edge, update the
  // model at the rising edge, check the registered output just after it.
  task automatic cycle(input bit v, input int x, input bit we = 1'b0,
                       input int addr = 0, input int cdata = 0, input bit do_rst = 1'b0);
    @(negedge clk);
    rst_n     = !do_rst;
    in_valid  = v;
    in_data   = DATA_W'(x);
    coef_we   = we;
    coef_addr = 2'(addr);
    coef_data = COEF_W'(cdata);
    @(posedge clk);
    if (do_rst) begin
      for (int i = 0; i < TAPS; i++) hist[i] = 0;
      for (int k = 0; k < M; k++) b[k] = 0;
      exp_valid = 1'b0;
      exp_data  = 0;
      n_reset++;
    end else begin
      exp_valid = v;
      if (v) begin
        for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = x;
        exp_data = model_y();
        if (hist[(TAPS-1)/2] != 0 && b[M-1] != 0) n_center++;
      end else n_hold++;
      if (we) begin
        b[addr] = cdata;
        if (v) n_coef_reload++; else n_coef_load++;
      end
    end
    #1;
    checks++;
    if (out_valid !== exp_valid) begin
      failures++;
      $display("t=%0t out_valid %0b expected %0b", $time, out_valid, exp_valid);
    end
    if (exp_valid) begin
      n_outputs++;
      checks++;
      if (int'(out_data) != exp_data) begin
        failures++;
        $display("t=%0t out_data %0d expected %0d", $time, out_data, exp_data);
      end
    end
  endtask

  function automatic int rnd8();
    return int'($urandom_range(255)) - 128;
  endfunction

  initial begin
    int resp [TAPS];
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    for (int k = 0; k < M; k++) b[k] = 0;
    rst_n = 1'b0; in_valid = 1'b0; in_data = '0;
    coef_we = 1'b0; coef_addr = '0; coef_data = '0;
    repeat (3) @(posedge clk);

    // Load the coefficients b0..b3 (h(0)=h(6), h(1)=h(5), h(2)=h(4), h(3)).
    cycle(0, 0, 1, 0, 3);
    cycle(0, 0, 1, 1, -7);
    cycle(0, 0, 1, 2, 25);
    cycle(0, 0, 1, 3, 60);

    // Impulse response: must reproduce h(0..6), symmetric about h(3).
    cycle(1, 1);
    resp[0] = int'(out_data);
    for (int i = 1; i < TAPS; i++) begin
      cycle(1, 0);
      resp[i] = int'(out_data);
    end
    for (int i = 0; i < TAPS; i++) begin
      checks++;
      if (resp[i] != resp[TAPS-1-i]) begin
        failures++;
        $display("impulse response not symmetric at %0d: %0d vs %0d", i, resp[i], resp[TAPS-1-i]);
      end
    end
    n_impulse++;

    // The 5-tap example b = {1/4, 1/2, 3/4} (Q1.7: 32, 64, 96) on the
    // 7-tap filter with b0 = 0: response 0, 32, 64, 96, 64, 32, 0.
    cycle(0, 0, 1, 0, 0);
    cycle(0, 0, 1, 1, 32);
    cycle(0, 0, 1, 2, 64);
    cycle(0, 0, 1, 3, 96);
    cycle(1, 1);
    resp[0] = int'(out_data);
    for (int i = 1; i < TAPS; i++) begin
      cycle(1, 0);
      resp[i] = int'(out_data);
    end
    foreach (resp[i]) begin
      checks++;
      if (resp[i] != ((i == 0 || i == 6) ? 0 : (i == 3) ? 96 : (i == 2 || i == 4) ? 64 : 32)) begin
        failures++;
        $display("5-tap example response %0d: %0d", i, resp[i]);
      end
    end
    n_example++;

    // Random stream with idle cycles.
    for (int i = 0; i < 400; i++)
      cycle($urandom_range(3) != 0, rnd8());

    // Random stream with coefficient reloads while samples flow.
    for (int i = 0; i < 400; i++)
      cycle($urandom_range(3) != 0, rnd8(), $urandom_range(7) == 0,
            $urandom_range(M-1), rnd8());

    // Largest magnitude: every sample and coefficient at -128.
    for (int k = 0; k < M; k++) cycle(0, 0, 1, k, -128);
    for (int i = 0; i < TAPS; i++) cycle(1, -128);
    checks++;
    if (int'(out_data) != 7 * 128 * 128) begin
      failures++;
      $display("extreme output %0d expected %0d", out_data, 7 * 128 * 128);
    end
    n_extreme++;
    for (int k = 0; k < M; k++) cycle(0, 0, 1, k, 127);
    for (int i = 0; i < TAPS; i++) cycle(1, -128);
    n_extreme++;

    // Reset in the middle of the stream, then carry on.
    cycle(1, rnd8(), 0, 0, 0, 1'b1);
    for (int i = 0; i < 3; i++) cycle(1, rnd8());
    for (int k = 0; k < M; k++) cycle(0, 0, 1, k, rnd8());
    for (int i = 0; i < 200; i++)
      cycle($urandom_range(3) != 0, rnd8());

    $display("mechanisms: coef_load=%0d coef_reload=%0d hold=%0d impulse=%0d center=%0d extreme=%0d reset=%0d example=%0d outputs=%0d",
             n_coef_load, n_coef_reload, n_hold, n_impulse, n_center, n_extreme, n_reset, n_example, n_outputs);
    checks += 8;
    if (n_example == 0)     begin failures++; $display("5-tap example never run"); end
    if (n_coef_load == 0)   begin failures++; $display("coefficient load never happened"); end
    if (n_coef_reload == 0) begin failures++; $display("coefficient reload never happened"); end
    if (n_hold == 0)        begin failures++; $display("idle cycle never happened"); end
    if (n_impulse == 0)     begin failures++; $display("impulse test never happened"); end
    if (n_center == 0)      begin failures++; $display("centre tap never used"); end
    if (n_extreme == 0)     begin failures++; $display("extreme operands never applied"); end
    if (n_reset == 0)       begin failures++; $display("reset never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
