// Self-checking testbench of fir_adder_unit.
// Sums of four 17-bit signed products (the 7-tap default) are compared
// with integer sums done here, extremes first, then random values.
module tb_fir_adder_unit;
  localparam int unsigned N_IN  = 4;
  localparam int unsigned IN_W  = 17;
  localparam int unsigned OUT_W = IN_W + 2;

  logic signed [IN_W-1:0]  terms [N_IN];
  logic signed [OUT_W-1:0] sum;

  int checks = 0, failures = 0;

  fir_adder_unit #(.N_IN(N_IN), .IN_W(IN_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input int v [N_IN]);
    int exp_sum = 0;
    for (int k = 0; k < N_IN; k++) begin
      terms[k] = IN_W'(v[k]);
      exp_sum += v[k];
    end
    #1;
    checks++;
    if (int'(sum) != exp_sum) begin
      failures++;
      $display("sum %0d %0d %0d %0d: got %0d exp %0d", v[0], v[1], v[2], v[3], sum, exp_sum);
    end
  endtask

  initial begin
    int v [N_IN];
    v = '{-65536, -65536, -65536, -65536}; check_all(v);
    v = '{65535, 65535, 65535, 65535};     check_all(v);
    v = '{65535, -65536, 1, 0};            check_all(v);
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < N_IN; k++) v[k] = int'($urandom_range(131071)) - 65536;
      check_all(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
