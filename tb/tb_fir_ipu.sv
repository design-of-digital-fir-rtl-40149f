// Self-checking testbench of fir_ipu.
// Instances: 7 taps symmetric (odd length, centre cell), 8 taps symmetric
// (even length), 7 taps antisymmetric (centre product must be zero) and
// 8 taps antisymmetric. Random taps and coefficients are applied and each
// product is compared with the pairing h(k) = h(N-1-k) worked out here.
module tb_fir_ipu;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned PW     = DATA_W + 1 + COEF_W;

  logic signed [DATA_W-1:0] t7 [7];
  logic signed [DATA_W-1:0] t8 [8];
  logic signed [COEF_W-1:0] c4 [4];
  logic signed [PW-1:0] p7s [4], p8s [4], p7a [4], p8a [4];

  int checks = 0, failures = 0;

  fir_ipu #(.TAPS(7), .DATA_W(DATA_W), .COEF_W(COEF_W), .ANTISYM(1'b0)) u7s (.taps(t7), .coefs(c4), .prods(p7s));
  fir_ipu #(.TAPS(8), .DATA_W(DATA_W), .COEF_W(COEF_W), .ANTISYM(1'b0)) u8s (.taps(t8), .coefs(c4), .prods(p8s));
  fir_ipu #(.TAPS(7), .DATA_W(DATA_W), .COEF_W(COEF_W), .ANTISYM(1'b1)) u7a (.taps(t7), .coefs(c4), .prods(p7a));
  fir_ipu #(.TAPS(8), .DATA_W(DATA_W), .COEF_W(COEF_W), .ANTISYM(1'b1)) u8a (.taps(t8), .coefs(c4), .prods(p8a));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int k, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%s cell %0d: got %0d expected %0d", what, k, got, exp_v);
    end
  endtask

  initial begin
    int a7 [7], a8 [8], c [4];
    for (int i = 0; i < 1000; i++) begin
      for (int k = 0; k < 7; k++) begin a7[k] = int'($urandom_range(255)) - 128; t7[k] = DATA_W'(a7[k]); end
      for (int k = 0; k < 8; k++) begin a8[k] = int'($urandom_range(255)) - 128; t8[k] = DATA_W'(a8[k]); end
      for (int k = 0; k < 4; k++) begin c[k]  = int'($urandom_range(255)) - 128; c4[k] = COEF_W'(c[k]); end
      #1;
      for (int k = 0; k < 3; k++) begin
        expect_eq("7s", k, int'(p7s[k]), (a7[k] + a7[6-k]) * c[k]);
        expect_eq("7a", k, int'(p7a[k]), (a7[k] - a7[6-k]) * c[k]);
      end
      expect_eq("7s", 3, int'(p7s[3]), a7[3] * c[3]);
      expect_eq("7a", 3, int'(p7a[3]), 0);
      for (int k = 0; k < 4; k++) begin
        expect_eq("8s", k, int'(p8s[k]), (a8[k] + a8[7-k]) * c[k]);
        expect_eq("8a", k, int'(p8a[k]), (a8[k] - a8[7-k]) * c[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
