// Self-checking testbench of fir_ipc (one inner product cell).
// Three cells are driven with the same random operands: a symmetric pair
// cell, an antisymmetric pair cell and a centre cell. Each product is
// compared with integer arithmetic done here. The extreme operand values
// are applied first.
module tb_fir_ipc;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned PW     = DATA_W + 1 + COEF_W;

  logic signed [DATA_W-1:0] x_a, x_b;
  logic signed [COEF_W-1:0] coef;
  logic signed [PW-1:0] p_sym, p_anti, p_ctr;

  int checks = 0, failures = 0;

  fir_ipc #(.DATA_W(DATA_W), .COEF_W(COEF_W), .CENTER(1'b0), .ANTISYM(1'b0)) u_sym (
    .x_a, .x_b, .coef, .prod(p_sym));
  fir_ipc #(.DATA_W(DATA_W), .COEF_W(COEF_W), .CENTER(1'b0), .ANTISYM(1'b1)) u_anti (
    .x_a, .x_b, .coef, .prod(p_anti));
  fir_ipc #(.DATA_W(DATA_W), .COEF_W(COEF_W), .CENTER(1'b1), .ANTISYM(1'b0)) u_ctr (
    .x_a, .x_b, .coef, .prod(p_ctr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int a, input int b, input int c);
    int e_sym, e_anti, e_ctr;
    x_a = DATA_W'(a); x_b = DATA_W'(b); coef = COEF_W'(c);
    #1;
    e_sym  = (a + b) * c;
    e_anti = (a - b) * c;
    e_ctr  = a * c;
    checks += 3;
    if (int'(p_sym)  != e_sym)  begin failures++; $display("sym  %0d %0d %0d: got %0d exp %0d", a, b, c, p_sym, e_sym); end
    if (int'(p_anti) != e_anti) begin failures++; $display("anti %0d %0d %0d: got %0d exp %0d", a, b, c, p_anti, e_anti); end
    if (int'(p_ctr)  != e_ctr)  begin failures++; $display("ctr  %0d %0d %0d: got %0d exp %0d", a, b, c, p_ctr, e_ctr); end
  endtask

  initial begin
    check_one(-128, -128, -128);
    check_one(127, 127, 127);
    check_one(127, 127, -128);
    check_one(-128, 127, -128);
    check_one(127, -128, -128);
    for (int i = 0; i < 2000; i++)
      check_one($urandom_range(255) - 128, $urandom_range(255) - 128, $urandom_range(255) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
