// Self-checking testbench of fir_coef_store.
// Two instances: 7 taps (4 coefficients, every 2-bit address valid) and
// 5 taps (3 coefficients, address 3 out of range). Checks reset to zero,
// random writes (seen the next cycle), writes past the last coefficient
// (ignored) and cycles without a write (contents held).
module tb_fir_coef_store;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned ADDR_W = 2;

  logic clk = 1'b0;
  logic rst_n;
  logic wr_en;
  logic [ADDR_W-1:0] wr_addr;
  logic signed [COEF_W-1:0] wr_data;
  logic signed [COEF_W-1:0] coefs7 [4];
  logic signed [COEF_W-1:0] coefs5 [3];

  int checks = 0, failures = 0;
  int ignored = 0;
  logic signed [COEF_W-1:0] model7 [4];
  logic signed [COEF_W-1:0] model5 [3];

  fir_coef_store #(.TAPS(7), .COEF_W(COEF_W)) dut7 (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .coefs(coefs7));
  fir_coef_store #(.TAPS(5), .COEF_W(COEF_W)) dut5 (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .coefs(coefs5));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (coefs7[k] !== model7[k]) begin
        failures++;
        $display("7-tap coef %0d: got %0d expected %0d", k, coefs7[k], model7[k]);
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (coefs5[k] !== model5[k]) begin
        failures++;
        $display("5-tap coef %0d: got %0d expected %0d", k, coefs5[k], model5[k]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b1; wr_addr = '0; wr_data = 8'sd17;
    for (int k = 0; k < 4; k++) model7[k] = '0;
    for (int k = 0; k < 3; k++) model5[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1; wr_en = 1'b0;
    compare();
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      wr_en   = $urandom_range(1);
      wr_addr = ADDR_W'($urandom);
      wr_data = COEF_W'($urandom);
      @(posedge clk);
      if (wr_en) begin
        model7[wr_addr] = wr_data;
        if (wr_addr < 3) model5[wr_addr] = wr_data;
        else ignored++;
      end
      #1 compare();
    end
    checks++;
    if (ignored == 0) begin failures++; $display("no out-of-range write exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
