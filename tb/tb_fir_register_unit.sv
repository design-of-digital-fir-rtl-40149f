// Self-checking testbench of fir_register_unit (the delay line).
// Drives random samples with random gaps in in_valid, keeps its own model
// of the last TAPS accepted samples, and compares every tap each cycle.
// Also checks that reset clears the history and that idle cycles hold it.
module tb_fir_register_unit;
  localparam int unsigned TAPS   = 7;
  localparam int unsigned DATA_W = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [DATA_W-1:0] in_data;
  logic signed [DATA_W-1:0] taps [TAPS];

  int checks = 0, failures = 0;
  int holds = 0;
  logic signed [DATA_W-1:0] model [TAPS];

  fir_register_unit #(.TAPS(TAPS), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    model[0] = in_data;
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (taps[k] !== model[k]) begin
        failures++;
        $display("tap %0d: got %0d expected %0d", k, taps[k], model[k]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b1; in_data = 8'sd55;
    for (int k = 0; k < TAPS; k++) model[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // after reset all stored taps are zero
    compare();
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      in_data  = DATA_W'($urandom);
      #1 compare();
      @(posedge clk);
      if (in_valid) begin
        for (int k = TAPS - 1; k > 0; k--) model[k] = model[k-1];
      end else holds++;
    end
    checks++;
    if (holds == 0) begin failures++; $display("no hold cycle exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
