// Testbench of ecc_mode_selector: sweeps the sensor reading from -40 C to
// 125 C and back and checks, one cycle after each reading, that the mode is
// Lazy-ECC below 80 C and conventional ECC from 80 C up, and that reset
// leaves it in Lazy mode.
module tb_ecc_mode_selector;
  import lazy_ecc_pkg::*;

  int checks = 0;
  int failures = 0;
  int switches = 0;

  logic              clk = 0;
  logic              rst_n = 0;
  logic signed [7:0] temp = 8'sd100;
  ecc_mode_e         mode;
  ecc_mode_e         prev;

  ecc_mode_selector dut (.clk(clk), .rst_n(rst_n), .temp_i(temp), .mode_o(mode));

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic step(int t);
    @(negedge clk);
    temp = 8'(t);
    @(negedge clk);
    check($sformatf("mode at %0d C", t), mode == ((t >= 80) ? MODE_CONV : MODE_LAZY));
    if (mode != prev) switches++;
    prev = mode;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    check("Lazy mode in reset", mode == MODE_LAZY);
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev = mode;
    for (int t = -40; t <= 125; t++) step(t);
    for (int t = 125; t >= -40; t -= 3) step(t);
    check("two mode switches", switches == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
