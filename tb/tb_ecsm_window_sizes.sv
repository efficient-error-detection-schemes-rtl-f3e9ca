// tb_ecsm_window_sizes: runs the scalar multiplier with the other window
// lengths of the published error-coverage study, W = 2, 5, 7 and 10, side by
// side. Each length gets a clean run (result and cycle count checked) and a
// run with an injected window fault (must be flagged); see ecsm_size_runner.
// W = 2 divides 256 evenly; 5, 7 and 10 leave a short last window of 1, 4
// and 6 bits.
module tb_ecsm_window_sizes;

  logic clk = 0, rst_n = 0;
  logic fin [4];
  int   c [4], f [4];
  int   checks, failures;

  always #5 clk = ~clk;

  ecsm_size_runner #(.W(2))  r2  (.clk, .rst_n, .finished(fin[0]), .checks(c[0]), .failures(f[0]));
  ecsm_size_runner #(.W(5))  r5  (.clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]));
  ecsm_size_runner #(.W(7))  r7  (.clk, .rst_n, .finished(fin[2]), .checks(c[2]), .failures(f[2]));
  ecsm_size_runner #(.W(10)) r10 (.clk, .rst_n, .finished(fin[3]), .checks(c[3]), .failures(f[3]));

  task automatic report(int extra_fail);
    checks = 0; failures = extra_fail;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    report(0);
    $finish;
  end

endmodule
