// tb_acdma_crossbar_sizes: runs the crossbar at several sizes other than
// the default, side by side, with random traffic (see
// acdma_xbar_random_test): the smallest crossbar (N=2), a narrow one, a
// 16-port crossbar with 16-bit words and a 32-port one. Shows that the
// widths of the adder tree and the decoders follow N and W.
module tb_acdma_crossbar_sizes;
  logic clk = 0, rst_n = 0;
  logic [3:0] done;
  int chk [4], fail [4];

  always #5 clk = ~clk;

  acdma_xbar_random_test #(.N(2),  .W(4),  .SYMBOLS(200)) t0 (.clk(clk), .rst_n(rst_n), .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  acdma_xbar_random_test #(.N(4),  .W(3),  .SYMBOLS(200)) t1 (.clk(clk), .rst_n(rst_n), .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  acdma_xbar_random_test #(.N(16), .W(16), .SYMBOLS(100)) t2 (.clk(clk), .rst_n(rst_n), .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  acdma_xbar_random_test #(.N(32), .W(8),  .SYMBOLS(60))  t3 (.clk(clk), .rst_n(rst_n), .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  int checks, failures;
  always_comb begin
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin checks += chk[i]; failures += fail[i]; end
  end

  initial begin
    #50000;
    $display("watchdog expired, done=%b", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    @(negedge clk);
    for (int i = 0; i < 4; i++) $display("size %0d: checks=%0d failures=%0d", i, chk[i], fail[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
