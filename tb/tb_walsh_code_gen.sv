// tb_walsh_code_gen: checks the Walsh code generator against a Hadamard
// matrix built independently by the Sylvester recursion
//   H_1 = [+1],  H_2m = [[H_m, H_m], [H_m, -H_m]]
// for every chip position, and checks that all pairs of generated codes are
// orthogonal (zero cross-correlation, autocorrelation N).
// Combinational block: each index is applied and read after a short delay.
module tb_walsh_code_gen;
  localparam int unsigned N = 8;
  localparam int unsigned LOGN = $clog2(N);

  logic [LOGN-1:0] idx;
  logic [N-1:0]    chip;
  int checks = 0, failures = 0;

  walsh_code_gen #(.N(N)) dut (.idx(idx), .chip(chip));

  int h [N][N];
  int got [N][N];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Sylvester recursion
    h[0][0] = 1;
    for (int m = 1; m < N; m = m * 2)
      for (int r = 0; r < m; r++)
        for (int c = 0; c < m; c++) begin
          h[r][c+m]   =  h[r][c];
          h[r+m][c]   =  h[r][c];
          h[r+m][c+m] = -h[r][c];
        end

    for (int i = 0; i < N; i++) begin
      idx = LOGN'(i);
      #1;
      for (int k = 0; k < N; k++) begin
        got[k][i] = chip[k] ? -1 : 1;
        checks++;
        if (got[k][i] != h[k][i]) begin
          failures++;
          $display("code %0d chip %0d: got %0d expected %0d", k, i, got[k][i], h[k][i]);
        end
      end
    end

    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        int corr;
        corr = 0;
        for (int i = 0; i < N; i++) corr += got[a][i] * got[b][i];
        checks++;
        if (corr != ((a == b) ? int'(N) : 0)) begin
          failures++;
          $display("codes %0d,%0d correlate to %0d", a, b, corr);
        end
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
