// tb_acdma_encoder: exhaustive check of the XOR encoder. For every word,
// chip and valid value it rebuilds the spread value the adder tree sees,
// signed {neg, spread} + neg, and compares it with chip * data worked out as
// integers (zero when the port is idle).
module tb_acdma_encoder;
  localparam int unsigned W = 7;

  logic         valid, chip, neg;
  logic [W-1:0] data, spread;
  int checks = 0, failures = 0;

  acdma_encoder #(.W(W)) dut (.valid(valid), .data(data), .chip(chip),
                              .spread(spread), .neg(neg));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++)
      for (int c = 0; c < 2; c++)
        for (int d = 0; d < (1 << W); d++) begin
          int expected, value;
          logic signed [W:0] as_signed;
          valid = v[0]; chip = c[0]; data = W'(d);
          #1;
          expected  = v ? (c ? -d : d) : 0;
          as_signed = {neg, spread};
          value     = int'(as_signed) + int'(neg);
          checks++;
          if (value != expected) begin
            failures++;
            $display("v=%0d c=%0d d=%0d: value %0d expected %0d", v, c, d, value, expected);
          end
          // the word itself is only XORed: W gates, no adder
          checks++;
          if (spread != (v ? (W'(d) ^ {W{c[0]}}) : '0)) begin
            failures++;
            $display("v=%0d c=%0d d=%0d: spread %h", v, c, d, spread);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
