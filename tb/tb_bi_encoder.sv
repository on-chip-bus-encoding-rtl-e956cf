// tb_bi_encoder: self-checking test of the bus-invert encoder.
//
// Ten encoder instances, one for each bus width from 2 to 11 bits (the range
// studied for the scheme, including the 4-bit even and 5-bit odd examples and
// the typical 8-bit bus), each run by a bi_enc_lane with its own reference
// model. Every lane must see at least one inverted word and one idle cycle.
module tb_bi_encoder;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  int   l_checks [2:11];
  int   l_fail   [2:11];
  int   l_inv    [2:11];
  int   l_idle   [2:11];
  logic l_done   [2:11];

  for (genvar n = 2; n <= 11; n++) begin : g_lane
    bi_enc_lane #(.N(n), .CYCLES(3000)) lane (
      .clk(clk), .rst_n(rst_n), .checks(l_checks[n]), .failures(l_fail[n]),
      .inversions(l_inv[n]), .idles(l_idle[n]), .done(l_done[n])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int n = 2; n <= 11; n++) if (!l_done[n]) all_done = 1'b0;
    end while (!all_done);
    for (int n = 2; n <= 11; n++) begin
      checks   += l_checks[n] + 2;
      failures += l_fail[n];
      if (l_inv[n] == 0)  begin failures++; $display("FAIL N=%0d never inverted", n); end
      if (l_idle[n] == 0) begin failures++; $display("FAIL N=%0d never idle", n); end
      $display("N=%0d checks=%0d inversions=%0d idles=%0d", n, l_checks[n], l_inv[n], l_idle[n]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
