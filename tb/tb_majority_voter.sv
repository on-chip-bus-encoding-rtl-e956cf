// tb_majority_voter: exhaustive check of the full-adder-tree threshold voter.
//
// Instances cover every bus width from 2 to 11 bits with the bus-invert
// threshold ceil((N+1)/2), plus an 8-input instance with threshold 3. Every
// input combination of the 11-input instance is applied (the narrower ones see
// the low bits), and the expected output is the bit count compared with the
// threshold, counted here with a plain loop.
module tb_majority_voter;

  logic        clk = 1'b0;
  int          checks = 0;
  int          failures = 0;
  logic [10:0] v;
  logic [11:0] maj;        // maj[n] for the n-input instance, n = 2..11
  logic        maj8_t3;

  for (genvar n = 2; n <= 11; n++) begin : g_w
    majority_voter #(.N(n)) dut (.votes(v[n-1:0]), .maj(maj[n]));
  end
  majority_voter #(.N(8), .THRESH(3)) dut8t3 (.votes(v[7:0]), .maj(maj8_t3));
  assign maj[1:0] = 2'b00;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ones(input logic [10:0] x, input int n);
    int c = 0;
    for (int i = 0; i < n; i++) if (x[i]) c++;
    return c;
  endfunction

  initial begin
    v = '0;
    for (int p = 0; p < 2048; p++) begin
      v = 11'(p);
      @(posedge clk);
      #1;
      for (int n = 2; n <= 11; n++) begin
        logic exp;
        exp = ones(v, n) >= (n + 2) / 2;
        checks++;
        if (maj[n] !== exp) begin
          failures++;
          $display("FAIL n=%0d v=%b got %b exp %b", n, v[10:0], maj[n], exp);
        end
      end
      checks++;
      if (maj8_t3 !== (ones(v, 8) >= 3)) begin
        failures++;
        $display("FAIL n=8 t=3 v=%b got %b", v[7:0], maj8_t3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
