// tb_bi_decoder: self-checking test of the bus-invert receiver.
//
// A 4-bit (even, transition-coded invert wire) and a 5-bit (odd, level-coded
// invert wire) decoder receive words that the testbench encodes itself with a
// random invert decision per word, with idle cycles in between in which the
// wires hold. The decoded word must equal the original data one clock after
// bus_valid, and out_valid must follow bus_valid by one clock.
module tb_bi_decoder;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  int         checks = 0;
  int         failures = 0;
  int         flips = 0;
  int         idles = 0;

  logic       v;
  logic [3:0] d4, b4, o4;
  logic [4:0] d5, b5, o5;
  logic       i4, i5, ov4, ov5;

  bi_decoder #(.N(4)) dut4 (.clk(clk), .rst_n(rst_n), .bus_valid(v), .bus_data(b4),
                            .bus_inv(i4), .out_valid(ov4), .out_data(o4));
  bi_decoder #(.N(5)) dut5 (.clk(clk), .rst_n(rst_n), .bus_valid(v), .bus_data(b5),
                            .bus_inv(i5), .out_valid(ov5), .out_data(o5));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic fl4, fl5;
    v = 1'b0; b4 = '0; b5 = '0; i4 = 1'b0; i5 = 1'b0; d4 = '0; d5 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      v = ($urandom_range(0, 4) != 0);
      if (v) begin
        d4  = 4'($urandom);
        d5  = 5'($urandom);
        fl4 = $urandom_range(0, 1) == 1;
        fl5 = $urandom_range(0, 1) == 1;
        b4  = fl4 ? ~d4 : d4;
        b5  = fl5 ? ~d5 : d5;
        i4  = i4 ^ fl4;          // even width: toggle marks an inverted word
        i5  = fl5;               // odd width: level marks an inverted word
        if (fl4) flips++;
      end else begin
        idles++;
      end
      @(posedge clk);
      #1;
      check(ov4 == v && ov5 == v, "out_valid follows bus_valid by one clock");
      if (v) begin
        check(o4 == d4, $sformatf("N=4 out %b exp %b", o4, d4));
        check(o5 == d5, $sformatf("N=5 out %b exp %b", o5, d5));
      end
    end
    check(flips > 0, "an inverted even-width word was received");
    check(idles > 0, "an idle cycle occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
