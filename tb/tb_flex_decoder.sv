// tb_flex_decoder: self-checking test of the code-set decoder.
//
// The default 2-bit/3-wire decoder and a 3-bit/4-wire decoder (table
// code(d) = (5*d + 3) mod 16) receive random bus words, members of the code
// set and others. The expected data word and error flag are found here by
// searching the code rule, and checked one clock after bus_valid.
module tb_flex_decoder;

  function automatic logic [31:0] make_tab3();
    logic [31:0] t;
    for (int d = 0; d < 8; d++) t[d*4 +: 4] = 4'((5 * d + 3) % 16);
    return t;
  endfunction
  localparam logic [31:0] TAB3 = make_tab3();

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  int         checks = 0;
  int         failures = 0;
  int         errs = 0;
  int         goods = 0;

  logic       v;
  logic [2:0] c2;
  logic [3:0] c3;
  logic [1:0] o2;
  logic [2:0] o3;
  logic       ov2, ov3, er2, er3;

  flex_decoder dut2 (.clk(clk), .rst_n(rst_n), .bus_valid(v), .bus_code(c2),
                     .out_valid(ov2), .out_data(o2), .out_err(er2));
  flex_decoder #(.K(3), .M(4), .CODE_TABLE(TAB3)) dut3 (
    .clk(clk), .rst_n(rst_n), .bus_valid(v), .bus_code(c3),
    .out_valid(ov3), .out_data(o3), .out_err(er3));

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
    logic [1:0] e2;
    logic [2:0] e3;
    logic       ee2, ee3;
    v = 1'b0; c2 = '0; c3 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      v  = ($urandom_range(0, 5) != 0);
      c2 = 3'($urandom);
      c3 = 4'($urandom);
      ee2 = (c2[1] == 1'b1);
      e2  = ee2 ? 2'b00 : {c2[2], c2[0]};
      ee3 = 1'b1;
      e3  = '0;
      for (int d = 0; d < 8; d++)
        if (4'((5 * d + 3) % 16) == c3) begin ee3 = 1'b0; e3 = 3'(d); end
      @(posedge clk);
      #1;
      check(ov2 == v && ov3 == v, "out_valid one cycle after bus_valid");
      if (v) begin
        check(er2 == ee2 && o2 == e2, $sformatf("2-bit code %b -> %b err %b", c2, o2, er2));
        check(er3 == ee3 && o3 == e3, $sformatf("3-bit code %b -> %b err %b", c3, o3, er3));
        if (ee2) errs++; else goods++;
      end
    end
    check(errs > 0 && goods > 0, "both members and non-members were received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
