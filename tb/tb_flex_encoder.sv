// tb_flex_encoder: self-checking test of the code-set encoder.
//
// Two instances: the default 2-bit to 3-bit encoder with code set
// {000, 001, 100, 101}, and a 3-bit to 4-bit encoder loaded with a table made
// by code(d) = (5*d + 3) mod 16 (distinct codes, since 5 is odd). The expected
// code is computed here from the same rules, not read from the DUT's table.
//
// For the default code set the testbench also looks up the delay of every
// transition the wires make in the characterised delays of the 3-wire bus
// (outer wire alone 24.61 ps / 24.58 ps, outer wires opposite 29.24 ps, outer
// wires together 19.69 ps; the middle wire never switches) and checks that
// each is within the 30 ps delay constraint the code set was chosen for.
module tb_flex_encoder;

  localparam logic [11:0] TAB2 = {3'b101, 3'b100, 3'b001, 3'b000};

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
  int         transitions = 0;
  real        worst_ps = 0.0;

  logic       v;
  logic [1:0] d2;
  logic [2:0] d3;
  logic [2:0] c2;
  logic [3:0] c3;
  logic       bv2, bv3;

  flex_encoder dut2 (.clk(clk), .rst_n(rst_n), .in_valid(v), .in_data(d2),
                     .bus_code(c2), .bus_valid(bv2));
  flex_encoder #(.K(3), .M(4), .CODE_TABLE(TAB3)) dut3 (
    .clk(clk), .rst_n(rst_n), .in_valid(v), .in_data(d3), .bus_code(c3), .bus_valid(bv3));

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

  // Delay (ps) of a transition of the encoded 3-wire bus; -1 if not covered.
  function automatic real delay_ps(input logic [2:0] a, input logic [2:0] b);
    logic s0, s2;
    if (a[1] != b[1]) return -1.0;
    s0 = a[0] != b[0];
    s2 = a[2] != b[2];
    if (!s0 && !s2) return 0.0;
    if (s2 && !s0) return 24.61;
    if (s0 && !s2) return 24.58;
    if (b[0] != b[2]) return 29.24;     // outer wires switch in opposite directions
    return 19.69;                       // outer wires switch together
  endfunction

  initial begin
    logic [2:0] e2, p2;
    logic [3:0] e3;
    real        dl;
    v = 1'b0; d2 = '0; d3 = '0;
    repeat (3) @(posedge clk);
    #1;
    check(c2 == 3'b000 && c3 == 4'd3, "reset state is the code of data word 0");
    rst_n = 1'b1;
    e2 = 3'b000; e3 = 4'd3;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      p2 = c2;
      v  = ($urandom_range(0, 5) != 0);
      d2 = 2'($urandom);
      d3 = 3'($urandom);
      if (v) begin
        e2 = {d2[1], 1'b0, d2[0]};             // 00->000 01->001 10->100 11->101
        e3 = 4'((5 * int'(d3) + 3) % 16);
      end
      @(posedge clk);
      #1;
      check(bv2 == v && bv3 == v, "bus_valid one cycle after in_valid");
      check(c2 == e2, $sformatf("2->3 code %b exp %b", c2, e2));
      check(c3 == e3, $sformatf("3->4 code %b exp %b", c3, e3));
      dl = delay_ps(p2, c2);
      if (dl > 0.0) transitions++;
      if (dl > worst_ps) worst_ps = dl;
      check(dl >= 0.0 && dl <= 30.0, $sformatf("transition %b->%b delay %f ps", p2, c2, dl));
    end
    check(transitions > 0, "the bus made transitions");
    $display("transitions=%0d worst=%f ps", transitions, worst_ps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
