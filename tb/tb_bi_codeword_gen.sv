// tb_bi_codeword_gen: exhaustive check of the bus-invert transition classifier.
//
// A 4-bit instance is driven with every (x_now, x_prev) pair and an 8-bit
// instance with random pairs. The expected (q_l, q_h) of every bit is worked
// out bit by bit from the transition type: rising -> (0,1), falling -> (1,0),
// stable -> (0,0).
module tb_bi_codeword_gen;

  logic       clk = 1'b0;
  int         checks = 0;
  int         failures = 0;
  int         cycles = 0;

  logic [3:0] a_now, a_prev, a_ql, a_qh;
  logic [7:0] b_now, b_prev, b_ql, b_qh;

  bi_codeword_gen #(.N(4)) dut4 (.x_now(a_now), .x_prev(a_prev), .q_l(a_ql), .q_h(a_qh));
  bi_codeword_gen #(.N(8)) dut8 (.x_now(b_now), .x_prev(b_prev), .q_l(b_ql), .q_h(b_qh));

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;

  task automatic check_bits(input logic [7:0] now, input logic [7:0] prev,
                            input logic [7:0] ql, input logic [7:0] qh, input int n);
    for (int i = 0; i < n; i++) begin
      logic el, eh;
      if (now[i] === 1'b1 && prev[i] === 1'b0) begin el = 1'b0; eh = 1'b1; end
      else if (now[i] === 1'b0 && prev[i] === 1'b1) begin el = 1'b1; eh = 1'b0; end
      else begin el = 1'b0; eh = 1'b0; end
      checks++;
      if (ql[i] !== el || qh[i] !== eh) begin
        failures++;
        $display("FAIL n=%0d bit %0d now=%b prev=%b got (%b,%b) exp (%b,%b)",
                 n, i, now[i], prev[i], ql[i], qh[i], el, eh);
      end
    end
  endtask

  initial begin
    a_now = '0; a_prev = '0; b_now = '0; b_prev = '0;
    @(posedge clk);
    for (int p = 0; p < 16; p++) begin
      for (int q = 0; q < 16; q++) begin
        a_now  = 4'(p);
        a_prev = 4'(q);
        b_now  = 8'($urandom);
        b_prev = 8'($urandom);
        @(posedge clk);
        #1;
        check_bits({4'b0, a_now}, {4'b0, a_prev}, {4'b0, a_ql}, {4'b0, a_qh}, 4);
        check_bits(b_now, b_prev, b_ql, b_qh, 8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
