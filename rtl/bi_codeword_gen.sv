// bi_codeword_gen: transition classifier of the bus-invert encoder.
//
// For every bus bit it compares the new data bit x(n) with the value the wire
// carried in the previous bus cycle, x(n-1), and emits the two-bit codeword
// (q_l, q_h) of the described encoder:
//   rising  (x(n), x(n-1)) = (1,0)  ->  (q_l, q_h) = (0,1)
//   falling (x(n), x(n-1)) = (0,1)  ->  (q_l, q_h) = (1,0)
//   stable  (0,0) or (1,1)          ->  (q_l, q_h) = (0,0)
// All q_l bits feed the "L" majority voter and all q_h bits the "H" voter.
//
// Purely combinational, one inverter plus one two-input gate per output bit.
// The mapping is the described one; taking x(n-1) from the launch register
// (the previous bus word, not the previous raw input) is this design's reading.
module bi_codeword_gen #(
  parameter int unsigned N = 8            // data bits on the bus
) (
  input  logic [N-1:0] x_now,             // new data word x(n)
  input  logic [N-1:0] x_prev,            // previous bus word x(n-1)
  output logic [N-1:0] q_l,               // 1 where the wire would fall
  output logic [N-1:0] q_h                // 1 where the wire would rise
);

  always_comb begin
    q_h = x_now & ~x_prev;
    q_l = ~x_now & x_prev;
  end

endmodule
