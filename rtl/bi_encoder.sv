// bi_encoder: bus-invert transmitter for inductance-dominated on-chip buses.
//
// When mutual inductance dominates, the slowest bus cycle is the one in which
// many wires switch in the same direction. This encoder inverts the data word
// whenever more than half of the wires would rise, or more than half would fall,
// so that after encoding at most (N+1)/2 (odd N) or N/2 (even N) of the N+1
// wires - the invert wire included - switch in the same direction.
//
// Datapath (one bus cycle):
//   bi_codeword_gen classifies each bit against the word now on the wires,
//   majority_voter "L" counts falling bits and "H" counts rising bits, each
//   with threshold ceil((N+1)/2); invert = L | H (the OR gate); the XOR row
//   inverts the data when invert is set.
// Invert wire:
//   odd N  - level coded: bus_inv = invert of this word.
//   even N - transition coded: bus_inv toggles (bus_inv(n) = ~bus_inv(n-1))
//            when the word is inverted and holds otherwise; the previous level
//            bus_inv(n-1) is the encoder's extra input.
// Why the bound holds: let r/f be the wires that would rise/fall and s0/s1
// those that would stay at 0/1. Not inverting, r and f are below the threshold;
// for odd N the invert wire may additionally fall (1 -> 0), giving at most
// (N-1)/2 + 1. Inverting, the r and f wires stay put and the s0 (s1) wires rise
// (fall); since r or f reached ceil((N+1)/2), s0 and s1 are at most
// N - ceil((N+1)/2), and adding the invert wire's own switch gives (N+1)/2 for
// odd N and N/2 for even N.
// The scheme, the two voters, the thresholds and the odd/even invert-wire rule
// follow the described design. The launch register, the in_valid qualifier
// (wires hold while no word is sent), the all-zero reset state and taking
// x(n-1) from the launch register are this design's choices.
//
// Timing: in_data is launched onto bus_data/bus_inv on the clock edge where
// in_valid is high (1 cycle latency); bus_valid marks the cycle after.
// inv_event pulses with bus_valid when that word was sent inverted.
module bi_encoder #(
  parameter int unsigned N = lc_bus_pkg::BI_WIDTH_DEFAULT  // data bits
) (
  input  logic         clk,
  input  logic         rst_n,       // asynchronous, active low
  input  logic         in_valid,
  input  logic [N-1:0] in_data,
  output logic [N-1:0] bus_data,    // encoded data wires (registered)
  output logic         bus_inv,     // invert wire (registered)
  output logic         bus_valid,   // a new word is on the wires
  output logic         inv_event    // that word was sent inverted
);

  localparam bit ODD = (N % 2) == 1;
  localparam int unsigned THRESH = lc_bus_pkg::bi_threshold(N);

  logic [N-1:0] q_l, q_h;
  logic         maj_l, maj_h, invert;
  logic [N-1:0] next_data;
  logic         next_inv;

  bi_codeword_gen #(.N(N)) u_cwg (
    .x_now  (in_data),
    .x_prev (bus_data),
    .q_l    (q_l),
    .q_h    (q_h)
  );

  majority_voter #(.N(N), .THRESH(THRESH)) u_vote_l (
    .votes (q_l),
    .maj   (maj_l)
  );

  majority_voter #(.N(N), .THRESH(THRESH)) u_vote_h (
    .votes (q_h),
    .maj   (maj_h)
  );

  always_comb begin
    invert    = maj_l | maj_h;
    next_data = in_data ^ {N{invert}};
    next_inv  = ODD ? invert : (bus_inv ^ invert);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_data  <= '0;
      bus_inv   <= 1'b0;
      bus_valid <= 1'b0;
      inv_event <= 1'b0;
    end else begin
      bus_valid <= in_valid;
      inv_event <= in_valid & invert;
      if (in_valid) begin
        bus_data <= next_data;
        bus_inv  <= next_inv;
        // Rule of the scheme: no more wires than the bound switch one way.
        assert ($countones({next_data & ~bus_data, next_inv & ~bus_inv})
                <= lc_bus_pkg::bi_same_dir_bound(N))
          else $error("bi_encoder: too many rising wires");
        assert ($countones({~next_data & bus_data, ~next_inv & bus_inv})
                <= lc_bus_pkg::bi_same_dir_bound(N))
          else $error("bi_encoder: too many falling wires");
      end
    end
  end

endmodule
