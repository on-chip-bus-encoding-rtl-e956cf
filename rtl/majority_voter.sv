// majority_voter: "THRESH out of N" detector built as a full-adder tree.
//
// The output is high when at least THRESH of the N inputs are high. The
// bus-invert encoder uses THRESH = ceil((N+1)/2), i.e. a strict majority.
//
// How it works: the input bits are counted with a carry-save (Wallace style)
// tree of full adders. Every stage takes the bits waiting in each binary weight
// column three at a time, replaces each triple by a full adder's sum bit (same
// column) and carry bit (next column), and passes the one or two leftover bits
// on. After about log_1.5(N) stages every column holds at most two bits; the two
// resulting rows are added and the count is compared with THRESH. This is the
// full-adder-tree voter named by the described design, whose delay grows as
// log_1.5(N) full-adder delays; the exact column schedule and the final adder
// are this design's own choice.
//
// Purely combinational; no clock.
module majority_voter #(
  parameter int unsigned N      = 8,             // number of inputs
  parameter int unsigned THRESH = (N + 2) / 2    // ceil((N+1)/2)
) (
  input  logic [N-1:0] votes,
  output logic         maj                       // count(votes) >= THRESH
);

  localparam int unsigned CW = $clog2(N + 1) + 1;  // columns (count width + 1)
  localparam int unsigned STAGES = N;              // more than enough stages

  logic [CW-1:0] row_a, row_b;
  logic [CW:0]   count;

  always_comb begin
    logic [N-1:0] col  [CW];
    logic [N-1:0] ncol [CW];
    int unsigned  h    [CW];
    int unsigned  nh   [CW];
    int unsigned  idx;
    logic         a, b, c;

    a     = 1'b0;
    b     = 1'b0;
    c     = 1'b0;
    row_a = '0;
    row_b = '0;
    idx   = 0;
    for (int unsigned k = 0; k < CW; k++) begin
      col[k] = '0;
      h[k]   = 0;
    end
    col[0] = votes;
    h[0]   = N;

    // carry-save reduction: full adders on triples, column by column
    for (int unsigned s = 0; s < STAGES; s++) begin
      for (int unsigned k = 0; k < CW; k++) begin
        ncol[k] = '0;
        nh[k]   = 0;
      end
      for (int unsigned k = 0; k < CW; k++) begin
        idx = 0;
        for (int unsigned g = 0; g < N; g++) begin
          if (idx + 3 <= h[k]) begin
            a = col[k][idx];
            b = col[k][idx+1];
            c = col[k][idx+2];
            ncol[k][nh[k]] = a ^ b ^ c;
            nh[k]          = nh[k] + 1;
            if (k + 1 < CW) begin
              ncol[k+1][nh[k+1]] = (a & b) | (a & c) | (b & c);
              nh[k+1]            = nh[k+1] + 1;
            end
            idx = idx + 3;
          end
        end
        for (int unsigned g = 0; g < N; g++) begin
          if (idx < h[k]) begin
            ncol[k][nh[k]] = col[k][idx];
            nh[k]          = nh[k] + 1;
            idx            = idx + 1;
          end
        end
      end
      for (int unsigned k = 0; k < CW; k++) begin
        col[k] = ncol[k];
        h[k]   = nh[k];
      end
    end

    // at most two bits are left per column: form two rows and add them
    for (int unsigned k = 0; k < CW; k++) begin
      row_a[k] = (h[k] > 0) ? col[k][0] : 1'b0;
      row_b[k] = (h[k] > 1) ? col[k][1] : 1'b0;
    end
  end

  always_comb begin
    count = {1'b0, row_a} + {1'b0, row_b};
    maj   = (count >= (CW+1)'(THRESH));
  end

endmodule
