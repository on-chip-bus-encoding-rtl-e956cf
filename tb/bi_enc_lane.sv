// bi_enc_lane: one width of the bus-invert encoder under test (helper of
// tb_bi_encoder).
//
// Drives a bi_encoder of width N with CYCLES bus cycles of stimulus biased
// towards many wires switching the same way, idles now and then, and compares
// every launched word, invert wire, valid and inv_event with a reference that
// counts rising and falling wires itself. It also checks that no more than
// (N+1)/2 (odd N) or N/2 (even N) wires switch in the same direction.
module bi_enc_lane #(
  parameter int unsigned N      = 8,
  parameter int unsigned CYCLES = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   inversions,
  output int   idles,
  output logic done
);

  logic         in_valid;
  logic [N-1:0] in_data;
  logic [N-1:0] bus_data;
  logic         bus_inv, bus_valid, inv_event;

  bi_encoder #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .bus_data(bus_data), .bus_inv(bus_inv), .bus_valid(bus_valid),
    .inv_event(inv_event)
  );

  function automatic int ones(input logic [N-1:0] x);
    int c = 0;
    for (int i = 0; i < N; i++) if (x[i]) c++;
    return c;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL N=%0d %s", N, what);
    end
  endtask

  initial begin
    logic [N-1:0] m_bus, exp_bus, mask;
    logic         m_inv, exp_inv, exp_flip, v;
    int           r, f, thr, bound, kind;
    checks = 0; failures = 0; inversions = 0; idles = 0; done = 1'b0;
    in_valid = 1'b0; in_data = '0;
    m_bus = '0; m_inv = 1'b0;
    thr   = int'((N + 2) / 2);
    bound = (N % 2 == 1) ? int'((N + 1) / 2) : int'(N / 2);
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      v    = ($urandom_range(0, 9) != 0);
      kind = $urandom_range(0, 4);
      mask = N'($urandom);
      case (kind)
        0: in_data = N'($urandom);           // random word
        1: in_data = m_bus | mask;           // only rising wires
        2: in_data = m_bus & ~mask;          // only falling wires
        3: in_data = ~m_bus;                 // every wire switches
        default: in_data = m_bus ^ (mask & N'($urandom));
      endcase
      in_valid = v;
      r        = ones(in_data & ~m_bus);
      f        = ones(~in_data & m_bus);
      exp_flip = (r >= thr) || (f >= thr);
      exp_bus  = v ? (exp_flip ? ~in_data : in_data) : m_bus;
      exp_inv  = !v ? m_inv : ((N % 2 == 1) ? exp_flip : (m_inv ^ exp_flip));
      @(posedge clk);
      #1;
      check(bus_valid == v, "bus_valid one cycle after in_valid");
      check(bus_data == exp_bus, $sformatf("bus_data %b exp %b", bus_data, exp_bus));
      check(bus_inv == exp_inv, "invert wire");
      check(inv_event == (v && exp_flip), "inv_event");
      check(ones(exp_bus & ~m_bus) + ((exp_inv && !m_inv) ? 1 : 0) <= bound, "rising bound");
      check(ones(~exp_bus & m_bus) + ((!exp_inv && m_inv) ? 1 : 0) <= bound, "falling bound");
      if (v && exp_flip) inversions++;
      if (!v) idles++;
      m_bus = exp_bus;
      m_inv = exp_inv;
    end
    @(negedge clk);
    in_valid = 1'b0;
    done = 1'b1;
  end

endmodule
