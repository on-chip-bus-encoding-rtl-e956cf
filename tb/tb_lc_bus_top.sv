// tb_lc_bus_top: end-to-end test of both encoded bus links at their default
// sizes (8-bit bus-invert link, 2-bit on 3-wire flexible link).
//
// The transmitter wires of each link are looped back to its receiver wires,
// as an ideal global bus would. Random traffic, biased towards words in which
// many wires switch the same way, is sent with idle cycles in between. Each
// received word is compared with a queue of the words sent, and must arrive
// exactly two clocks after it was sent. On the bus-invert wires the testbench
// measures the most wires switching in one direction in one cycle (at most 4
// of the 9 wires for the 8-bit link) and compares it with the unencoded data.
// On the flexible link some received words are replaced by words outside the
// code set, which the receiver must flag.
//
// Mechanisms counted (each must occur): inverted words, words sent as they
// are, invert-wire toggles, idle cycles, all-wires-same-direction data words,
// flagged non-member codes, every data word of the flexible link.
module tb_lc_bus_top;

  localparam int unsigned N = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  int           checks = 0;
  int           failures = 0;
  int unsigned  cycle = 0;

  logic         bi_in_valid;
  logic [N-1:0] bi_in_data;
  logic [N-1:0] bi_bus_data;
  logic         bi_bus_inv, bi_bus_valid, bi_inv_event;
  logic         bi_out_valid;
  logic [N-1:0] bi_out_data;

  logic         fx_in_valid;
  logic [1:0]   fx_in_data;
  logic [2:0]   fx_tx_code, fx_rx_code;
  logic         fx_tx_valid, fx_out_valid, fx_out_err;
  logic [1:0]   fx_out_data;
  logic         corrupt;

  lc_bus_top dut (
    .clk               (clk),
    .rst_n             (rst_n),
    .bi_in_valid       (bi_in_valid),
    .bi_in_data        (bi_in_data),
    .bi_tx_bus_data    (bi_bus_data),
    .bi_tx_bus_inv     (bi_bus_inv),
    .bi_tx_bus_valid   (bi_bus_valid),
    .bi_tx_inv_event   (bi_inv_event),
    .bi_rx_bus_data    (bi_bus_data),
    .bi_rx_bus_inv     (bi_bus_inv),
    .bi_rx_bus_valid   (bi_bus_valid),
    .bi_out_valid      (bi_out_valid),
    .bi_out_data       (bi_out_data),
    .flex_in_valid     (fx_in_valid),
    .flex_in_data      (fx_in_data),
    .flex_tx_bus_code  (fx_tx_code),
    .flex_tx_bus_valid (fx_tx_valid),
    .flex_rx_bus_code  (fx_rx_code),
    .flex_rx_bus_valid (fx_tx_valid),
    .flex_out_valid    (fx_out_valid),
    .flex_out_data     (fx_out_data),
    .flex_out_err      (fx_out_err)
  );

  // flexible link: ideal wires, except where a non-member word is injected
  assign fx_rx_code = corrupt ? 3'b010 : fx_tx_code;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  function automatic int ones(input logic [N-1:0] x);
    int c = 0;
    for (int i = 0; i < N; i++) if (x[i]) c++;
    return c;
  endfunction

  // scoreboards: data and launch cycle of every word sent
  logic [N-1:0] bi_q_data [$];
  int unsigned  bi_q_cyc  [$];
  logic [1:0]   fx_q_data [$];
  int unsigned  fx_q_cyc  [$];
  bit           fx_q_bad  [$];

  int n_inverted = 0, n_plain = 0, n_toggle = 0, n_idle = 0, n_same_dir_in = 0;
  int n_flagged = 0, max_raw = 0, max_enc = 0;
  int fx_seen [4] = '{0, 0, 0, 0};
  bit done_sending = 1'b0;

  // stimulus
  initial begin
    logic [N-1:0] last_in;
    logic [N-1:0] mask;
    bi_in_valid = 1'b0; bi_in_data = '0; fx_in_valid = 1'b0; fx_in_data = '0;
    corrupt = 1'b0;
    last_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      bi_in_valid = ($urandom_range(0, 7) != 0);
      mask = N'($urandom);
      case ($urandom_range(0, 4))
        0: bi_in_data = N'($urandom);
        1: bi_in_data = ~last_in;               // every data bit switches
        2: bi_in_data = last_in | mask;
        3: bi_in_data = last_in & ~mask;
        default: bi_in_data = {N{~last_in[0]}};
      endcase
      if (bi_in_valid) begin
        int r, f;
        r = ones(bi_in_data & ~last_in);
        f = ones(~bi_in_data & last_in);
        if (r == N || f == N) n_same_dir_in++;
        if (r > max_raw) max_raw = r;
        if (f > max_raw) max_raw = f;
        bi_q_data.push_back(bi_in_data);
        bi_q_cyc.push_back(cycle);
        last_in = bi_in_data;
      end
      fx_in_valid = ($urandom_range(0, 5) != 0);
      fx_in_data  = 2'($urandom);
      if (fx_in_valid) begin
        fx_q_data.push_back(fx_in_data);
        fx_q_cyc.push_back(cycle);
        fx_q_bad.push_back($urandom_range(0, 19) == 0);
      end
    end
    @(negedge clk);
    bi_in_valid = 1'b0;
    fx_in_valid = 1'b0;
    repeat (4) @(posedge clk);
    done_sending = 1'b1;
  end

  // monitors
  logic [N-1:0] prev_bus;
  logic         prev_inv;
  always @(posedge clk) begin
    if (!rst_n) begin
      prev_bus <= '0;
      prev_inv <= 1'b0;
    end else begin
      #1;
      // bus-invert wires: same-direction count, invert-wire toggles
      if (bi_bus_valid) begin
        int r, f;
        r = ones(bi_bus_data & ~prev_bus) + ((bi_bus_inv && !prev_inv) ? 1 : 0);
        f = ones(~bi_bus_data & prev_bus) + ((!bi_bus_inv && prev_inv) ? 1 : 0);
        if (r > max_enc) max_enc = r;
        if (f > max_enc) max_enc = f;
        check(r <= N / 2 && f <= N / 2, $sformatf("%0d up / %0d down on the encoded wires", r, f));
        if (bi_inv_event) n_inverted++; else n_plain++;
        if (bi_bus_inv != prev_inv) n_toggle++;
        check((bi_bus_inv != prev_inv) == bi_inv_event, "invert wire toggles exactly for inverted words");
        prev_bus <= bi_bus_data;
        prev_inv <= bi_bus_inv;
      end else begin
        n_idle++;
        check(bi_bus_data == prev_bus && bi_bus_inv == prev_inv, "wires hold while idle");
      end
      // bus-invert receiver
      if (bi_out_valid) begin
        if (bi_q_data.size() == 0) check(1'b0, "bus-invert word out of nowhere");
        else begin
          logic [N-1:0] d;
          int unsigned  t;
          d = bi_q_data.pop_front();
          t = bi_q_cyc.pop_front();
          check(bi_out_data == d, $sformatf("bus-invert data %h exp %h", bi_out_data, d));
          check(cycle - t == 2, $sformatf("bus-invert latency %0d", cycle - t));
        end
      end
      // flexible receiver
      if (fx_out_valid) begin
        if (fx_q_data.size() == 0) check(1'b0, "flexible word out of nowhere");
        else begin
          logic [1:0]  d;
          int unsigned t;
          bit          bad;
          d   = fx_q_data.pop_front();
          t   = fx_q_cyc.pop_front();
          bad = fx_q_bad.pop_front();
          check(cycle - t == 2, $sformatf("flexible latency %0d", cycle - t));
          check(fx_out_err == bad, "non-member flag");
          if (bad) n_flagged++;
          else begin
            check(fx_out_data == d, $sformatf("flexible data %b exp %b", fx_out_data, d));
            fx_seen[d]++;
          end
        end
      end
    end
  end

  // inject a non-member word on the receiver wires for words marked bad
  always @(posedge clk) begin
    #2;
    if (fx_tx_valid && fx_q_bad.size() > 0 && fx_q_bad[0]) corrupt = 1'b1;
    else corrupt = 1'b0;
  end

  initial begin
    wait (done_sending);
    check(bi_q_data.size() == 0 && fx_q_data.size() == 0, "every word was received");
    check(n_inverted > 0, "inverted words");
    check(n_plain > 0, "words sent as they are");
    check(n_toggle > 0, "invert-wire toggles");
    check(n_idle > 0, "idle cycles");
    check(n_same_dir_in > 0, "all-wires-same-direction data words");
    check(n_flagged > 0, "flagged non-member codes");
    for (int d = 0; d < 4; d++) check(fx_seen[d] > 0, $sformatf("flexible data word %0d", d));
    check(max_raw == N && max_enc <= N / 2, "same-direction switching limited by the encoding");
    $display("inverted=%0d plain=%0d toggles=%0d idle=%0d same_dir_inputs=%0d flagged=%0d",
             n_inverted, n_plain, n_toggle, n_idle, n_same_dir_in, n_flagged);
    $display("most wires switching one way: data %0d, encoded bus %0d", max_raw, max_enc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
