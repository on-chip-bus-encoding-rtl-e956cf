// tb_bi_table2_patterns: the characterised 5-bit switching patterns through a
// 5-bit bus-invert link.
//
// The ten distinct switching patterns of a 5-bit bus (central wire rising,
// plus the lone-switch reference 00↑00) are applied, in both polarities and
// with the invert wire starting low and high. Before each pattern the encoder
// is walked to the start word by words that change at most two bits (which
// are never inverted). For each pattern the testbench checks that:
//  * the word is inverted exactly when 3 or more wires would switch one way
//    (so the inductive worst case ↑↑↑↑↑ never reaches the wires),
//  * at most 3 of the 6 wires (data plus invert) switch in one direction,
//  * the receiver recovers the data.
// The delays listed with each pattern are the central wire's 50% delays of
// the unencoded bus in the inductance-dominated regime, for reference.
module tb_bi_table2_patterns;

  localparam int N = 5;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  int           checks = 0;
  int           failures = 0;
  int           n_inv = 0;
  int           n_plain = 0;

  logic         in_valid;
  logic [N-1:0] in_data, bus_data, out_data;
  logic         bus_inv, bus_valid, inv_event, out_valid;

  bi_encoder #(.N(N)) enc (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
                           .bus_data(bus_data), .bus_inv(bus_inv), .bus_valid(bus_valid),
                           .inv_event(inv_event));
  bi_decoder #(.N(N)) dec (.clk(clk), .rst_n(rst_n), .bus_valid(bus_valid), .bus_data(bus_data),
                           .bus_inv(bus_inv), .out_valid(out_valid), .out_data(out_data));

  // patterns, wire 4 leftmost: "U" rising, "D" falling, "0" quiet
  string pats [11] = '{"UUUUU", "UDUUU", "UDUUD", "UDUDU", "UDUDD", "DUUUU",
                       "DUUUD", "DUUDD", "DDUUU", "DDUDD", "00U00"};
  int    dly  [11] = '{97, 88, 63, 75, 51, 78, 55, 45, 66, 37, 64};

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic int ones(input logic [N-1:0] x);
    int c = 0;
    for (int i = 0; i < N; i++) if (x[i]) c++;
    return c;
  endfunction

  logic launched_inv;   // inv_event of the last word sent

  task automatic send(input logic [N-1:0] w);
    @(negedge clk);
    in_valid = 1'b1;
    in_data  = w;
    @(posedge clk);     // launch
    #1;
    launched_inv = inv_event;
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk);     // receiver output
    #1;
    check(out_valid && out_data == w, $sformatf("received %b exp %b", out_data, w));
  endtask

  // walk the wires to word t, at most two bits per step (never inverted)
  task automatic go_to(input logic [N-1:0] t);
    logic [N-1:0] w;
    int           k;
    while (bus_data != t) begin
      w = bus_data;
      k = 0;
      for (int i = 0; i < N; i++)
        if (k < 2 && w[i] != t[i]) begin w[i] = t[i]; k++; end
      send(w);
      check(!launched_inv, "two-bit step was not inverted");
    end
  endtask

  initial begin
    logic [N-1:0] start, target, wires0;
    logic         inv0, exp_flip;
    int           up, dn, r, f;
    in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int invstart = 0; invstart < 2; invstart++) begin
      for (int pol = 0; pol < 2; pol++) begin
        for (int p = 0; p < 11; p++) begin
          // set the invert wire level: an all-ones jump from all-zero wires inverts
          if (bus_inv != invstart[0]) begin
            go_to('0);
            send('1);
          end
          start = '0; target = '0; up = 0; dn = 0;
          for (int i = 0; i < N; i++) begin
            byte c;
            c = pats[p][N-1-i];
            if ((c == "U") != (pol == 1) && c != "0") begin start[i] = 1'b0; target[i] = 1'b1; up++; end
            else if (c != "0") begin start[i] = 1'b1; target[i] = 1'b0; dn++; end
          end
          go_to(start);
          wires0 = bus_data;
          inv0   = bus_inv;
          exp_flip = (up >= 3) || (dn >= 3);
          send(target);
          check(launched_inv == exp_flip, $sformatf("pattern %s pol %0d inversion %b", pats[p], pol, launched_inv));
          r = ones(bus_data & ~wires0) + ((bus_inv && !inv0) ? 1 : 0);
          f = ones(~bus_data & wires0) + ((!bus_inv && inv0) ? 1 : 0);
          check(r <= 3 && f <= 3, $sformatf("pattern %s: %0d up %0d down on the wires", pats[p], r, f));
          if (exp_flip) n_inv++; else n_plain++;
          if (invstart == 0 && pol == 0)
            $display("pattern %s (%0d ps unencoded): %s, wires now switch %0d up / %0d down",
                     pats[p], dly[p], exp_flip ? "inverted" : "sent as is", r, f);
        end
      end
    end
    check(n_inv > 0 && n_plain > 0, "both inverted and plain patterns occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
