// bi_decoder: bus-invert receiver.
//
// Undoes the bi_encoder inversion. For an odd data width the invert wire is
// level coded and the word is inverted when bus_inv is high. For an even width
// the invert wire is transition coded and the word is inverted when bus_inv
// differs from its level in the previously received word; that level is kept in
// a register updated with every received word. Both rules follow the described
// receiver; the bus_valid qualifier, the registered output and the reset level
// (0, matching the encoder) are this design's choices.
//
// Timing: a word present with bus_valid high is decoded and appears on
// out_data, with out_valid, one clock later.
module bi_decoder #(
  parameter int unsigned N = lc_bus_pkg::BI_WIDTH_DEFAULT  // data bits
) (
  input  logic         clk,
  input  logic         rst_n,       // asynchronous, active low
  input  logic         bus_valid,
  input  logic [N-1:0] bus_data,
  input  logic         bus_inv,
  output logic         out_valid,
  output logic [N-1:0] out_data
);

  localparam bit ODD = (N % 2) == 1;

  logic inv_prev;   // invert-wire level of the previous word (even N)
  logic flip;

  always_comb flip = ODD ? bus_inv : (bus_inv ^ inv_prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inv_prev  <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= bus_valid;
      if (bus_valid) begin
        inv_prev <= bus_inv;
        out_data <= bus_data ^ {N{flip}};
      end
    end
  end

endmodule
