// flex_decoder: code-set decoder of the flexible bus encoding scheme.
//
// Maps an M-bit bus word back to the K-bit data word whose code it is. The
// word is compared with all 2**K entries of CODE_TABLE in parallel and the
// index of the matching entry is returned. A word that is not in the code set
// (which a correct link never produces) raises out_err and decodes to 0; that
// flag is this design's addition. The table must be the one given to the
// encoder, with distinct codes.
//
// Timing: a word present with bus_valid high appears decoded on out_data,
// with out_valid, one clock later.
module flex_decoder #(
  parameter int unsigned K = lc_bus_pkg::FLEX_K_DEFAULT,     // data bits
  parameter int unsigned M = lc_bus_pkg::FLEX_M_DEFAULT,     // bus wires
  parameter logic [(2**K)*M-1:0] CODE_TABLE = lc_bus_pkg::FLEX_CODES_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,       // asynchronous, active low
  input  logic         bus_valid,
  input  logic [M-1:0] bus_code,
  output logic         out_valid,
  output logic [K-1:0] out_data,
  output logic         out_err      // bus word is not a member of the code set
);

  localparam int unsigned NCODES = 2**K;

  logic [NCODES-1:0] hit;
  logic [K-1:0]      index;

  always_comb begin
    index = '0;
    for (int unsigned d = 0; d < NCODES; d++) begin
      hit[d] = (bus_code == CODE_TABLE[d*M +: M]);
      if (hit[d]) index = index | K'(d);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_err   <= 1'b0;
    end else begin
      out_valid <= bus_valid;
      if (bus_valid) begin
        out_data <= index;
        out_err  <= ~|hit;
      end
    end
  end

endmodule
