// flex_encoder: code-set encoder of the flexible bus encoding scheme.
//
// The flexible scheme carries K data bits on M >= K wires. A design-time flow
// picks 2**K of the 2**M possible bus words such that every transition between
// any two of them meets the delay constraint (and, in the power-minimising
// variant, has low transition power). This block is the hardware half: a
// lookup that maps data word d to code CODE_TABLE[d*M +: M] and drives it
// onto the wires from a launch register, so all wires switch together.
//
// The default table is the described 2-bit to 3-bit example, codes {000, 001,
// 100, 101}; any code set from the offline flow can be loaded through the
// CODE_TABLE parameter. The order of assignment of data words to codes, the
// in_valid qualifier and the reset state (the code of data word 0, so that the
// wires always hold a member of the code set) are this design's choices.
//
// Timing: in_data is launched on the clock edge where in_valid is high
// (1 cycle latency); bus_valid marks the cycle after; wires hold otherwise.
module flex_encoder #(
  parameter int unsigned K = lc_bus_pkg::FLEX_K_DEFAULT,     // data bits
  parameter int unsigned M = lc_bus_pkg::FLEX_M_DEFAULT,     // bus wires
  parameter logic [(2**K)*M-1:0] CODE_TABLE = lc_bus_pkg::FLEX_CODES_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,       // asynchronous, active low
  input  logic         in_valid,
  input  logic [K-1:0] in_data,
  output logic [M-1:0] bus_code,    // encoded wires (registered)
  output logic         bus_valid
);

  logic [M-1:0] code;

  always_comb code = CODE_TABLE[in_data*M +: M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_code  <= CODE_TABLE[M-1:0];
      bus_valid <= 1'b0;
    end else begin
      bus_valid <= in_valid;
      if (in_valid) bus_code <= code;
    end
  end

endmodule
