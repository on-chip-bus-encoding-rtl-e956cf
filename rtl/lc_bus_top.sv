// lc_bus_top: two encoded global-bus links for LC crosstalk reduction.
//
// The design offers two ways of encoding data for a long, tightly coupled
// on-chip bus whose delay depends on how its wires switch together:
//
//  * Bus-invert link (bi_encoder -> BI_N+1 wires -> bi_decoder). Suited to
//    buses where mutual inductance dominates and the slowest cycle is the one
//    in which all wires switch the same way. The encoder inverts a word when
//    more than half its bits would switch in one direction.
//  * Flexible code-set link (flex_encoder -> FLEX_M wires -> flex_decoder).
//    Carries FLEX_K data bits on FLEX_M wires using a code set chosen offline
//    for a given wire geometry, frequency and delay constraint, so it covers
//    both capacitance- and inductance-dominated buses.
//
// The wires between transmitter and receiver are the physical global bus (and
// any shield wires), which is not logic. Each transmitter's wires are therefore
// brought out as ports and each receiver takes its wires from ports; connect
// them directly, or through a wire model, to close a link. The two links are
// independent and have separate ports.
//
// Timing: each link has one register at the transmitter (all wires switch on
// the same clock edge) and one at the receiver, so a word entering with
// *_in_valid leaves with *_out_valid two clocks later when the bus ports are
// tied together.
module lc_bus_top #(
  parameter int unsigned BI_N   = lc_bus_pkg::BI_WIDTH_DEFAULT,
  parameter int unsigned FLEX_K = lc_bus_pkg::FLEX_K_DEFAULT,
  parameter int unsigned FLEX_M = lc_bus_pkg::FLEX_M_DEFAULT,
  parameter logic [(2**FLEX_K)*FLEX_M-1:0] FLEX_CODES = lc_bus_pkg::FLEX_CODES_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,

  // bus-invert link: transmitter side
  input  logic              bi_in_valid,
  input  logic [BI_N-1:0]   bi_in_data,
  output logic [BI_N-1:0]   bi_tx_bus_data,
  output logic              bi_tx_bus_inv,
  output logic              bi_tx_bus_valid,
  output logic              bi_tx_inv_event,
  // bus-invert link: receiver side
  input  logic [BI_N-1:0]   bi_rx_bus_data,
  input  logic              bi_rx_bus_inv,
  input  logic              bi_rx_bus_valid,
  output logic              bi_out_valid,
  output logic [BI_N-1:0]   bi_out_data,

  // flexible code-set link: transmitter side
  input  logic              flex_in_valid,
  input  logic [FLEX_K-1:0] flex_in_data,
  output logic [FLEX_M-1:0] flex_tx_bus_code,
  output logic              flex_tx_bus_valid,
  // flexible code-set link: receiver side
  input  logic [FLEX_M-1:0] flex_rx_bus_code,
  input  logic              flex_rx_bus_valid,
  output logic              flex_out_valid,
  output logic [FLEX_K-1:0] flex_out_data,
  output logic              flex_out_err
);

  bi_encoder #(.N(BI_N)) u_bi_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (bi_in_valid),
    .in_data   (bi_in_data),
    .bus_data  (bi_tx_bus_data),
    .bus_inv   (bi_tx_bus_inv),
    .bus_valid (bi_tx_bus_valid),
    .inv_event (bi_tx_inv_event)
  );

  bi_decoder #(.N(BI_N)) u_bi_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_valid (bi_rx_bus_valid),
    .bus_data  (bi_rx_bus_data),
    .bus_inv   (bi_rx_bus_inv),
    .out_valid (bi_out_valid),
    .out_data  (bi_out_data)
  );

  flex_encoder #(.K(FLEX_K), .M(FLEX_M), .CODE_TABLE(FLEX_CODES)) u_flex_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (flex_in_valid),
    .in_data   (flex_in_data),
    .bus_code  (flex_tx_bus_code),
    .bus_valid (flex_tx_bus_valid)
  );

  flex_decoder #(.K(FLEX_K), .M(FLEX_M), .CODE_TABLE(FLEX_CODES)) u_flex_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_valid (flex_rx_bus_valid),
    .bus_code  (flex_rx_bus_code),
    .out_valid (flex_out_valid),
    .out_data  (flex_out_data),
    .out_err   (flex_out_err)
  );

endmodule
