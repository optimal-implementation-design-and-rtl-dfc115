// parity_gen: parity bit generator for the transmit and the receive side.
//
// Purely combinational. For each 8-bit word it produces the bit that makes
// the total number of ones, word plus parity bit, even (odd_even_parity = 0)
// or odd (odd_even_parity = 1). parity_tx is computed from the transmit
// data (the transmitter appends it), parity_rx from the receive shift
// register (the receiver compares it with the parity bit it samples).
// Port names and the odd/even encoding follow the document; there is no
// latency.
module parity_gen #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] din_tx,
  input  logic [WIDTH-1:0] din_rx,
  input  logic             odd_even_parity,
  output logic             parity_tx,
  output logic             parity_rx
);

  always_comb begin
    parity_tx = (^din_tx) ^ odd_even_parity;
    parity_rx = (^din_rx) ^ odd_even_parity;
  end

endmodule
