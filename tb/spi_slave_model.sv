// spi_slave_model: behavioural SPI slave used by the testbenches.
//
// Not synthesizable. While ss_n is low it exchanges WIDTH-bit words MSB
// first with the master in the mode given by cpol/cpha: it captures mosi on
// the capture edge and drives the next bit of its shift register on miso on
// the propagate edge (for cpha = 0 the first bit is driven as soon as ss_n
// falls). The word it sends is `reply`, sampled when ss_n falls; the word it
// received is in `last_rx` and `count` counts completed words. When not
// selected it leaves miso alone (miso_oe = 0) so several models can share
// one line. `errors` counts an SCK that is not at its idle level (cpol)
// when the select line changes, and a word cut short by the select.
module spi_slave_model #(
  parameter int WIDTH = 8
) (
  input  logic             sclk,
  input  logic             mosi,
  input  logic             ss_n,
  input  logic             cpol,
  input  logic             cpha,
  input  logic [WIDTH-1:0] reply,
  output logic             miso,
  output logic             miso_oe,
  output logic [WIDTH-1:0] last_rx,
  output int               count,
  output int               errors
);
  logic [WIDTH-1:0] sr;
  int nbits;
  bit selected;  // a negedge of ss_n has opened a word

  initial begin
    miso = 0; miso_oe = 0; last_rx = '0; count = 0; errors = 0; sr = '0; nbits = 0; selected = 0;
  end

  always @(negedge ss_n) begin
    if (sclk !== cpol) errors++;
    selected = 1;
    sr = reply;
    nbits = 0;
    miso_oe = 1;
    if (!cpha) miso = sr[WIDTH-1];
  end

  always @(posedge ss_n) begin
    if (selected) begin
      if (sclk !== cpol) errors++;
      if (nbits != 0) errors++;  // word cut short
    end
    selected = 0;
    miso_oe = 0;
  end

  // Leading edge: rising for cpol = 0, falling for cpol = 1.
  always @(sclk) begin
    if (!ss_n && selected) begin
      if ((sclk != cpol) ^ cpha) begin
        // capture edge
        sr = {sr[WIDTH-2:0], mosi};
        nbits++;
        if (nbits == WIDTH) begin
          last_rx = sr;
          count++;
          nbits = 0;
        end
      end else begin
        // propagate edge
        miso = sr[WIDTH-1];
      end
    end
  end
endmodule
