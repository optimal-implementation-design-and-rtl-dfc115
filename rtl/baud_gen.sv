// baud_gen: receive and transmit baud ticks from the system clock.
//
// The receiver samples the line at OVERSAMPLE (16) times the bit rate and the
// transmitter moves one bit per bit time. Both are derived here from one
// system clock as single-cycle enable pulses rather than as separate clocks,
// so the whole UART stays in one clock domain:
//   rx_tick  one clock wide, every DIV clocks       (16x the bit rate)
//   tx_tick  one clock wide, every OVERSAMPLE rx_ticks (the bit rate)
// DIV = CLK_HZ / (BAUD * OVERSAMPLE), rounded to nearest. The 16x ratio is
// the document's; the clock frequency and the bit rate are this design's
// defaults.
module baud_gen #(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned OVERSAMPLE = 16,
  parameter int unsigned DIV        = (CLK_HZ + BAUD * OVERSAMPLE / 2) / (BAUD * OVERSAMPLE)
) (
  input  logic clk,
  input  logic rst_n,
  output logic rx_tick,
  output logic tx_tick
);

  localparam int unsigned DW = (DIV > 1) ? $clog2(DIV) : 1;
  localparam int unsigned OW = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;

  logic [DW-1:0] div_cnt;
  logic [OW-1:0] os_cnt;

  initial begin
    assert (DIV >= 1) else $error("baud_gen: DIV must be at least 1");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      os_cnt  <= '0;
      rx_tick <= 1'b0;
      tx_tick <= 1'b0;
    end else begin
      rx_tick <= 1'b0;
      tx_tick <= 1'b0;
      if (div_cnt == DW'(DIV - 1)) begin
        div_cnt <= '0;
        rx_tick <= 1'b1;
        if (os_cnt == OW'(OVERSAMPLE - 1)) begin
          os_cnt  <= '0;
          tx_tick <= 1'b1;
        end else begin
          os_cnt <= os_cnt + 1'b1;
        end
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

endmodule
