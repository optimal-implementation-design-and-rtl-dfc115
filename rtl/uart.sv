// uart: the UART block, transmitter and receiver behind control and status
// registers.
//
// baud_gen turns the system clock into the 16x receive tick and the 1x
// transmit tick. uart_tx holds the TBR and TSR, uart_rx the RSR and RBR, and
// parity_gen works out the parity bit of the TBR (sent by the transmitter)
// and of the RSR (checked by the receiver) for the odd/even choice in the
// control register. uart_regs connects all of this to a byte-wide data bus
// (register map in uart_pkg). txd idles high; rxd is asynchronous to clk and
// synchronised inside the receiver.
//
// The split into transmitter, receiver and control/status registers is the
// document's structure; running everything from one clock with tick enables
// instead of separate receive and transmit clocks is this design's choice.
module uart
  import uart_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned BAUD       = 115_200,
  parameter logic [7:0]  CTRL_RESET = 8'h63
) (
  input  logic       clk,
  input  logic       rst_n,
  // data bus
  input  logic [1:0] addr,
  input  logic       wr,
  input  logic       rd,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       irq,
  // serial line
  input  logic       rxd,
  output logic       txd
);

  ctrl_t      ctrl;
  logic       rx_tick, tx_tick;
  logic       tx_load, rx_read;
  logic [7:0] tx_data, tbr, rsr, rbr;
  logic       parity_tx, parity_rx;
  logic       tbr_empty, tx_busy, underrun;
  logic       rbr_full, data_rx_done, frame_err, parity_err, overrun, brk;

  baud_gen #(
    .CLK_HZ    (CLK_HZ),
    .BAUD      (BAUD),
    .OVERSAMPLE(OVERSAMPLE)
  ) u_baud (
    .clk    (clk),
    .rst_n  (rst_n),
    .rx_tick(rx_tick),
    .tx_tick(tx_tick)
  );

  parity_gen #(.WIDTH(DATA_BITS)) u_parity (
    .din_tx         (tbr),
    .din_rx         (rsr),
    .odd_even_parity(ctrl.odd_even_parity),
    .parity_tx      (parity_tx),
    .parity_rx      (parity_rx)
  );

  uart_tx #(.WIDTH(DATA_BITS)) u_tx (
    .clk      (clk),
    .rst_n    (rst_n),
    .tx_tick  (tx_tick),
    .tx_en    (ctrl.tx_en),
    .parity_en(ctrl.parity_en),
    .two_stop (ctrl.two_stop),
    .char_len (ctrl.char_len),
    .load     (tx_load),
    .din      (tx_data),
    .parity_in(parity_tx),
    .tbr      (tbr),
    .tbr_empty(tbr_empty),
    .busy     (tx_busy),
    .underrun (underrun),
    .sout     (txd)
  );

  uart_rx #(.WIDTH(DATA_BITS)) u_rx (
    .clk         (clk),
    .rst_n       (rst_n),
    .rx_tick     (rx_tick),
    .rx_en       (ctrl.rx_en),
    .parity_en   (ctrl.parity_en),
    .char_len    (ctrl.char_len),
    .sin         (rxd),
    .parity_in   (parity_rx),
    .rd          (rx_read),
    .dout_temp   (rsr),
    .dout        (rbr),
    .rbr_full    (rbr_full),
    .data_rx_done(data_rx_done),
    .frame_err   (frame_err),
    .parity_err  (parity_err),
    .overrun     (overrun),
    .brk         (brk)
  );

  uart_regs #(.CTRL_RESET(CTRL_RESET)) u_regs (
    .clk       (clk),
    .rst_n     (rst_n),
    .addr      (addr),
    .wr        (wr),
    .rd        (rd),
    .wdata     (wdata),
    .rdata     (rdata),
    .irq       (irq),
    .ctrl      (ctrl),
    .tx_load   (tx_load),
    .tx_data   (tx_data),
    .rx_read   (rx_read),
    .tbr_empty (tbr_empty),
    .tx_busy   (tx_busy),
    .underrun  (underrun),
    .rbr       (rbr),
    .rbr_full  (rbr_full),
    .overrun   (overrun),
    .frame_err (frame_err),
    .parity_err(parity_err),
    .brk       (brk)
  );

endmodule
