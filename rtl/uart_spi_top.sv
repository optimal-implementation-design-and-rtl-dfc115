// uart_spi_top: UART-to-SPI converter.
//
// A host with only a serial (UART) port reaches one of N_SS SPI slaves. The
// design has three parts, as in the document: the UART (receiver,
// transmitter, control and status registers), the UART-to-SPI interfacing
// block (uart_spi_ctrl) and the SPI master. The controller reads bytes from
// the UART in pairs (slave number, data byte), has the SPI master exchange
// the data byte with the chosen slave, and sends the slave's byte back over
// the UART.
//
// Serial format: 1 start bit, 8 data bits LSB first, optional odd or even
// parity, 1 or 2 stop bits, at BAUD with CLK_HZ system clock (16x receive
// oversampling). SPI: 8-bit words MSB first, SCK = CLK_HZ / (2*SCK_DIV),
// mode chosen by cpol/cpha, active-low slave selects. irq is the UART's
// interrupt line (a character waiting, or a receive error bit set),
// spi_busy is high during an SPI exchange, and dropped pulses for one clock
// when the controller discards a byte that arrived with a parity, framing
// or break error.
// All of it runs on clk; rxd and miso may be asynchronous (rxd is
// synchronised in the receiver, miso is sampled on SCK edges the master
// itself makes).
//
// The clock frequency, bit rate, SCK divider and number of slaves are this
// design's defaults; the document gives none of them.
module uart_spi_top #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned BAUD    = 115_200,
  parameter int unsigned SCK_DIV = 4,
  parameter int unsigned N_SS    = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration
  input  logic            cfg_parity_en,
  input  logic            cfg_odd_even_parity,
  input  logic            cfg_two_stop,
  input  logic            cpol,
  input  logic            cpha,
  // UART line to the host
  input  logic            rxd,
  output logic            txd,
  // SPI bus
  output logic            sclk,
  output logic            mosi,
  input  logic            miso,
  output logic [N_SS-1:0] ss_n,
  // status
  output logic            irq,
  output logic            spi_busy,
  output logic            dropped
);

  localparam int unsigned SW = (N_SS > 1) ? $clog2(N_SS) : 1;

  logic [1:0]    addr;
  logic          wr, rd;
  logic [7:0]    wdata, rdata;
  logic          spi_start, spi_done;
  logic [SW-1:0] spi_sel;
  logic [7:0]    spi_tx, spi_rx;

  uart #(
    .CLK_HZ    (CLK_HZ),
    .BAUD      (BAUD),
    .CTRL_RESET(8'h63)
  ) u_uart (
    .clk  (clk),
    .rst_n(rst_n),
    .addr (addr),
    .wr   (wr),
    .rd   (rd),
    .wdata(wdata),
    .rdata(rdata),
    .irq  (irq),
    .rxd  (rxd),
    .txd  (txd)
  );

  uart_spi_ctrl #(.N_SS(N_SS)) u_ctrl (
    .clk                (clk),
    .rst_n              (rst_n),
    .cfg_parity_en      (cfg_parity_en),
    .cfg_odd_even_parity(cfg_odd_even_parity),
    .cfg_two_stop       (cfg_two_stop),
    .addr               (addr),
    .wr                 (wr),
    .rd                 (rd),
    .wdata              (wdata),
    .rdata              (rdata),
    .spi_start          (spi_start),
    .spi_sel            (spi_sel),
    .spi_tx             (spi_tx),
    .spi_rx             (spi_rx),
    .spi_done           (spi_done),
    .dropped            (dropped)
  );

  spi_master #(
    .WIDTH  (8),
    .N_SS   (N_SS),
    .SCK_DIV(SCK_DIV)
  ) u_spi (
    .clk    (clk),
    .rst_n  (rst_n),
    .cpol   (cpol),
    .cpha   (cpha),
    .start  (spi_start),
    .ss_sel (spi_sel),
    .tx_data(spi_tx),
    .rx_data(spi_rx),
    .busy   (spi_busy),
    .done   (spi_done),
    .sclk   (sclk),
    .mosi   (mosi),
    .miso   (miso),
    .ss_n   (ss_n)
  );

endmodule
