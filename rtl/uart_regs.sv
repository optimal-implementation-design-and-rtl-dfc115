// uart_regs: control and status registers of the UART and its data-bus port.
//
// The host sees three byte-wide registers (map in uart_pkg). Reads are
// combinational: rdata is valid in the same cycle as rd/addr, and the side
// effect of a read (RBR read clears rx_ready) happens at the clock edge.
//   DATA    write -> tx_load pulse with the byte for the TBR
//           read  <- RBR, rx_read pulse
//   CONTROL read/write ctrl_t, reset value CTRL_RESET
//   STATUS  live bits: TBR empty, transmitter busy, RBR full;
//           sticky bits: overrun, framing, parity, break, underrun. A
//           sticky bit is set by the one-clock event pulse from the
//           receiver or transmitter and cleared by writing 1 to it. The
//           event is visible in the status in the clock it arrives, the
//           same clock in which rx_ready rises for the character it
//           belongs to.
// irq is high while a character waits in the RBR or a sticky receive
// error bit (overrun, framing, parity, break) is set. Underrun is not an
// interrupt source: an idle transmitter is the normal end of a message.
//
// The document names the control and status registers and lists the
// conditions; the addresses, bit layout, write-1-to-clear and interrupt
// condition are this design's own.
module uart_regs
  import uart_pkg::*;
#(
  parameter logic [7:0] CTRL_RESET = 8'h63  // tx and rx on, 8 data bits, no parity
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
  // to the transmitter and receiver
  output ctrl_t      ctrl,
  output logic       tx_load,
  output logic [7:0] tx_data,
  output logic       rx_read,
  input  logic       tbr_empty,
  input  logic       tx_busy,
  input  logic       underrun,
  input  logic [7:0] rbr,
  input  logic       rbr_full,
  input  logic       overrun,
  input  logic       frame_err,
  input  logic       parity_err,
  input  logic       brk
);

  logic [7:0] status;
  logic [7:0] sticky;  // only bits in ST_ERR_MASK are used
  logic [7:0] events;

  always_comb begin
    events                = '0;
    events[ST_OVERRUN]    = overrun;
    events[ST_FRAMING]    = frame_err;
    events[ST_PARITY]     = parity_err;
    events[ST_BREAK]      = brk;
    events[ST_UNDERRUN]   = underrun;

    // an error shows in the same clock as the character it belongs to
    status                = (sticky | events) & ST_ERR_MASK;
    status[ST_TBR_EMPTY]  = tbr_empty;
    status[ST_TX_BUSY]    = tx_busy;
    status[ST_RX_READY]   = rbr_full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl   <= ctrl_t'(CTRL_RESET);
      sticky <= '0;
    end else begin
      if (wr && addr == REG_CONTROL) ctrl <= ctrl_t'(wdata);
      if (wr && addr == REG_STATUS) sticky <= ((sticky & ~wdata) | events) & ST_ERR_MASK;
      else                          sticky <= (sticky | events) & ST_ERR_MASK;
    end
  end

  always_comb begin
    tx_load = wr && addr == REG_DATA;
    tx_data = wdata;
    rx_read = rd && addr == REG_DATA;
    unique case (addr)
      REG_DATA:    rdata = rbr;
      REG_CONTROL: rdata = ctrl;
      REG_STATUS:  rdata = status;
      default:     rdata = '0;
    endcase
    irq = rbr_full || (|(sticky & ST_RX_ERR_MASK));
  end

  // A bus cycle is either a read or a write.
  assert property (@(posedge clk) disable iff (!rst_n) !(wr && rd));

endmodule
