// uart_spi_ctrl: the UART-to-SPI interfacing block.
//
// It is the master of the UART's data bus and drives the SPI master. Bytes
// arriving on the UART come in pairs:
//   1. a select byte, whose low bits name the SPI slave (0 .. N_SS-1);
//   2. a data byte, which is sent to that slave in one SPI exchange.
// The byte the slave returns during the exchange is written to the UART
// transmitter, so the host receives one reply byte per pair.
//
// The controller polls the UART status register. When a character is
// ready it reads the status and then the data register in consecutive
// cycles; if the status showed a framing, parity or break error, the byte is
// dropped and those sticky bits are cleared (the pair continues with the
// next good byte). Before the reply is written it waits for the transmit
// buffer to be empty. After reset, and whenever the cfg_* inputs change
// while the controller is waiting for a byte, it writes them to the UART
// control register (transmitter and receiver enabled, 8-bit characters).
//
// The document names this block and its purpose (a PC reaching several SPI
// slaves through its UART port). The two-byte framing, the polling scheme
// and the error handling are this design's own.
module uart_spi_ctrl
  import uart_pkg::*;
#(
  parameter int unsigned N_SS = 4,
  localparam int unsigned SW  = (N_SS > 1) ? $clog2(N_SS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration of the UART
  input  logic          cfg_parity_en,
  input  logic          cfg_odd_even_parity,
  input  logic          cfg_two_stop,
  // UART data bus (master side)
  output logic [1:0]    addr,
  output logic          wr,
  output logic          rd,
  output logic [7:0]    wdata,
  input  logic [7:0]    rdata,
  // SPI master
  output logic          spi_start,
  output logic [SW-1:0] spi_sel,
  output logic [7:0]    spi_tx,
  input  logic [7:0]    spi_rx,
  input  logic          spi_done,
  // statistics
  output logic          dropped   // pulses when a byte with an error is dropped
);

  typedef enum logic [2:0] {
    C_CONFIG,     // write the control register
    C_POLL,       // read status, look for rx_ready
    C_READ,       // read the RBR
    C_CLEAR,      // clear sticky error bits after a bad byte
    C_SPI,        // exchange in progress
    C_TX_WAIT,    // wait for an empty TBR
    C_TX_WRITE    // write the reply
  } state_e;

  state_e     state;
  ctrl_t      cfg, cfg_q;
  logic       have_sel;  // the select byte of the pair has arrived
  logic [7:0] status_q;
  logic [7:0] reply;
  logic       in_spi_q;  // state was C_SPI in the previous clock

  always_comb begin
    cfg                 = '0;
    cfg.tx_en           = 1'b1;
    cfg.rx_en           = 1'b1;
    cfg.parity_en       = cfg_parity_en;
    cfg.odd_even_parity = cfg_odd_even_parity;
    cfg.two_stop        = cfg_two_stop;
    cfg.char_len        = 2'd3;  // 8-bit characters carry 8-bit SPI words
  end

  // Bus outputs decoded from the state.
  always_comb begin
    addr      = REG_STATUS;
    wr        = 1'b0;
    rd        = 1'b0;
    wdata     = '0;
    spi_start = 1'b0;
    unique case (state)
      C_CONFIG: begin
        addr  = REG_CONTROL;
        wr    = 1'b1;
        wdata = cfg;
      end
      C_POLL, C_TX_WAIT: begin
        addr = REG_STATUS;
        rd   = 1'b1;
      end
      C_READ: begin
        addr = REG_DATA;
        rd   = 1'b1;
      end
      C_CLEAR: begin
        addr  = REG_STATUS;
        wr    = 1'b1;
        wdata = ST_ERR_MASK;
      end
      C_SPI: spi_start = !in_spi_q;
      C_TX_WRITE: begin
        addr  = REG_DATA;
        wr    = 1'b1;
        wdata = reply;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= C_CONFIG;
      cfg_q    <= '0;
      have_sel <= 1'b0;
      status_q <= '0;
      reply    <= '0;
      spi_sel  <= '0;
      spi_tx   <= '0;
      dropped  <= 1'b0;
    end else begin
      dropped <= 1'b0;
      unique case (state)
        C_CONFIG: begin
          cfg_q <= cfg;
          state <= C_POLL;
        end
        C_POLL: begin
          status_q <= rdata;
          if (rdata[ST_RX_READY]) state <= C_READ;
          else if (cfg != cfg_q)  state <= C_CONFIG;
        end
        C_READ: begin
          if (status_q[ST_FRAMING] || status_q[ST_PARITY] || status_q[ST_BREAK]) begin
            dropped <= 1'b1;
            state   <= C_CLEAR;
          end else if (!have_sel) begin
            spi_sel  <= SW'(rdata);
            have_sel <= 1'b1;
            state    <= C_POLL;
          end else begin
            spi_tx   <= rdata;
            have_sel <= 1'b0;
            state    <= C_SPI;
          end
        end
        C_CLEAR: state <= C_POLL;
        C_SPI: begin
          if (spi_done) begin
            reply <= spi_rx;
            state <= C_TX_WAIT;
          end
        end
        C_TX_WAIT: if (rdata[ST_TBR_EMPTY]) state <= C_TX_WRITE;
        C_TX_WRITE: state <= C_POLL;
        default: state <= C_POLL;
      endcase
    end
  end

  // spi_start is a one-clock pulse on entry to C_SPI.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_spi_q <= 1'b0;
    else        in_spi_q <= (state == C_SPI);
  end
endmodule
