// uart_pkg: types and constants shared by the UART, the SPI master and the
// UART-to-SPI controller.
//
// The UART is reached through a small byte-wide register bus with three
// registers. The register map, the control-register layout and the status
// bit positions below are this design's own choices; the document only names
// a control register and a status register next to the transmit and receive
// buffers.
//
//   address 0  DATA     write: load the transmit buffer register (TBR)
//                       read : receive buffer register (RBR), clears rx_ready
//   address 1  CONTROL  read/write, layout ctrl_t
//   address 2  STATUS   read; writing 1 to an error bit clears it
package uart_pkg;

  localparam int unsigned DATA_BITS = 8;  // longest character, width of the data path
  localparam int unsigned OVERSAMPLE = 16;  // receive clock per bit

  typedef enum logic [1:0] {
    REG_DATA    = 2'd0,
    REG_CONTROL = 2'd1,
    REG_STATUS  = 2'd2
  } reg_addr_e;

  // Control register, bits [7:0] from the MSB down.
  typedef struct packed {
    logic       reserved;
    logic [1:0] char_len;         // data bits per character minus 5 (3: 8 bits)
    logic       two_stop;         // 1: send two stop bits
    logic       odd_even_parity;  // 1: odd parity, 0: even parity
    logic       parity_en;        // 1: append / check a parity bit
    logic       rx_en;            // receiver enable
    logic       tx_en;            // transmitter enable
  } ctrl_t;

  // Status register bit positions.
  localparam int unsigned ST_TBR_EMPTY = 0;  // transmit buffer can take a byte
  localparam int unsigned ST_TX_BUSY   = 1;  // a character is on the line
  localparam int unsigned ST_RX_READY  = 2;  // RBR holds an unread character
  localparam int unsigned ST_OVERRUN   = 3;  // sticky: character lost, RBR was full
  localparam int unsigned ST_FRAMING   = 4;  // sticky: stop bit read as 0
  localparam int unsigned ST_PARITY    = 5;  // sticky: parity bit mismatch
  localparam int unsigned ST_BREAK     = 6;  // sticky: whole character time low
  localparam int unsigned ST_UNDERRUN  = 7;  // sticky: TSR finished, TBR empty

  localparam logic [7:0] ST_ERR_MASK    = 8'hF8;  // all sticky bits
  localparam logic [7:0] ST_RX_ERR_MASK = 8'h78;  // receive errors only

  typedef enum logic [3:0] {
    TX_IDLE,
    TX_START,
    TX_DATA,
    TX_PARITY,
    TX_STOP,
    TX_STOP2
  } tx_state_e;

  typedef enum logic [2:0] {
    RX_IDLE,
    RX_START,
    RX_DATA,
    RX_PARITY,
    RX_STOP,
    RX_WAIT_HIGH
  } rx_state_e;

endpackage
