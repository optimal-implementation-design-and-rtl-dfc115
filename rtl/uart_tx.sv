// uart_tx: UART transmitter with a transmit buffer register (TBR) and a
// transmit shift register (TSR).
//
// A byte written on `load` goes into the TBR. When the transmitter is
// enabled and a bit time starts (tx_tick), the state machine moves the TBR
// into the TSR together with the frame bits: start bit (0), char_len + 5
// data bits (5 to 8) LSB first, the parity bit when parity_en is set, and
// one or two stop bits (1). Data bits above the character length are
// cleared as the byte enters the TBR, so the parity covers only the bits
// that are sent. Each following tx_tick shifts the TSR one place towards
// the line and fills it from the top with zeros, so the TSR is all zeros
// once the frame has gone. The states are IDLE, START, DATA (one bit time
// per data bit), PARITY, STOP and, with two_stop, STOP2; sout is 1 in IDLE.
// char_len should only change while the transmitter is idle, and WIDTH is
// the longest character (8).
//
// parity_in is the parity bit of the TBR contents, computed outside
// (parity_gen) and captured in the TSR with the data. When a byte is waiting
// in the TBR at the end of the stop bit, the next frame starts with no idle
// bit, so eight data bits without parity take ten bit times per character.
// When the TSR has finished and the TBR is empty, `underrun` pulses for one
// clock: the line simply stays idle.
//
// The TBR/TSR split, the zero fill, the state sequence and the 5 to 8 data
// bits follow the document. A `load` while the TBR is full is ignored (the
// host checks tbr_empty first); that, the single-clock ticks and the
// back-to-back start are this design's choices.
module uart_tx
  import uart_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tx_tick,    // one clock per bit time
  input  logic             tx_en,
  input  logic             parity_en,
  input  logic             two_stop,
  input  logic [1:0]       char_len,   // data bits minus 5
  input  logic             load,       // write din into the TBR
  input  logic [WIDTH-1:0] din,
  input  logic             parity_in,  // parity of tbr, from parity_gen
  output logic [WIDTH-1:0] tbr,        // TBR contents, to parity_gen
  output logic             tbr_empty,
  output logic             busy,
  output logic             underrun,
  output logic             sout
);

  localparam int unsigned TSR_W = WIDTH + 4;  // start, data, parity, two stops
  localparam int unsigned CW = $clog2(WIDTH);

  tx_state_e        state;
  logic [TSR_W-1:0] tsr;
  logic [CW-1:0]    bit_cnt;
  logic             tbr_full;

  assign tbr_empty = !tbr_full;
  assign busy      = (state != TX_IDLE);

  logic [CW:0]      nbits;      // data bits per character
  logic [WIDTH-1:0] len_mask;   // ones over the bits that are sent

  always_comb begin
    nbits    = (CW + 1)'(char_len) + (CW + 1)'(5);
    len_mask = '0;
    for (int i = 0; i < WIDTH; i++) len_mask[i] = (i < int'(nbits));
  end

  // Frame as it goes into the TSR, LSB leaves first: start bit, nbits data
  // bits, optional parity, then ones for the stop bits.
  function automatic logic [TSR_W-1:0] frame(input logic [WIDTH-1:0] d, input logic p,
                                             input logic pen, input logic [CW:0] n);
    logic [TSR_W-1:0] f;
    f    = '1;
    f[0] = 1'b0;
    for (int i = 0; i < WIDTH; i++) if (i < int'(n)) f[i+1] = d[i];
    if (pen) f[int'(n)+1] = p;
    return f;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= TX_IDLE;
      tsr      <= '0;
      bit_cnt  <= '0;
      tbr      <= '0;
      tbr_full <= 1'b0;
      underrun <= 1'b0;
      sout     <= 1'b1;
    end else begin
      underrun <= 1'b0;
      if (load && !tbr_full) begin
        tbr      <= din & len_mask;
        tbr_full <= 1'b1;
      end
      if (tx_tick) begin
        unique case (state)
          TX_IDLE: begin
            sout <= 1'b1;
            if (tx_en && tbr_full) begin
              tsr      <= frame(tbr, parity_in, parity_en, nbits) >> 1;
              sout     <= 1'b0;
              tbr_full <= 1'b0;
              state    <= TX_START;
            end
          end
          TX_START: begin
            sout    <= tsr[0];
            tsr     <= tsr >> 1;
            bit_cnt <= '0;
            state   <= TX_DATA;
          end
          TX_DATA: begin
            sout    <= tsr[0];
            tsr     <= tsr >> 1;
            if (bit_cnt == CW'(nbits - 1'b1)) begin
              state <= parity_en ? TX_PARITY : TX_STOP;
            end else begin
              bit_cnt <= bit_cnt + 1'b1;
            end
          end
          TX_PARITY: begin
            sout  <= tsr[0];
            tsr   <= tsr >> 1;
            state <= TX_STOP;
          end
          TX_STOP, TX_STOP2: begin
            if (state == TX_STOP && two_stop) begin
              sout  <= tsr[0];
              tsr   <= tsr >> 1;
              state <= TX_STOP2;
            end else if (tx_en && tbr_full) begin
              tsr      <= frame(tbr, parity_in, parity_en, nbits) >> 1;
              sout     <= 1'b0;
              tbr_full <= 1'b0;
              state    <= TX_START;
            end else begin
              tsr      <= '0;
              sout     <= 1'b1;
              underrun <= 1'b1;
              state    <= TX_IDLE;
            end
          end
          default: state <= TX_IDLE;
        endcase
      end
    end
  end

endmodule
