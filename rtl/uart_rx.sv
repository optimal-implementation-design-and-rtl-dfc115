// uart_rx: UART receiver with a receive shift register (RSR) and a receive
// buffer register (RBR).
//
// The serial input is synchronised with two flip-flops and examined on every
// rx_tick, which runs at 16 times the bit rate. A low level starts the
// START state; if the line stays low for half a bit time (8 ticks) the start
// bit is accepted, otherwise the pulse is ignored and the receiver returns
// to IDLE. From the middle of the start bit, every 16 ticks lands in the
// middle of the next bit: the data bits (char_len + 5, from 5 to 8), LSB
// first, are written into the RSR (dout_temp) at their own bit positions,
// the bits above the character length staying 0, then the parity bit (when
// parity_en is set) and the stop bit are sampled.
//
// At the middle of the stop bit the character is complete:
//   * data_rx_done pulses for one clock;
//   * if the RBR is free, RSR -> RBR (dout) and rbr_full is set; if the RBR
//     still holds an unread character, the new one is dropped and overrun
//     pulses;
//   * frame_err pulses when the stop bit is 0, parity_err when the sampled
//     parity bit differs from parity_in (the parity of the RSR, computed by
//     parity_gen), and brk when the line was 0 for the whole character.
// After a framing error the receiver waits for the line to return high
// before it looks for a new start bit. `rd` (the host reading the RBR)
// clears rbr_full. Only the first stop bit is checked.
//
// The 16x sampling, the half-bit start check, the RSR/RBR pair, the 5 to 8
// bit characters and the error conditions follow the document; the
// synchroniser, the overrun policy (keep the older character) and the wait
// after a framing error are this design's choices. WIDTH is the longest
// character (8).
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rx_tick,    // 16 per bit time
  input  logic             rx_en,
  input  logic             parity_en,
  input  logic [1:0]       char_len,   // data bits minus 5
  input  logic             sin,
  input  logic             parity_in,  // parity of dout_temp, from parity_gen
  input  logic             rd,         // RBR has been read
  output logic [WIDTH-1:0] dout_temp,  // RSR contents
  output logic [WIDTH-1:0] dout,       // RBR contents
  output logic             rbr_full,
  output logic             data_rx_done,
  output logic             frame_err,
  output logic             parity_err,
  output logic             overrun,
  output logic             brk
);

  localparam int unsigned CW = $clog2(WIDTH);

  rx_state_e     state;
  logic [1:0]    sync;
  logic          line;
  logic [3:0]    tick_cnt;
  logic [CW-1:0] bit_cnt;
  logic          par_bit;

  assign line = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync         <= 2'b11;
      state        <= RX_IDLE;
      tick_cnt     <= '0;
      bit_cnt      <= '0;
      par_bit      <= 1'b0;
      dout_temp    <= '0;
      dout         <= '0;
      rbr_full     <= 1'b0;
      data_rx_done <= 1'b0;
      frame_err    <= 1'b0;
      parity_err   <= 1'b0;
      overrun      <= 1'b0;
      brk          <= 1'b0;
    end else begin
      sync         <= {sync[0], sin};
      data_rx_done <= 1'b0;
      frame_err    <= 1'b0;
      parity_err   <= 1'b0;
      overrun      <= 1'b0;
      brk          <= 1'b0;
      if (rd) rbr_full <= 1'b0;

      if (!rx_en) begin
        state <= RX_IDLE;
      end else if (rx_tick) begin
        unique case (state)
          RX_IDLE: begin
            tick_cnt <= '0;
            if (!line) state <= RX_START;
          end
          RX_START: begin
            if (line) begin
              state <= RX_IDLE;  // shorter than half a bit: spurious
            end else if (tick_cnt == 4'd6) begin
              // 8th low sample (including the one seen in IDLE): mid start bit
              tick_cnt  <= '0;
              bit_cnt   <= '0;
              dout_temp <= '0;
              state     <= RX_DATA;
            end else begin
              tick_cnt <= tick_cnt + 1'b1;
            end
          end
          RX_DATA: begin
            tick_cnt <= tick_cnt + 1'b1;
            if (tick_cnt == 4'd15) begin
              dout_temp[bit_cnt] <= line;
              if (bit_cnt == CW'(char_len) + CW'(4)) state <= parity_en ? RX_PARITY : RX_STOP;
              else bit_cnt <= bit_cnt + 1'b1;
            end
          end
          RX_PARITY: begin
            tick_cnt <= tick_cnt + 1'b1;
            if (tick_cnt == 4'd15) begin
              par_bit <= line;
              state   <= RX_STOP;
            end
          end
          RX_STOP: begin
            tick_cnt <= tick_cnt + 1'b1;
            if (tick_cnt == 4'd15) begin
              data_rx_done <= 1'b1;
              if (rbr_full && !rd) begin
                overrun <= 1'b1;
              end else begin
                dout     <= dout_temp;
                rbr_full <= 1'b1;
              end
              frame_err  <= !line;
              parity_err <= parity_en && (par_bit != parity_in);
              brk        <= !line && (dout_temp == '0) && !(parity_en && par_bit);
              state      <= line ? RX_IDLE : RX_WAIT_HIGH;
            end
          end
          RX_WAIT_HIGH: begin
            if (line) state <= RX_IDLE;
          end
          default: state <= RX_IDLE;
        endcase
      end
    end
  end

endmodule
