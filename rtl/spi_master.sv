// spi_master: SPI bus master for one word exchange at a time.
//
// On `start` the master latches tx_data and the slave number ss_sel, pulls
// that slave's active-low select line ss_n low and waits half an SCK period
// before the first clock edge. It then gives WIDTH SCK cycles, each half
// period SCK_DIV system clocks long, and exchanges one word with the slave:
// the word leaves MSB first on mosi while the bits from miso enter at the LSB
// of the same shift register, so after the last cycle the register holds the
// slave's word (rx_data). Half a period after the last edge the select line
// returns high and `done` pulses for one clock. SCK rests at cpol.
//
//   cpha = 0: a bit is on mosi before the first (leading) edge; miso is
//             sampled on leading edges, the register shifts on trailing
//             edges.
//   cpha = 1: mosi changes on leading edges, miso is sampled on trailing
//             edges.
// With cpol = 0 the leading edge is rising, with cpol = 1 falling.
//
// The ring of two shift registers, MSB first, the active-low select, and the
// CPOL/CPHA rules follow the document. The word width, SCK divider, number of
// slaves and the half-period set-up and hold around the select are this
// design's defaults.
module spi_master #(
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned N_SS    = 4,
  parameter int unsigned SCK_DIV = 4,  // system clocks per SCK half period
  localparam int unsigned SW     = (N_SS > 1) ? $clog2(N_SS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cpol,
  input  logic             cpha,
  input  logic             start,
  input  logic [SW-1:0]    ss_sel,
  input  logic [WIDTH-1:0] tx_data,
  output logic [WIDTH-1:0] rx_data,
  output logic             busy,
  output logic             done,
  output logic             sclk,
  output logic             mosi,
  input  logic             miso,
  output logic [N_SS-1:0]  ss_n
);

  typedef enum logic [1:0] {S_IDLE, S_LEAD, S_XFER, S_TRAIL} state_e;

  localparam int unsigned DW = (SCK_DIV > 1) ? $clog2(SCK_DIV) : 1;
  localparam int unsigned EW = $clog2(2 * WIDTH);

  state_e           state;
  logic [DW-1:0]    div_cnt;
  logic [EW-1:0]    edge_cnt;   // SCK edges given so far in this word
  logic [WIDTH-1:0] shreg;
  logic             miso_q;
  logic             cpha_q;
  logic             half_done;
  logic             leading;    // the next edge is a leading edge

  assign mosi      = shreg[WIDTH-1];
  assign rx_data   = shreg;
  assign busy      = (state != S_IDLE);
  assign half_done = (div_cnt == DW'(SCK_DIV - 1));
  assign leading   = !edge_cnt[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      div_cnt  <= '0;
      edge_cnt <= '0;
      shreg    <= '0;
      miso_q   <= 1'b0;
      cpha_q   <= 1'b0;
      sclk     <= 1'b0;
      ss_n     <= '1;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          sclk <= cpol;
          if (start) begin
            cpha_q   <= cpha;
            shreg    <= tx_data;
            ss_n     <= ~(N_SS'(1) << ss_sel);
            div_cnt  <= '0;
            edge_cnt <= '0;
            state    <= S_LEAD;
          end
        end
        S_LEAD: begin
          div_cnt <= div_cnt + 1'b1;
          if (half_done) begin
            div_cnt <= '0;
            state   <= S_XFER;
          end
        end
        S_XFER: begin
          div_cnt <= div_cnt + 1'b1;
          if (half_done) begin
            div_cnt  <= '0;
            sclk     <= !sclk;
            edge_cnt <= edge_cnt + 1'b1;
            if (leading) begin
              if (!cpha_q) miso_q <= miso;
              else if (edge_cnt != '0) shreg <= {shreg[WIDTH-2:0], miso_q};
            end else begin
              if (!cpha_q) shreg <= {shreg[WIDTH-2:0], miso_q};
              else miso_q <= miso;
            end
            if (edge_cnt == EW'(2 * WIDTH - 1)) state <= S_TRAIL;
          end
        end
        S_TRAIL: begin
          div_cnt <= div_cnt + 1'b1;
          if (half_done) begin
            div_cnt <= '0;
            if (cpha_q) shreg <= {shreg[WIDTH-2:0], miso_q};
            ss_n  <= '1;
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
