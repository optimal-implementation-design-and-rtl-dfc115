// tb_uart_spi_ctrl: self-checking test of the UART-to-SPI controller.
// The testbench plays both neighbours: it answers the controller's register
// bus like the UART (a queue of received bytes with optional error flags, a
// transmit buffer that frees itself after a delay) and answers spi_start
// like the SPI master (done after a delay, with a reply). Checked: the
// control register written after reset and again after a cfg change, each
// select/data pair giving one SPI exchange with the right slave and byte,
// the SPI reply written to DATA only while the TBR is empty, a byte with a
// framing or parity error dropped and the sticky bits cleared, and no bus
// read and write in the same cycle.
module tb_uart_spi_ctrl;
  import uart_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_parity_en = 1, cfg_odd_even_parity = 0, cfg_two_stop = 0;
  logic [1:0] addr;
  logic wr, rd;
  logic [7:0] wdata, rdata;
  logic spi_start, spi_done = 0, dropped;
  logic [1:0] spi_sel;
  logic [7:0] spi_tx, spi_rx = 0;
  int checks = 0, failures = 0;

  // UART model state
  logic [8:0] rxq[$];            // {error, byte}
  logic [7:0] sticky = 0, ctrl_w = 0;
  int ctrl_writes = 0, tbr_busy = 0, tx_writes = 0, bad_tx_write = 0, n_dropped = 0;
  byte unsigned txq[$];
  // SPI model state
  int spi_cnt = 0, spi_busy_cnt = 0;
  logic [7:0] spi_reply;
  logic [2:0] spi_log[$];
  logic [7:0] spi_data_log[$];

  uart_spi_ctrl #(.N_SS(4)) dut (.*);

  always #5 clk = !clk;

  always_comb begin
    logic [7:0] st;
    st = sticky;
    st[ST_TBR_EMPTY] = (tbr_busy == 0);
    st[ST_RX_READY]  = rxq.size() > 0;
    unique case (addr)
      REG_DATA:    rdata = (rxq.size() > 0) ? rxq[0][7:0] : 8'h00;
      REG_CONTROL: rdata = ctrl_w;
      default:     rdata = st;
    endcase
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (wr && rd) bad_tx_write <= bad_tx_write + 1;
      if (tbr_busy > 0) tbr_busy <= tbr_busy - 1;
      if (wr && addr == REG_CONTROL) begin
        ctrl_w <= wdata;
        ctrl_writes <= ctrl_writes + 1;
      end
      if (wr && addr == REG_STATUS) sticky <= sticky & ~wdata;
      if (wr && addr == REG_DATA) begin
        if (tbr_busy != 0) bad_tx_write <= bad_tx_write + 1;
        txq.push_back(wdata);
        tx_writes <= tx_writes + 1;
        tbr_busy <= 40;
      end
      if (rd && addr == REG_DATA && rxq.size() > 0) void'(rxq.pop_front());
      if (dropped) n_dropped <= n_dropped + 1;
      // SPI master model
      spi_done <= 1'b0;
      if (spi_start) begin
        spi_log.push_back({1'b1, spi_sel});
        spi_data_log.push_back(spi_tx);
        spi_busy_cnt <= 25;
        spi_cnt <= spi_cnt + 1;
      end else if (spi_busy_cnt > 0) begin
        spi_busy_cnt <= spi_busy_cnt - 1;
        if (spi_busy_cnt == 1) begin
          spi_done <= 1'b1;
          spi_rx <= ~spi_data_log[$];
        end
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // A received byte appears; `err` also sets the sticky framing bit, as the
  // UART would.
  task automatic arrive(input logic [7:0] b, input bit err);
    @(negedge clk);
    rxq.push_back({err, b});
    if (err) sticky[ST_FRAMING] = 1'b1;
    while (rxq.size() > 0) @(negedge clk);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    ctrl_t c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(ctrl_writes == 1, "control written once after reset");
    c = ctrl_t'(ctrl_w);
    check(c.tx_en && c.rx_en && c.parity_en && !c.odd_even_parity && !c.two_stop,
          "control value");
    // pairs to each slave
    for (int s = 0; s < 4; s++) begin
      logic [7:0] d;
      d = 8'($urandom);
      arrive(8'(s), 0);
      check(spi_cnt == s, "no exchange after select byte");
      arrive(d, 0);
      repeat (30) @(negedge clk);
      check(spi_cnt == s + 1, "one exchange per pair");
      check(spi_log.size() > 0 && spi_log[$][1:0] == 2'(s), "slave number");
      check(spi_data_log[$] == d, "SPI byte");
      repeat (50) @(negedge clk);
      check(txq.size() > 0 && txq[$] == ~d, "reply written to the UART");
    end
    // select byte with high bits set: low bits pick the slave
    arrive(8'hF6, 0);
    arrive(8'h3C, 0);
    repeat (80) @(negedge clk);
    check(spi_log[$][1:0] == 2'd2 && spi_data_log[$] == 8'h3C, "select uses the low bits");
    // bad byte dropped inside a pair
    arrive(8'h01, 0);
    arrive(8'hEE, 1);
    check(n_dropped == 1, "bad byte dropped");
    check(sticky[ST_FRAMING] == 1'b0, "sticky bits cleared");
    check(spi_cnt == 5, "no exchange for a dropped byte");
    arrive(8'h42, 0);
    repeat (80) @(negedge clk);
    check(spi_cnt == 6 && spi_log[$][1:0] == 2'd1 && spi_data_log[$] == 8'h42,
          "pair completes after the dropped byte");
    // two pairs back to back: the second reply waits for the TBR
    arrive(8'h00, 0);
    arrive(8'h10, 0);
    arrive(8'h03, 0);
    arrive(8'h20, 0);
    repeat (200) @(negedge clk);
    check(tx_writes == 8, "all replies written");
    check(bad_tx_write == 0, "no write into a full TBR, no read with write");
    // configuration change
    cfg_odd_even_parity = 1;
    cfg_two_stop = 1;
    repeat (10) @(negedge clk);
    c = ctrl_t'(ctrl_w);
    check(ctrl_writes == 2 && c.odd_even_parity && c.two_stop, "control rewritten on cfg change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
