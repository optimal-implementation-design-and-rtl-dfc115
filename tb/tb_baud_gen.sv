// tb_baud_gen: checks the spacing of the receive and transmit ticks.
// With DIV = 5, rx_tick must come every 5 clocks and tx_tick every
// 16 rx ticks (80 clocks), each one clock wide, tx_tick together with an
// rx_tick. Also checks the default divisor formula for 50 MHz / 115200.
module tb_baud_gen;
  logic clk = 0, rst_n = 0;
  logic rx_tick, tx_tick;
  int checks = 0, failures = 0;
  int cyc = 0, last_rx = -1, last_tx = -1, n_rx = 0, n_tx = 0;

  baud_gen #(.DIV(5), .OVERSAMPLE(16)) dut (.*);
  baud_gen full (.clk(clk), .rst_n(rst_n), .rx_tick(), .tx_tick());

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && rx_tick) begin
      if (last_rx >= 0) begin
        checks++;
        if (cyc - last_rx != 5) failures++;
      end
      last_rx <= cyc;
      n_rx <= n_rx + 1;
    end
    if (rst_n && tx_tick) begin
      checks++;
      if (!rx_tick) failures++;
      if (last_tx >= 0) begin
        checks++;
        if (cyc - last_tx != 80) failures++;
      end
      last_tx <= cyc;
      n_tx <= n_tx + 1;
    end
  end

  initial begin
    checks++;
    if (full.DIV != 27) failures++;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    checks += 2;
    if (n_rx < 390) failures++;
    if (n_tx < 24) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
