// tb_uart_rx: self-checking test of the UART receiver.
// rx_tick comes every TICK clocks (16 per bit). The test drives sin with
// frames built in the testbench and checks dout, rbr_full and the one-clock
// event outputs. Covered: the reference byte 8'b10000111 with even parity,
// random bytes with and without parity, odd parity, a wrong parity bit, a
// wrong stop bit (framing error), a break (line low for longer than a
// character), an overrun (second character while the RBR is unread), a low
// glitch shorter than half a bit (ignored), rx_en = 0, and bit rates 3%
// off nominal in both directions, and 5, 6 and 7 bit characters.
module tb_uart_rx;
  localparam int TICK = 4;
  localparam int BIT = 16 * TICK;

  logic clk = 0, rst_n = 0;
  logic rx_tick = 0, rx_en = 1, parity_en = 0, sin = 1, rd = 0;
  logic [1:0] char_len = 2'd3;
  logic parity_in;
  logic [7:0] dout_temp, dout;
  logic rbr_full, data_rx_done, frame_err, parity_err, overrun, brk;
  logic odd = 0;
  int checks = 0, failures = 0, cyc = 0;
  int n_done = 0, n_ferr = 0, n_perr = 0, n_ovr = 0, n_brk = 0;

  uart_rx dut (.*);

  assign parity_in = (^dout_temp) ^ odd;

  always #5 clk = !clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    rx_tick <= (cyc % TICK) == TICK - 1;
    if (rst_n) begin
      n_done <= n_done + int'(data_rx_done);
      n_ferr <= n_ferr + int'(frame_err);
      n_perr <= n_perr + int'(parity_err);
      n_ovr  <= n_ovr + int'(overrun);
      n_brk  <= n_brk + int'(brk);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  // Drive one frame; bit_clks lets the sender run off the nominal rate.
  task automatic send_frame(input logic [7:0] d, input bit with_par, input logic par,
                            input logic stop, input int bit_clks);
    @(negedge clk);
    sin = 0;
    repeat (bit_clks) @(negedge clk);
    for (int i = 0; i < int'(char_len) + 5; i++) begin
      sin = d[i];
      repeat (bit_clks) @(negedge clk);
    end
    if (with_par) begin
      sin = par;
      repeat (bit_clks) @(negedge clk);
    end
    sin = stop;
    repeat (bit_clks) @(negedge clk);
    sin = 1;
  endtask

  task automatic read_rbr(output logic [7:0] d);
    @(negedge clk);
    d  = dout;
    rd = 1;
    @(negedge clk);
    rd = 0;
  endtask

  task automatic good_byte(input logic [7:0] d, input int bit_clks);
    logic [7:0] got;
    int done0, ferr0, perr0;
    done0 = n_done; ferr0 = n_ferr; perr0 = n_perr;
    d = d & 8'(9'h0FF >> (3 - char_len));
    send_frame(d, parity_en, (^d) ^ odd, 1'b1, bit_clks);
    repeat (BIT) @(negedge clk);
    check(n_done == done0 + 1, "data_rx_done once");
    check(n_ferr == ferr0 && n_perr == perr0, "no error on good byte");
    check(rbr_full, "rbr_full set");
    read_rbr(got);
    if (got != d) $display("got %h exp %h", got, d);
    check(got == d, "received byte");
    @(negedge clk);
    check(!rbr_full, "rbr_full cleared by rd");
  endtask

  initial begin
    logic [7:0] got;
    int c0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (BIT) @(negedge clk);
    // reference byte with even parity
    parity_en = 1; odd = 0;
    good_byte(8'b1000_0111, BIT);
    check(dout_temp == 8'b1000_0111, "RSR holds the byte");
    odd = 1;
    for (int i = 0; i < 5; i++) good_byte(8'($urandom), BIT);
    parity_en = 0;
    for (int i = 0; i < 5; i++) good_byte(8'($urandom), BIT);
    // 5, 6 and 7 data bits, with and without parity
    for (int n = 0; n < 3; n++) begin
      char_len = 2'(n);
      parity_en = 1;
      for (int i = 0; i < 3; i++) good_byte(8'($urandom), BIT);
      parity_en = 0;
      for (int i = 0; i < 3; i++) good_byte(8'($urandom), BIT);
    end
    char_len = 2'd3;
    // bit rate 3% off
    good_byte(8'h5A, BIT * 103 / 100);
    good_byte(8'hC3, BIT * 97 / 100);
    // parity error
    parity_en = 1; odd = 0;
    c0 = n_perr;
    send_frame(8'h31, 1, !(^8'h31), 1'b1, BIT);
    repeat (BIT) @(negedge clk);
    check(n_perr == c0 + 1, "parity error flagged");
    read_rbr(got);
    parity_en = 0;
    // framing error
    c0 = n_ferr;
    send_frame(8'h4E, 0, 0, 1'b0, BIT);
    repeat (BIT) @(negedge clk);
    check(n_ferr == c0 + 1, "framing error flagged");
    check(n_brk == 0, "framing error is not a break");
    read_rbr(got);
    // break: line low for two character times
    c0 = n_brk;
    @(negedge clk);
    sin = 0;
    repeat (20 * BIT) @(negedge clk);
    sin = 1;
    repeat (2 * BIT) @(negedge clk);
    check(n_brk == c0 + 1, "break flagged once");
    read_rbr(got);
    check(got == 8'h00, "break character is zero");
    // overrun: two characters, no read between them
    c0 = n_ovr;
    send_frame(8'h11, 0, 0, 1'b1, BIT);
    send_frame(8'h22, 0, 0, 1'b1, BIT);
    repeat (BIT) @(negedge clk);
    check(n_ovr == c0 + 1, "overrun flagged");
    read_rbr(got);
    check(got == 8'h11, "older character kept on overrun");
    // glitch shorter than half a bit is ignored
    c0 = n_done;
    @(negedge clk);
    sin = 0;
    repeat (BIT / 4) @(negedge clk);
    sin = 1;
    repeat (12 * BIT) @(negedge clk);
    check(n_done == c0, "short glitch ignored");
    good_byte(8'h96, BIT);
    // receiver disabled
    rx_en = 0;
    c0 = n_done;
    send_frame(8'h77, 0, 0, 1'b1, BIT);
    repeat (BIT) @(negedge clk);
    check(n_done == c0 && !rbr_full, "disabled receiver ignores the line");
    rx_en = 1;
    repeat (BIT) @(negedge clk);
    good_byte(8'h3C, BIT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
