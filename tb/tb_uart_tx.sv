// tb_uart_tx: self-checking test of the UART transmitter.
// tx_tick is made every BIT clocks. A monitor decodes sout in the middle of
// each bit and compares start bit, data (LSB first), parity and stop bits
// with the bytes the test loaded. Covered: the reference byte 8'b10000111
// with parity, random bytes with and without parity, odd and even parity,
// two stop bits, 5 to 7 bit characters, back-to-back characters (10 bit times each with 8N1),
// tx_en = 0 holding a byte, the TSR emptied to zeros, and the underrun pulse.
module tb_uart_tx;
  import uart_pkg::*;
  localparam int BIT = 8;

  logic clk = 0, rst_n = 0;
  logic tx_tick = 0, tx_en = 1, parity_en = 0, two_stop = 0, load = 0;
  logic [1:0] char_len = 2'd3;
  logic [7:0] din = 0, tbr;
  logic parity_in, tbr_empty, busy, underrun, sout;
  logic odd = 0;
  int checks = 0, failures = 0, n_underrun = 0, frames = 0;
  byte unsigned expq[$];
  int start_cyc[$];
  int cyc = 0;

  uart_tx dut (.*);

  assign parity_in = (^tbr) ^ odd;

  always #5 clk = !clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    tx_tick <= (cyc % BIT) == BIT - 1;
    if (underrun) n_underrun <= n_underrun + 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  // Decoder of the serial line.
  initial begin : monitor
    logic [7:0] d;
    logic p;
    @(posedge rst_n);
    forever begin
      @(negedge sout);
      start_cyc.push_back(cyc);
      repeat (BIT / 2) @(posedge clk);
      check(sout == 1'b0, "start bit");
      d = '0;
      for (int i = 0; i < int'(char_len) + 5; i++) begin
        repeat (BIT) @(posedge clk);
        d[i] = sout;
      end
      if (parity_en) begin
        repeat (BIT) @(posedge clk);
        p = sout;
        check(p == ((^d) ^ odd), "parity bit");
      end
      repeat (BIT) @(posedge clk);
      check(sout == 1'b1, "stop bit");
      if (two_stop) begin
        repeat (BIT) @(posedge clk);
        check(sout == 1'b1, "second stop bit");
      end
      check(expq.size() > 0, "unexpected frame");
      if (expq.size() > 0) begin
        byte unsigned e;
        e = expq.pop_front() & 8'(9'h0FF >> (3 - char_len));
        if (d != e) $display("got %h exp %h", d, e);
        check(d == e, "data");
      end
      frames++;
    end
  end

  task automatic send(input logic [7:0] b);
    @(negedge clk);
    while (!tbr_empty) @(negedge clk);
    din  = b;
    load = 1;
    expq.push_back(b);
    @(negedge clk);
    load = 0;
  endtask

  task automatic drain();
    while (expq.size() != 0 || busy || !tbr_empty) @(posedge clk);
    repeat (2 * BIT) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(sout == 1'b1, "idle high");
    // reference byte, even parity
    parity_en = 1; odd = 0;
    send(8'b1000_0111);
    drain();
    check(dut.tsr == '0, "TSR zero after frame");
    check(n_underrun >= 1, "underrun after last frame");
    // odd parity, random
    odd = 1;
    for (int i = 0; i < 6; i++) send(8'($urandom));
    drain();
    // 8N1 back-to-back: 10 bit times per character
    parity_en = 0;
    start_cyc.delete();
    for (int i = 0; i < 6; i++) send(8'($urandom));
    drain();
    for (int i = 1; i < start_cyc.size(); i++)
      check(start_cyc[i] - start_cyc[i-1] == 10 * BIT, "10 bit times per character");
    // two stop bits, parity
    two_stop = 1; parity_en = 1; odd = 0;
    start_cyc.delete();
    for (int i = 0; i < 4; i++) send(8'($urandom));
    drain();
    for (int i = 1; i < start_cyc.size(); i++)
      check(start_cyc[i] - start_cyc[i-1] == 12 * BIT, "12 bit times with parity and 2 stops");
    two_stop = 0;
    // 5, 6 and 7 data bits, with parity: 5 + n bit times per character
    for (int n = 0; n < 3; n++) begin
      char_len = 2'(n);
      start_cyc.delete();
      for (int i = 0; i < 3; i++) send(8'($urandom));
      drain();
      for (int i = 1; i < start_cyc.size(); i++)
        check(start_cyc[i] - start_cyc[i-1] == (n + 8) * BIT, "frame length for short characters");
    end
    char_len = 2'd3;
    parity_en = 0;
    // tx_en = 0 holds the byte in the TBR
    tx_en = 0;
    send(8'hA5);
    repeat (30 * BIT) @(posedge clk);
    check(!busy && !tbr_empty && sout, "held while disabled");
    tx_en = 1;
    drain();
    check(frames == 27, "frame count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
