// tb_uart: self-checking test of the UART block through its data bus.
// The UART runs at CLK_HZ = 1.6 MHz and BAUD = 25000 (4 clocks per receive
// tick, 64 per bit). The test configures the control register, writes bytes
// to the DATA register and decodes txd in the testbench; it drives rxd with
// frames and reads them back through STATUS and DATA. Covered: 8N1, odd and
// even parity, two stop bits, 7 and 5 bit characters, status and irq, the parity, framing and
// overrun bits, and the bit time of the transmitter (64 clocks).
module tb_uart;
  import uart_pkg::*;
  localparam int BIT = 64;

  logic clk = 0, rst_n = 0;
  logic [1:0] addr = 0;
  logic wr = 0, rd = 0;
  logic [7:0] wdata = 0, rdata;
  logic irq, rxd = 1, txd;
  int checks = 0, failures = 0, cyc = 0;
  logic pen = 0, odd = 0, two = 0;
  logic [1:0] clen = 2'd3;
  int nb = 8;
  byte unsigned txq[$];
  int frames = 0, last_start = -1, bit_time_bad = 0;

  uart #(.CLK_HZ(1_600_000), .BAUD(25_000)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (300000) @(posedge clk);
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

  task automatic bus_write(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk);
    addr = a; wdata = d; wr = 1;
    @(negedge clk);
    wr = 0;
  endtask

  task automatic bus_read(input logic [1:0] a, output logic [7:0] d);
    @(negedge clk);
    addr = a; rd = 1;
    #1 d = rdata;
    @(negedge clk);
    rd = 0;
  endtask

  // txd decoder
  initial begin : monitor
    logic [7:0] d;
    int t0;
    @(posedge rst_n);
    forever begin
      @(negedge txd);
      t0 = cyc;
      repeat (BIT / 2) @(posedge clk);
      d = '0;
      for (int i = 0; i < nb; i++) begin
        repeat (BIT) @(posedge clk);
        d[i] = txd;
      end
      if (pen) begin
        repeat (BIT) @(posedge clk);
        check(txd == ((^d) ^ odd), "tx parity bit");
      end
      repeat (BIT) @(posedge clk);
      check(txd == 1'b1, "tx stop bit");
      if (two) begin
        repeat (BIT) @(posedge clk);
        check(txd == 1'b1, "tx second stop bit");
      end
      check(txq.size() > 0, "unexpected tx frame");
      if (txq.size() > 0) check(d == txq.pop_front(), "tx data");
      frames++;
    end
  end

  // bit time: the start bit of each frame lasts exactly BIT clocks
  always @(negedge txd) begin
    int t;
    t = cyc;
    @(posedge txd);
    if (((cyc - t) % BIT) != 0) bit_time_bad++;
  end

  task automatic send_rx(input logic [7:0] d, input bit bad_par, input bit bad_stop);
    @(negedge clk);
    rxd = 0;
    repeat (BIT) @(negedge clk);
    for (int i = 0; i < nb; i++) begin
      rxd = d[i];
      repeat (BIT) @(negedge clk);
    end
    if (pen) begin
      rxd = (^d) ^ odd ^ bad_par;
      repeat (BIT) @(negedge clk);
    end
    rxd = !bad_stop;
    repeat (BIT) @(negedge clk);
    rxd = 1;
    repeat (BIT) @(negedge clk);
  endtask

  task automatic transmit(input logic [7:0] b);
    logic [7:0] st;
    do bus_read(REG_STATUS, st); while (!st[ST_TBR_EMPTY]);
    txq.push_back(b & 8'(9'h0FF >> (8 - nb)));
    bus_write(REG_DATA, b);
  endtask

  task automatic receive_check(input logic [7:0] b);
    logic [7:0] st, d;
    b = b & 8'(9'h0FF >> (8 - nb));
    send_rx(b, 0, 0);
    bus_read(REG_STATUS, st);
    check(st[ST_RX_READY] && irq, "rx ready and irq");
    check((st & ST_ERR_MASK & ~(8'(1) << ST_UNDERRUN)) == 0, "no rx error");
    bus_read(REG_DATA, d);
    check(d == b, "rx data");
    bus_read(REG_STATUS, st);
    check(!st[ST_RX_READY], "rx ready cleared");
  endtask

  task automatic set_mode(input bit p, input bit o, input bit t, input logic [1:0] l = 2'd3);
    ctrl_t c;
    c = '0;
    c.tx_en = 1; c.rx_en = 1; c.parity_en = p; c.odd_even_parity = o; c.two_stop = t;
    c.char_len = l;
    while (txq.size() != 0) @(negedge clk);
    repeat (3 * BIT) @(negedge clk);
    pen = p; odd = o; two = t; clen = l; nb = int'(l) + 5;
    bus_write(REG_CONTROL, c);
    bus_write(REG_STATUS, 8'hFF);
  endtask

  initial begin
    logic [7:0] st, d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    bus_read(REG_STATUS, st);
    check(st == 8'h01, "status after reset");
    for (int m = 0; m < 6; m++) begin
      case (m)
        0: set_mode(0, 0, 0);
        1: set_mode(1, 0, 0);
        2: set_mode(1, 1, 0);
        3: set_mode(0, 0, 1);
        4: set_mode(1, 1, 0, 2'd2);   // 7 data bits, odd parity
        default: set_mode(0, 0, 0, 2'd0);  // 5 data bits
      endcase
      for (int i = 0; i < 3; i++) transmit(8'($urandom));
      transmit(8'b1000_0111);
      for (int i = 0; i < 3; i++) receive_check(8'($urandom));
    end
    while (txq.size() != 0) @(negedge clk);
    bus_read(REG_STATUS, st);
    check(st[ST_UNDERRUN], "underrun after the last character");
    // parity error
    set_mode(1, 0, 0);
    send_rx(8'h6B, 1, 0);
    bus_read(REG_STATUS, st);
    check(st[ST_PARITY] && !st[ST_FRAMING], "parity error bit");
    bus_read(REG_DATA, d);
    bus_write(REG_STATUS, 8'hFF);
    // framing error
    set_mode(0, 0, 0);
    send_rx(8'h6B, 0, 1);
    bus_read(REG_STATUS, st);
    check(st[ST_FRAMING], "framing error bit");
    bus_read(REG_DATA, d);
    bus_write(REG_STATUS, 8'hFF);
    // overrun
    send_rx(8'h01, 0, 0);
    send_rx(8'h02, 0, 0);
    bus_read(REG_STATUS, st);
    check(st[ST_OVERRUN] && st[ST_RX_READY], "overrun bit");
    bus_read(REG_DATA, d);
    check(d == 8'h01, "first character kept");
    check(frames == 24, "all frames transmitted");
    check(bit_time_bad == 0, "bit time is 16 receive ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
