// tb_uart_spi_top: end-to-end test of the UART-to-SPI converter at its
// default parameters (50 MHz clock, 115200 baud, SCK = clk/8, 4 slaves).
//
// The testbench is the host on the serial line and four SPI slave models on
// the bus. For every frame format (8N1, even parity, odd parity, two stop
// bits) and every SPI mode (CPOL/CPHA), it sends select/data pairs to every
// slave and checks that the slave received the data byte, that only that
// slave was selected, and that the host got the slave's reply byte back,
// correctly framed, within a bounded time. It also sends a character with a
// bad parity bit, one with a bad stop bit, a break and a short glitch, and
// checks that the converter drops or ignores them and carries on. Finally
// eight pairs are sent back to back with no pause between characters.
// Each mechanism is counted; one that never happens is a failure.
// Overrun cannot occur here: the controller empties the receive buffer well
// within one character time, so the test checks it never does.
module tb_uart_spi_top;
  localparam int DIV = 27;               // (50 MHz + 921600) / 1843200
  localparam int BIT = 16 * DIV;         // clocks per bit
  localparam int N_SS = 4;

  logic clk = 0, rst_n = 0;
  logic cfg_parity_en = 0, cfg_odd_even_parity = 0, cfg_two_stop = 0;
  logic cpol = 0, cpha = 0;
  logic rxd = 1, txd, sclk, mosi, miso, irq, dropped, spi_busy;
  int n_busy_clks = 0;
  logic [N_SS-1:0] ss_n;

  logic [7:0] reply [N_SS];
  logic [7:0] last_rx [N_SS];
  logic [N_SS-1:0] s_miso, s_oe;
  int s_count [N_SS];
  int s_err [N_SS];

  int checks = 0, failures = 0, cyc = 0;
  byte unsigned hostq[$];
  int host_frames = 0;
  int n_pairs = 0, n_parity_drop = 0, n_frame_drop = 0, n_break = 0, n_glitch = 0;
  int n_dropped = 0, n_underrun = 0, n_overrun = 0, n_mode_switch = 0, n_cfg_switch = 0;
  int n_parity_even = 0, n_parity_odd = 0, n_two_stop = 0, n_burst_pairs = 0;
  int n_mode[4];
  int last_stop_cyc = 0, worst_latency = 0;

  uart_spi_top dut (.*);

  for (genvar g = 0; g < N_SS; g++) begin : g_slave
    spi_slave_model #(.WIDTH(8)) u_slave (
      .sclk(sclk), .mosi(mosi), .ss_n(ss_n[g]), .cpol(cpol), .cpha(cpha),
      .reply(reply[g]), .miso(s_miso[g]), .miso_oe(s_oe[g]),
      .last_rx(last_rx[g]), .count(s_count[g]), .errors(s_err[g]));
  end

  always_comb begin
    miso = 1'b0;
    for (int i = 0; i < N_SS; i++) if (s_oe[i]) miso = s_miso[i];
  end

  always #10 clk = !clk;   // 50 MHz
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dropped) n_dropped <= n_dropped + 1;
      if (spi_busy) n_busy_clks <= n_busy_clks + 1;
      if (dut.u_uart.underrun) n_underrun <= n_underrun + 1;
      if (dut.u_uart.overrun) n_overrun <= n_overrun + 1;
      if (dut.u_uart.brk) n_break <= n_break + 1;
    end
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
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

  // Host receiver: decodes txd and checks the framing and bit time.
  initial begin : host_rx
    logic [7:0] d;
    @(posedge rst_n);
    forever begin
      @(negedge txd);
      check(cyc - last_stop_cyc < BIT + 150, "reply latency");
      if (cyc - last_stop_cyc > worst_latency) worst_latency = cyc - last_stop_cyc;
      repeat (BIT / 2) @(posedge clk);
      check(txd == 1'b0, "reply start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        d[i] = txd;
      end
      if (cfg_parity_en) begin
        repeat (BIT) @(posedge clk);
        check(txd == ((^d) ^ cfg_odd_even_parity), "reply parity bit");
      end
      repeat (BIT) @(posedge clk);
      check(txd == 1'b1, "reply stop bit");
      if (cfg_two_stop) begin
        repeat (BIT) @(posedge clk);
        check(txd == 1'b1, "reply second stop bit");
      end
      check(hostq.size() > 0, "unexpected reply");
      if (hostq.size() > 0) check(d == hostq.pop_front(), "reply byte");
      host_frames++;
    end
  end

  // Host transmitter.
  task automatic host_send(input logic [7:0] d, input bit bad_par, input bit bad_stop);
    @(negedge clk);
    rxd = 0;
    repeat (BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = d[i];
      repeat (BIT) @(negedge clk);
    end
    if (cfg_parity_en) begin
      rxd = (^d) ^ cfg_odd_even_parity ^ bad_par;
      repeat (BIT) @(negedge clk);
    end
    rxd = !bad_stop;
    repeat (BIT / 2) @(negedge clk);
    last_stop_cyc = cyc;
    repeat (BIT - BIT / 2) @(negedge clk);
    rxd = 1;
    if (cfg_two_stop) repeat (BIT) @(negedge clk);
  endtask

  task automatic wait_replies();
    while (hostq.size() != 0) @(negedge clk);
    repeat (2 * BIT) @(negedge clk);
  endtask

  task automatic pair(input int s, input logic [7:0] d);
    int cnt0[N_SS];
    for (int i = 0; i < N_SS; i++) cnt0[i] = s_count[i];
    reply[s] = 8'($urandom);
    hostq.push_back(reply[s]);
    host_send(8'(s), 0, 0);
    host_send(d, 0, 0);
    wait_replies();
    check(last_rx[s] == d, "slave received the data byte");
    for (int i = 0; i < N_SS; i++)
      check(s_count[i] == cnt0[i] + int'(i == s), "only the addressed slave exchanged");
    n_pairs++;
  endtask

  task automatic set_uart(input bit p, input bit o, input bit t);
    wait_replies();
    if ({cfg_parity_en, cfg_odd_even_parity, cfg_two_stop} != {p, o, t}) n_cfg_switch++;
    cfg_parity_en = p; cfg_odd_even_parity = o; cfg_two_stop = t;
    repeat (100) @(negedge clk);
  endtask

  initial begin
    int d0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    check(txd == 1'b1 && ss_n == '1, "idle after reset");
    // all SPI modes, all slaves, 8N1
    for (int m = 0; m < 4; m++) begin
      if ({cpol, cpha} != 2'(m)) n_mode_switch++;
      cpol = m[1]; cpha = m[0];
      repeat (10) @(negedge clk);
      for (int s = 0; s < N_SS; s++) begin
        pair(s, 8'($urandom));
        n_mode[m]++;
      end
    end
    // frame formats
    set_uart(1, 0, 0);
    for (int s = 0; s < N_SS; s++) begin pair(s, 8'($urandom)); n_parity_even++; end
    pair(1, 8'b1000_0111);
    set_uart(1, 1, 0);
    for (int s = 0; s < N_SS; s++) begin pair(s, 8'($urandom)); n_parity_odd++; end
    set_uart(0, 0, 1);
    for (int s = 0; s < N_SS; s++) begin pair(s, 8'($urandom)); n_two_stop++; end
    // a character with a bad parity bit is dropped; the pair continues
    set_uart(1, 0, 0);
    d0 = n_dropped;
    reply[3] = 8'h5E;
    hostq.push_back(8'h5E);
    host_send(8'd3, 0, 0);
    host_send(8'h99, 1, 0);
    repeat (BIT) @(negedge clk);
    check(n_dropped == d0 + 1, "byte with parity error dropped");
    n_parity_drop += n_dropped - d0;
    host_send(8'h66, 0, 0);
    wait_replies();
    check(last_rx[3] == 8'h66, "pair completes after parity error");
    // a character with a bad stop bit is dropped
    set_uart(0, 0, 0);
    d0 = n_dropped;
    host_send(8'h24, 0, 1);
    repeat (2 * BIT) @(negedge clk);
    check(n_dropped == d0 + 1, "byte with framing error dropped");
    n_frame_drop += n_dropped - d0;
    pair(0, 8'h81);
    // break: line low for two character times
    d0 = n_dropped;
    @(negedge clk);
    rxd = 0;
    repeat (20 * BIT) @(negedge clk);
    rxd = 1;
    repeat (3 * BIT) @(negedge clk);
    check(n_dropped == d0 + 1, "break dropped");
    pair(2, 8'h18);
    // glitch shorter than half a bit is ignored
    d0 = n_dropped;
    @(negedge clk);
    rxd = 0;
    repeat (BIT / 4) @(negedge clk);
    rxd = 1;
    repeat (12 * BIT) @(negedge clk);
    check(n_dropped == d0 && !dut.u_uart.rbr_full, "glitch ignored");
    n_glitch++;
    pair(1, 8'h7E);
    // eight pairs back to back, host never pausing: no reply lost, no overrun
    begin
      logic [7:0] bd[8];
      int cnt0[N_SS];
      for (int i = 0; i < N_SS; i++) cnt0[i] = s_count[i];
      for (int k = 0; k < 8; k++) begin
        bd[k] = 8'($urandom);
        reply[k % N_SS] = 8'($urandom);
        hostq.push_back(reply[k % N_SS]);
        host_send(8'(k % N_SS), 0, 0);
        host_send(bd[k], 0, 0);
        n_burst_pairs++;
      end
      wait_replies();
      for (int i = 0; i < N_SS; i++) check(s_count[i] == cnt0[i] + 2, "burst exchanges per slave");
      for (int i = 0; i < N_SS; i++) check(last_rx[i] == bd[4 + i], "burst data reached the slaves");
    end
    // every mechanism happened
    check(n_pairs == 32, "pairs completed");
    check(host_frames == 41, "replies received");
    check(n_burst_pairs == 8, "back-to-back pairs");
    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, "SPI mode used");
    check(n_mode_switch >= 3, "SPI mode switches");
    check(n_cfg_switch >= 4, "UART format switches");
    check(n_parity_even > 0 && n_parity_odd > 0 && n_two_stop > 0, "frame formats used");
    check(n_parity_drop > 0, "parity error happened");
    check(n_frame_drop > 0, "framing error happened");
    check(n_break == 1, "break happened");
    check(n_glitch > 0, "glitch happened");
    check(n_underrun > 0, "transmitter underrun happened");
    check(n_overrun == 0, "no overrun");
    // 41 exchanges (32 pairs, the one after the parity error and 8 in the
    // burst) of 18 * SCK_DIV busy clocks each, SCK_DIV = 4
    check(n_busy_clks == 41 * 72, "SPI busy time");
    for (int i = 0; i < N_SS; i++) check(s_err[i] == 0, "SPI protocol errors");
    $display("pairs=%0d replies=%0d parity_drop=%0d frame_drop=%0d break=%0d glitch=%0d underrun=%0d overrun=%0d mode_switch=%0d cfg_switch=%0d worst_latency=%0d clocks",
             n_pairs, host_frames, n_parity_drop, n_frame_drop, n_break, n_glitch, n_underrun,
             n_overrun, n_mode_switch, n_cfg_switch, worst_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
