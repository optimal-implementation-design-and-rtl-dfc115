// tb_spi_master: self-checking test of the SPI master with four slave models.
// For each of the four CPOL/CPHA modes and each slave, random words are
// exchanged; the test checks the word the master received (the slave's
// reply), the word the slave received, that only the addressed select line
// went low, the SCK half period (SCK_DIV clocks), the idle level of SCK and
// the time from start to done (18 * SCK_DIV + 1 clocks). A second master
// with 16-bit words and one slave checks the word width parameter in all
// four modes (34 * SCK_DIV + 1 clocks per exchange).
module tb_spi_master;
  localparam int N_SS = 4;
  localparam int SCK_DIV = 3;

  logic clk = 0, rst_n = 0;
  logic cpol = 0, cpha = 0, start = 0;
  logic [1:0] ss_sel = 0;
  logic [7:0] tx_data = 0, rx_data;
  logic busy, done, sclk, mosi, miso;
  logic [N_SS-1:0] ss_n;
  logic [7:0] reply [N_SS];
  logic [7:0] last_rx [N_SS];
  logic [N_SS-1:0] s_miso, s_oe;
  int s_count [N_SS];
  int s_err [N_SS];
  int checks = 0, failures = 0, cyc = 0, last_edge = -1, bad_half = 0;
  logic sclk_q = 0;

  spi_master #(.WIDTH(8), .N_SS(N_SS), .SCK_DIV(SCK_DIV)) dut (.*);

  for (genvar g = 0; g < N_SS; g++) begin : g_slave
    spi_slave_model #(.WIDTH(8)) u_slave (
      .sclk(sclk), .mosi(mosi), .ss_n(ss_n[g]), .cpol(cpol), .cpha(cpha),
      .reply(reply[g]), .miso(s_miso[g]), .miso_oe(s_oe[g]),
      .last_rx(last_rx[g]), .count(s_count[g]), .errors(s_err[g]));
  end

  // 16-bit master and slave
  logic        start16 = 0;
  logic [15:0] tx16 = 0, rx16, reply16 = 0, last16;
  logic        busy16, done16, sclk16, mosi16, miso16, oe16;
  logic        ss16_n;
  int          cnt16, err16;

  spi_master #(.WIDTH(16), .N_SS(1), .SCK_DIV(SCK_DIV)) dut16 (
    .clk(clk), .rst_n(rst_n), .cpol(cpol), .cpha(cpha), .start(start16), .ss_sel(1'b0),
    .tx_data(tx16), .rx_data(rx16), .busy(busy16), .done(done16), .sclk(sclk16),
    .mosi(mosi16), .miso(miso16), .ss_n(ss16_n));

  spi_slave_model #(.WIDTH(16)) u_slave16 (
    .sclk(sclk16), .mosi(mosi16), .ss_n(ss16_n), .cpol(cpol), .cpha(cpha), .reply(reply16),
    .miso(miso16), .miso_oe(oe16), .last_rx(last16), .count(cnt16), .errors(err16));

  task automatic xfer16(input logic [15:0] d);
    int t0;
    reply16 = 16'($urandom);
    @(negedge clk);
    tx16 = d;
    start16 = 1;
    t0 = cyc;
    @(negedge clk);
    start16 = 0;
    while (!done16) @(negedge clk);
    check(cyc - t0 == 34 * SCK_DIV + 1, "16-bit start-to-done latency");
    check(rx16 == reply16, "16-bit word from the slave");
    check(last16 == d, "16-bit word to the slave");
  endtask

  always_comb begin
    miso = 1'b0;
    for (int i = 0; i < N_SS; i++) if (s_oe[i]) miso = s_miso[i];
  end

  always #5 clk = !clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sclk_q <= sclk;
    if (rst_n && busy && sclk != sclk_q) begin
      if (last_edge >= 0 && !(ss_n == '1) && (cyc - last_edge) != SCK_DIV) bad_half <= bad_half + 1;
      last_edge <= cyc;
    end
    if (!busy) last_edge <= -1;
  end

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic xfer(input int s, input logic [7:0] d);
    int t0, lowseen, cnt0[N_SS];
    logic [N_SS-1:0] other_low;
    for (int i = 0; i < N_SS; i++) cnt0[i] = s_count[i];
    reply[s] = 8'($urandom);
    @(negedge clk);
    check(sclk == cpol, "SCK idles at CPOL");
    ss_sel = 2'(s);
    tx_data = d;
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    other_low = '0;
    lowseen = 0;
    while (!done) begin
      for (int i = 0; i < N_SS; i++) if (i != s && !ss_n[i]) other_low[i] = 1'b1;
      if (!ss_n[s]) lowseen = 1;
      @(negedge clk);
    end
    check(cyc - t0 == 18 * SCK_DIV + 1, "start-to-done latency");
    check(lowseen == 1 && other_low == '0, "only the addressed slave selected");
    check(rx_data == reply[s], "master received the slave word");
    check(last_rx[s] == d, "slave received the master word");
    for (int i = 0; i < N_SS; i++)
      check(s_count[i] == cnt0[i] + int'(i == s), "word counts");
    check(ss_n == '1, "select released");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      cpol = m[1];
      cpha = m[0];
      repeat (4) @(negedge clk);
      for (int s = 0; s < N_SS; s++) begin
        xfer(s, 8'($urandom));
        xfer(s, 8'hA5);
      end
      xfer16(16'($urandom));
      xfer16(16'hC3A5);
    end
    check(bad_half == 0, "SCK half period");
    for (int i = 0; i < N_SS; i++) check(s_err[i] == 0, "slave protocol errors");
    check(cnt16 == 8 && err16 == 0, "16-bit exchanges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
