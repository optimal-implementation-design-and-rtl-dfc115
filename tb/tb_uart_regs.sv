// tb_uart_regs: self-checking test of the control and status registers.
// Drives the bus and the event inputs directly and checks: control reset
// value and read-back, DATA write -> tx_load with the byte, DATA read ->
// RBR contents and rx_read, live status bits, each sticky error bit set by
// its one-clock event, held, and cleared only by writing 1 to it, and irq.
module tb_uart_regs;
  import uart_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] addr = 0;
  logic wr = 0, rd = 0;
  logic [7:0] wdata = 0, rdata, tx_data, rbr = 0;
  logic irq, tx_load, rx_read;
  ctrl_t ctrl;
  logic tbr_empty = 1, tx_busy = 0, underrun = 0, rbr_full = 0;
  logic overrun = 0, frame_err = 0, parity_err = 0, brk = 0;
  int checks = 0, failures = 0;

  uart_regs dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  task automatic pulse(ref logic s);
    @(negedge clk);
    s = 1;
    @(negedge clk);
    s = 0;
  endtask

  initial begin
    logic [7:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    bus_read(REG_CONTROL, d);
    check(d == 8'h63, "control reset value");
    check(ctrl.tx_en && ctrl.rx_en && !ctrl.parity_en && ctrl.char_len == 2'd3,
          "control fields after reset");
    bus_write(REG_CONTROL, 8'h3D);
    bus_read(REG_CONTROL, d);
    check(d == 8'h3D, "control read-back");
    check(ctrl.tx_en && !ctrl.rx_en && ctrl.parity_en && ctrl.odd_even_parity && ctrl.two_stop &&
          ctrl.char_len == 2'd1,
          "control fields");
    // data write reaches the transmitter
    @(negedge clk);
    addr = REG_DATA; wdata = 8'h5C; wr = 1;
    #1 check(tx_load && tx_data == 8'h5C, "tx_load with byte");
    @(negedge clk);
    wr = 0;
    #1 check(!tx_load, "tx_load one clock");
    // data read returns the RBR
    rbr = 8'hE1; rbr_full = 1;
    @(negedge clk);
    addr = REG_DATA; rd = 1;
    #1 check(rdata == 8'hE1 && rx_read, "RBR read");
    @(negedge clk);
    rd = 0;
    // live status bits
    tbr_empty = 0; tx_busy = 1; rbr_full = 1;
    bus_read(REG_STATUS, d);
    check(d == 8'h06, "live status bits");
    check(irq, "irq with character waiting");
    tbr_empty = 1; tx_busy = 0; rbr_full = 0;
    bus_read(REG_STATUS, d);
    check(d == 8'h01, "status idle");
    check(!irq, "irq low when idle");
    // sticky bits one by one
    pulse(overrun);
    pulse(frame_err);
    pulse(parity_err);
    pulse(brk);
    pulse(underrun);
    repeat (3) @(negedge clk);
    bus_read(REG_STATUS, d);
    check(d == 8'hF9, "all sticky bits set and held");
    check(irq, "irq on error");
    bus_write(REG_STATUS, 8'h30);  // clear framing and parity
    bus_read(REG_STATUS, d);
    check(d == 8'hC9, "write 1 clears only those bits");
    bus_write(REG_STATUS, 8'h00);
    bus_read(REG_STATUS, d);
    check(d == 8'hC9, "write 0 clears nothing");
    bus_write(REG_STATUS, 8'hFF);
    bus_read(REG_STATUS, d);
    check(d == 8'h01, "all cleared");
    // an event in the same clock as the clear wins
    @(negedge clk);
    addr = REG_STATUS; wdata = 8'hF8; wr = 1; overrun = 1;
    @(negedge clk);
    wr = 0; overrun = 0;
    bus_read(REG_STATUS, d);
    check(d[ST_OVERRUN], "event during clear is kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
