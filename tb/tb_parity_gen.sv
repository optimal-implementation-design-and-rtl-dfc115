// tb_parity_gen: exhaustive check of the parity generator.
// Every 8-bit value on both inputs, for even and odd parity, is compared
// with a parity counted bit by bit in the testbench. Also replays the
// values of the reference waveform: 8'b10000111 (four ones) gives parity 0
// with even parity.
module tb_parity_gen;
  logic [7:0] din_tx, din_rx;
  logic       odd_even_parity, parity_tx, parity_rx;
  int checks = 0, failures = 0;

  parity_gen dut (.*);

  function automatic logic ref_parity(input logic [7:0] d, input logic odd);
    int ones = 0;
    for (int i = 0; i < 8; i++) ones += d[i];
    return odd ? ((ones % 2) == 0) : ((ones % 2) == 1);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 256; v++) begin
        odd_even_parity = m[0];
        din_tx = 8'(v);
        din_rx = 8'(255 - v);
        #1;
        checks += 2;
        if (parity_tx !== ref_parity(din_tx, odd_even_parity)) failures++;
        if (parity_rx !== ref_parity(din_rx, odd_even_parity)) failures++;
      end
    end
    odd_even_parity = 1'b0;
    din_tx = 8'b1000_0111;
    din_rx = 8'b0000_0011;
    #1;
    checks += 2;
    if (parity_tx !== 1'b0) failures++;
    if (parity_rx !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
