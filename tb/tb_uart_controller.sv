// tb_uart_controller: self-checking test of uart_controller.
//
// A UART line model sends random bytes into rxd while the test writes other
// random bytes into the send port; both directions run at the same time. The
// test checks the bytes read from the receive FIFO and the bytes the line
// model decodes from txd, in order, and that no frame or overrun error occurs.
module tb_uart_controller;
  localparam int unsigned CLK_HZ = 1_600_000;
  localparam int unsigned BAUD   = 100_000;
  localparam int unsigned DIV    = CLK_HZ / BAUD;

  logic clk = 1'b0, rst = 1'b1;
  logic rxd, txd;
  logic rx_read = 1'b0, tx_write = 1'b0;
  logic [7:0] rx_data, tx_data = '0;
  logic rx_empty, tx_full, rx_frame_error, rx_overrun;
  int checks = 0, failures = 0, errs = 0;

  uart_controller #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(8)) dut (.*);
  uart_line #(.DIV(DIV)) line (.clk(clk), .tx(rxd), .rx(txd));

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && (rx_frame_error || rx_overrun)) errs++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] to_dut [$], from_dut [$], rx_got [$];

  initial begin
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 20; n++) begin
      to_dut.push_back(8'($urandom));
      from_dut.push_back(8'($urandom));
    end
    fork
      foreach (to_dut[i]) line.send(to_dut[i]);
      foreach (from_dut[i]) begin
        while (tx_full) @(posedge clk);
        #1 tx_write = 1'b1;
        tx_data = from_dut[i];
        @(posedge clk);
        #1 tx_write = 1'b0;
      end
      while (rx_got.size() < to_dut.size()) begin
        @(posedge clk);
        #1;
        if (!rx_empty) begin
          rx_got.push_back(rx_data);
          rx_read = 1'b1;
          @(posedge clk);
          #1 rx_read = 1'b0;
        end
      end
    join
    wait (line.got.size() == from_dut.size());
    foreach (to_dut[i]) check(rx_got[i] == to_dut[i], $sformatf("rx byte %0d", i));
    foreach (from_dut[i]) check(line.got[i] == from_dut[i], $sformatf("tx byte %0d", i));
    check(errs == 0, "no receive errors");
    check(line.stop_errors == 0, "tx stop bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
