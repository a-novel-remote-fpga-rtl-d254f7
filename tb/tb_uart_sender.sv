// tb_uart_sender: self-checking test of uart_sender.
//
// Writes bytes into the sender and decodes txd with an independent 8N1
// receiver that samples each bit at its middle. Checks the decoded bytes and
// their order, the stop bits, that back-to-back frames start exactly 10 bit
// periods apart (full line rate), and that full rises once the FIFO holds
// FIFO_DEPTH bytes.
module tb_uart_sender;
  localparam int unsigned CLK_HZ = 1_600_000;
  localparam int unsigned BAUD   = 100_000;
  localparam int unsigned DIV    = CLK_HZ / BAUD;
  localparam int unsigned DEPTH  = 4;

  logic clk = 1'b0, rst = 1'b1, wr_en = 1'b0;
  logic [7:0] wr_data = '0;
  logic full, txd, busy;
  int checks = 0, failures = 0;
  logic [7:0] got [$];
  int starts [$];
  int cycle = 0;

  uart_sender #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // line decoder
  initial begin
    logic [7:0] b;
    @(negedge rst);
    forever begin
      @(posedge clk);
      if (txd == 1'b0) begin
        starts.push_back(cycle);
        repeat (DIV / 2) @(posedge clk);
        check(txd == 1'b0, "start bit held");
        for (int i = 0; i < 8; i++) begin
          repeat (DIV) @(posedge clk);
          b[i] = txd;
        end
        repeat (DIV) @(posedge clk);
        check(txd == 1'b1, "stop bit high");
        got.push_back(b);
        repeat (DIV / 2 - 2) @(posedge clk);
      end
    end
  end

  task automatic write_byte(input logic [7:0] b);
    while (full) @(posedge clk);
    #1 wr_en = 1'b1;
    wr_data = b;
    @(posedge clk);
    #1 wr_en = 1'b0;
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sent [$];
    logic [7:0] b;
    automatic int saw_full = 0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    repeat (4) @(posedge clk);
    check(txd == 1'b1, "line idles high");
    // a burst larger than the FIFO: writer waits on full
    for (int n = 0; n < 30; n++) begin
      b = 8'($urandom);
      sent.push_back(b);
      if (full) saw_full++;
      while (full) begin
        @(posedge clk);
        saw_full++;
      end
      write_byte(b);
    end
    check(saw_full > 0, "full seen during a burst");
    wait (got.size() == sent.size());
    repeat (2 * DIV) @(posedge clk);
    check(got.size() == sent.size(), "byte count");
    foreach (sent[i]) check(got[i] == sent[i], $sformatf("byte %0d: %02h vs %02h", i, got[i], sent[i]));
    for (int i = 1; i < starts.size(); i++)
      check(starts[i] - starts[i-1] == 10 * DIV,
            $sformatf("frame spacing %0d clocks", starts[i] - starts[i-1]));
    check(!busy && txd, "idle after the burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
