// tb_uart_receiver: self-checking test of uart_receiver.
//
// Drives 8N1 frames onto rxd at 16 clocks per bit, reads the FIFO and
// compares each byte with what was sent. Also checks: the time from a start
// edge until the byte is readable (9.5 to 10 bit periods), that a frame with
// a low stop bit is dropped and flagged, and that a byte arriving at a full
// FIFO is dropped and flagged while the bytes before it survive.
module tb_uart_receiver;
  localparam int unsigned CLK_HZ = 1_600_000;
  localparam int unsigned BAUD   = 100_000;
  localparam int unsigned DIV    = CLK_HZ / BAUD;
  localparam int unsigned DEPTH  = 4;

  logic clk = 1'b0, rst = 1'b1, rxd = 1'b1, rd_en = 1'b0;
  logic [7:0] rd_data;
  logic empty, frame_error, overrun;
  int checks = 0, failures = 0;
  int frame_errors = 0, overruns = 0;

  uart_receiver #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (frame_error) frame_errors++;
    if (overrun) overruns++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send_frame(input logic [7:0] b, input logic stop = 1'b1);
    rxd = 1'b0;
    repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (DIV) @(posedge clk);
    end
    rxd = stop;
    repeat (DIV) @(posedge clk);
    rxd = 1'b1;
    repeat (2) @(posedge clk);
  endtask

  task automatic pop_expect(input logic [7:0] b);
    check(!empty, $sformatf("byte %02h missing", b));
    check(rd_data == b, $sformatf("got %02h, expected %02h", rd_data, b));
    rd_en = 1'b1;
    @(posedge clk);
    #1 rd_en = 1'b0;
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int t0, t1;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    repeat (4) @(posedge clk);
    check(empty, "FIFO empty after reset");

    // latency of one byte
    fork
      send_frame(8'hA5);
      begin
        t0 = 0;
        while (empty) begin
          @(posedge clk);
          t0++;
        end
      end
    join
    check(t0 >= (DIV * 19) / 2 && t0 <= DIV * 10 + 4,
          $sformatf("byte readable %0d clocks after the start edge", t0));
    #1 pop_expect(8'hA5);
    check(empty, "FIFO empty after one byte");

    // random bytes, read as they come
    for (int n = 0; n < 40; n++) begin
      b = 8'($urandom);
      send_frame(b);
      #1 pop_expect(b);
    end

    // bad stop bit
    t1 = frame_errors;
    send_frame(8'h3C, 1'b0);
    repeat (DIV) @(posedge clk);
    check(frame_errors == t1 + 1, "frame error flagged");
    check(empty, "bad frame dropped");

    // overrun
    for (int n = 0; n < DEPTH + 1; n++) send_frame(8'(8'h40 + n));
    check(overruns == 1, "overrun flagged once");
    for (int n = 0; n < DEPTH; n++) #1 pop_expect(8'(8'h40 + n));
    check(empty, "overrun byte dropped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
