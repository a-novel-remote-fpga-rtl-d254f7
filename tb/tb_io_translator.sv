// tb_io_translator: self-checking test of io_translator (checker + generator).
//
// Queues stand in for the UART FIFOs. Checks that switch commands reach the
// switch outputs, that a user-output change produces the matching command,
// that "VZ" received by the checker makes the generator send all 40 values
// again, and that nothing is read or sent while disabled.
module tb_io_translator;
  import io_pkg::*;
  localparam int unsigned CLK_HZ = 10_000;

  logic clk = 1'b0, rst = 1'b1, enable = 1'b0, hold = 1'b0;
  logic [7:0] rx_data, tx_data;
  logic rx_empty, rx_read, tx_write, gen_idle;
  logic tx_full = 1'b0;
  logic [3:0] an = 4'b1110;
  logic [7:0] seg = 8'hFF, led = 8'h00;
  logic [7:0] sw_state;
  logic [2:0] btn_state;
  int checks = 0, failures = 0;
  logic [7:0] rxq [$], txq [$];

  io_translator #(.CLK_HZ(CLK_HZ)) dut (.*);

  assign rx_empty = (rxq.size() == 0);
  assign rx_data  = rx_empty ? 8'h00 : rxq[0];

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (rx_read && !rx_empty) void'(rxq.pop_front());
    if (tx_write && !tx_full) txq.push_back(tx_data);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic push(input string s);
    for (int i = 0; i < s.len(); i++) rxq.push_back(s[i]);
  endtask

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    push("KU");
    repeat (500) @(posedge clk);
    check(rxq.size() == 2 && txq.size() == 0 && sw_state == 0, "idle while disabled");
    #1 enable = 1'b1;
    repeat (500) @(posedge clk);
    check(sw_state == 8'h04, $sformatf("slide switch 2 on: %02h", sw_state));
    check(txq.size() == 80, $sformatf("all 40 values sent: %0d chars", txq.size()));
    txq.delete();
    push("RUKu");
    #1 led[5] = 1'b1;
    repeat (500) @(posedge clk);
    check(sw_state == 8'h00 && btn_state == 3'b010, "switch commands applied");
    check(txq.size() == 2 && txq[0] == "4" && txq[1] == "F", "LED 5 on command");
    txq.delete();
    #1 seg[2] = 1'b0;                       // segment c of digit 0 lit
    repeat (500) @(posedge clk);
    check(txq.size() == 2 && txq[0] == "0" && txq[1] == "C", "segment command");
    txq.delete();
    push("VZ");
    repeat (500) @(posedge clk);
    check(txq.size() == 80, $sformatf("resend after VZ: %0d chars", txq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
