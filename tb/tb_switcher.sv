// tb_switcher: self-checking test of the switcher.
//
// A queue stands in for the receive FIFO and another for the sender. The test
// checks: pass mode after reset with the switcher draining the FIFO; that a
// 'V' followed by something other than 'X' does nothing; that "VX" makes it
// write the two response characters (with the sender randomly full) and then
// enter translate mode; and that a later "VX" in translate mode raises hold
// but waits for the generator to be idle before taking the sender.
module tb_switcher;
  import io_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] rx_data, sw_tx_data;
  logic rx_empty, rx_pop, sw_rx_read, sw_tx_write, own_tx, hold;
  logic tx_full = 1'b0, gen_idle = 1'b1, tr_read = 1'b0;
  mode_e mode;
  int checks = 0, failures = 0;
  logic [7:0] rxq [$], txq [$];

  switcher #(.RESPONSE("VN")) dut (.*);

  assign rx_empty = (rxq.size() == 0);
  assign rx_data  = rx_empty ? 8'h00 : rxq[0];
  assign rx_pop   = ((mode == MODE_PASS) ? sw_rx_read : tr_read) && !rx_empty;

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (rx_pop) void'(rxq.pop_front());
    if (sw_tx_write && !tx_full) txq.push_back(sw_tx_data);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(mode == MODE_PASS, "pass mode after reset");
    check(own_tx && !hold, "switcher owns the sender in pass mode");

    // characters that are not a request
    begin
      automatic string noise = "ABVQ4a";
      for (int i = 0; i < noise.len(); i++) rxq.push_back(noise[i]);
    end
    repeat (10) @(posedge clk);
    check(rxq.size() == 0, "switcher drains the FIFO in pass mode");
    check(txq.size() == 0 && mode == MODE_PASS, "no response without VX");

    // the request, with the sender full now and then
    rxq.push_back("V");
    rxq.push_back("X");
    fork
      repeat (60) begin
        @(posedge clk);
        #1 tx_full = $urandom_range(0, 1);
      end
    join
    tx_full = 1'b0;
    repeat (3) @(posedge clk);
    check(txq.size() == 2, $sformatf("two response characters, got %0d", txq.size()));
    if (txq.size() == 2) check(txq[0] == "V" && txq[1] == "N", "response text");
    check(mode == MODE_TRANSLATE, "translate mode after the response");
    check(!own_tx && !hold, "sender released");
    txq.delete();

    // a later request while the generator is mid-command
    #1 gen_idle = 1'b0;
    tr_read = 1'b1;
    rxq.push_back("V");
    rxq.push_back("X");
    repeat (4) @(posedge clk);
    #1;
    check(hold, "hold raised");
    check(!own_tx && txq.size() == 0, "waits for the generator");
    repeat (10) @(posedge clk);
    #1 gen_idle = 1'b1;
    repeat (4) @(posedge clk);
    #1;
    check(txq.size() == 2 && txq[0] == "V" && txq[1] == "N", "second response");
    check(!hold && mode == MODE_TRANSLATE, "still translating");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
