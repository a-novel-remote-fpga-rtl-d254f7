// uart_line: testbench model of the far end of a UART link (8N1).
//
// send(b) drives one frame onto tx, DIV clocks per bit. A decoder watches rx,
// samples each bit at its middle and appends the byte to `got`, its start
// clock to `starts`, and counts bad stop bits in `stop_errors`. Used in place
// of the remote controller board and its relay software.
module uart_line #(
  parameter int unsigned DIV = 16
) (
  input  logic clk,
  output logic tx,
  input  logic rx
);
  logic [7:0]  got [$];
  longint      starts [$];
  int          stop_errors = 0;
  longint      cycle = 0;

  initial tx = 1'b1;

  always @(posedge clk) cycle++;

  task automatic send(input logic [7:0] b);
    tx = 1'b0;
    repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      tx = b[i];
      repeat (DIV) @(posedge clk);
    end
    tx = 1'b1;
    repeat (DIV) @(posedge clk);
  endtask

  task automatic send_str(input string s);
    for (int i = 0; i < s.len(); i++) send(s[i]);
  endtask

  initial begin
    logic [7:0] b;
    // let the line settle before decoding
    repeat (4) @(posedge clk);
    forever begin
      @(posedge clk);
      if (rx == 1'b0) begin
        starts.push_back(cycle);
        repeat (DIV / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (DIV) @(posedge clk);
          b[i] = rx;
        end
        repeat (DIV) @(posedge clk);
        if (rx != 1'b1) stop_errors++;
        got.push_back(b);
        repeat (DIV / 2 - 2) @(posedge clk);
      end
    end
  end
endmodule
