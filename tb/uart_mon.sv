// uart_mon: testbench-only serial line decoder (start, 8 data bits LSB first,
// stop). It samples each bit in its middle, DIV clocks per bit, and pulses
// valid for one clock with the received byte; frame_err counts missing stop bits.
module uart_mon #(
  parameter int DIV = 16
) (
  input  logic       clk,
  input  logic       line,
  output logic [7:0] data,
  output logic       valid,
  output int         frame_err
);
  initial begin
    valid = 0; data = 0; frame_err = 0;
    forever begin
      @(negedge clk);
      if (!line) begin
        repeat (DIV / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin repeat (DIV) @(negedge clk); data[i] = line; end
        repeat (DIV) @(negedge clk);
        if (!line) frame_err++;
        valid = 1; @(negedge clk); valid = 0;
      end
    end
  end
endmodule
