// tb_hk_adc_if: checks the housekeeping ADC request sequence.
//
// A model of the PSU housekeeping ADC converts the multiplexer channel into a
// known value (channel x 3 + 7) some cycles after HK_CONV_START_N falls,
// raises HK_DATA_RDY and drives the data bus while HK_OE_N is low. For every
// HK ID the returned byte must match; the ADC must be awake (HK_SHUT_DOWN_N
// high) while converting and in nap between requests; the multiplexer must be
// settled SETTLE cycles before the convert pulse. A request with no data ready
// must end with 0x00 after the time-out.
module tb_hk_adc_if;
  localparam int SETTLE = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req, busy, done; logic [5:0] id; logic [7:0] data;
  logic [6:0] hk_mux_sel; logic hk_conv_start_n, hk_shut_down_n, hk_oe_n, hk_data_rdy;
  logic [7:0] bp_d_in;
  int checks = 0, failures = 0, mux_age = 0;
  bit adc_dead = 0;

  hk_adc_if #(.SETTLE(SETTLE), .WAIT_MAX(500)) dut (.*);

  // ADC model
  logic [6:0] mux_q;
  int conv_t = -1;
  always @(posedge clk) begin
    mux_q <= hk_mux_sel;
    mux_age <= (hk_mux_sel == mux_q) ? mux_age + 1 : 0;
    if (rst_n && !hk_conv_start_n && conv_t < 0 && !adc_dead) begin
      conv_t <= 37;
      checks++;
      if (!hk_shut_down_n || mux_age < SETTLE - 2) begin failures++; $display("convert while asleep or unsettled: sd=%b age=%0d t=%0t", hk_shut_down_n, mux_age, $time); end
    end else if (conv_t > 0) conv_t <= conv_t - 1;
    if (!hk_oe_n) conv_t <= -1;
  end
  assign hk_data_rdy = (conv_t == 0);
  assign bp_d_in = !hk_oe_n ? 8'(hk_mux_sel * 3 + 7) : 8'h00;

  initial begin
    req = 0; id = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      checks++; if (hk_shut_down_n) begin failures++; $display("not napping"); end
      req = 1; id = 6'(k); @(negedge clk); req = 0;
      while (!done) @(negedge clk);
      checks++; if (data != 8'(k * 3 + 7)) begin failures++; $display("id %0d got %h", k, data); end
    end
    adc_dead = 1;
    @(negedge clk); req = 1; id = 6'd5; @(negedge clk); req = 0;
    while (!done) @(negedge clk);
    checks++; if (data != 8'h00) begin failures++; $display("timeout data %h", data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
