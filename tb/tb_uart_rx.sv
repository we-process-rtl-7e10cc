// tb_uart_rx: self-checking test of the serial receiver.
//
// Runs the receiver at 16 clocks per bit. A bit-banging task sends frames
// (start 0, 8 data bits LSB first, stop bit chosen by the caller). Checks:
// the byte and done after a good frame, the latency from the start-bit edge
// to done (CLKS_PER_BIT/2 + 9*CLKS_PER_BIT + 3 clock edges), that done holds
// until the next er, that an unarmed receiver ignores a frame, that a frame
// with a 0 stop bit is dropped, and that a short low glitch is not taken as
// a start bit.
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 1'b0, rst_n = 1'b0, rx = 1'b1, er = 1'b0;
  logic [7:0] data;
  logic done;
  int checks = 0, failures = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx, .er, .data, .done);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Sends one frame; returns the number of clock edges from the start-bit
  // edge until done was seen high (or -1 if it never rose during the frame).
  task automatic send(input logic [7:0] b, input logic stop, output int lat);
    logic [9:0] f;
    f   = {stop, b, 1'b0};
    lat = -1;
    for (int i = 0; i < 10; i++) begin
      rx <= f[i];
      for (int c = 0; c < CPB; c++) begin
        @(posedge clk);
        #1;
        if (done && lat < 0) lat = i * CPB + c + 1;
      end
    end
    rx <= 1'b1;
    for (int c = 0; c < CPB; c++) begin
      @(posedge clk);
      #1;
      if (done && lat < 0) lat = 10 * CPB + c + 1;
    end
  endtask

  task automatic arm();
    @(posedge clk);
    er <= 1'b1;
    @(posedge clk);
    er <= 1'b0;
    #1;
  endtask

  initial begin
    int lat;
    logic [7:0] b;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    // not armed: a frame is ignored
    send(8'h5A, 1'b1, lat);
    check(!done, "unarmed receiver raised done");
    // good frames with latency check
    for (int k = 0; k < 12; k++) begin
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : 8'($urandom);
      arm();
      check(!done, "er did not clear done");
      send(b, 1'b1, lat);
      check(done, $sformatf("done missing for %02h", b));
      check(data == b, $sformatf("data %02h expected %02h", data, b));
      check(lat == CPB / 2 + 9 * CPB + 3, $sformatf("latency %0d expected %0d", lat, CPB / 2 + 9 * CPB + 3));
      repeat (5) @(posedge clk);
      #1;
      check(done && data == b, "done/data not held");
    end
    // framing error: stop bit 0 -> dropped, stays armed
    arm();
    send(8'hC3, 1'b0, lat);
    check(!done, "frame with bad stop bit accepted");
    repeat (2 * CPB) @(posedge clk);
    send(8'h3C, 1'b1, lat);
    check(done && data == 8'h3C, "receiver not re-armed after framing error");
    // glitch shorter than half a bit is rejected
    arm();
    rx <= 1'b0;
    repeat (CPB / 4) @(posedge clk);
    rx <= 1'b1;
    repeat (12 * CPB) @(posedge clk);
    #1;
    check(!done, "glitch taken as a frame");
    send(8'h81, 1'b1, lat);
    check(done && data == 8'h81, "frame after glitch lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
