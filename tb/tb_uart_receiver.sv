// tb_uart_receiver: sends bytes over the serial line at 16 clocks per bit
// and checks that they land alternately in RA and RB, that the other
// register is untouched, that done_rx pulses exactly once per byte, and
// that done_rx comes within a few cycles of the end of the stop-bit centre.
module tb_uart_receiver;
  localparam int CLK_HZ = 1600, BAUD = 100, CPB = 16;
  logic clk = 1'b0, rst_n = 1'b0, rxd = 1'b1;
  logic [7:0] ra, rb;
  logic done_rx;
  int checks = 0, failures = 0;
  int pulses = 0, last_pulse = 0, cyc = 0;

  uart_receiver #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst_n, .rxd, .ra, .rb, .done_rx);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (done_rx) begin
      pulses <= pulses + 1;
      last_pulse <= cyc;
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd <= f[i];
      repeat (CPB) @(posedge clk);
    end
    repeat (CPB) @(posedge clk);
  endtask

  initial begin
    logic [7:0] b, exp_ra, exp_rb;
    int p0, start;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (4) @(posedge clk);
    #1;
    check(ra == 8'h00 && rb == 8'h00, "registers not 0 after reset");
    exp_ra = 8'h00;
    exp_rb = 8'h00;
    for (int k = 0; k < 10; k++) begin
      b  = 8'($urandom);
      p0 = pulses;
      start = cyc;
      send(b);
      #1;
      if (k % 2 == 0) exp_ra = b;
      else exp_rb = b;
      check(ra == exp_ra && rb == exp_rb,
            $sformatf("byte %0d=%02h: ra=%02h rb=%02h expected %02h %02h", k, b, ra, rb, exp_ra, exp_rb));
      check(pulses == p0 + 1, $sformatf("byte %0d: %0d done_rx pulses", k, pulses - p0));
      // stop-bit centre at 9.5 bits; +3 receiver, +2..4 controller
      check(last_pulse - start >= 9 * CPB + CPB / 2 + 4 && last_pulse - start <= 9 * CPB + CPB / 2 + 8,
            $sformatf("byte %0d: done_rx at %0d", k, last_pulse - start));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
