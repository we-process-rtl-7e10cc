// tb_proc_fsm: checks the processor controller's output sequence.
//
// For every opcode, a one-cycle E pulse must produce, one state per clock:
// S2 (SM=00, R load), S3 (SM=00), S4a (SM=01, EALU), S4b (SM=01, EU) only
// for opcodes 0100/0101, S5 (SM=10), S6 (SM=10, Eout), S7 (SM=10, Done,
// display load), then back to idle. Also checks that S7 is held while E
// stays high and that nothing starts without E.
module tb_proc_fsm;
  logic clk = 1'b0, rst_n = 1'b0, e = 1'b0;
  logic [3:0] ir = 4'h0;
  logic [1:0] sm;
  logic r_en, ealu, eu, eout, disp_en, done;
  int checks = 0, failures = 0;

  proc_fsm dut (.clk, .rst_n, .e, .ir, .sm, .r_en, .ealu, .eu, .eout, .disp_en, .done);

  always #5 clk = ~clk;

  // expected {sm, r_en, ealu, eu, eout, disp_en, done}
  task automatic expect_out(input logic [7:0] ex, input string st);
    checks++;
    if ({sm, r_en, ealu, eu, eout, disp_en, done} != ex) begin
      failures++;
      $display("FAIL: %s ir=%h got %08b expected %08b", st, ir, {sm, r_en, ealu, eu, eout, disp_en, done}, ex);
    end
  endtask

  initial begin
    logic mul;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    #1;
    expect_out(8'b10_000000, "idle");
    for (int k = 0; k < 20; k++) begin
      ir  = 4'(k);
      mul = (ir == 4'h4) || (ir == 4'h5);
      e   = 1'b1;
      @(posedge clk); #1; e = (k >= 16);  // for k >= 16 hold E high
      expect_out(8'b00_100000, "S2");
      @(posedge clk); #1;
      expect_out(8'b00_000000, "S3");
      @(posedge clk); #1;
      expect_out(8'b01_010000, "S4a");
      if (mul) begin
        @(posedge clk); #1;
        expect_out(8'b01_001000, "S4b");
      end
      @(posedge clk); #1;
      expect_out(8'b10_000000, "S5");
      @(posedge clk); #1;
      expect_out(8'b10_000100, "S6");
      @(posedge clk); #1;
      expect_out(8'b10_000011, "S7");
      if (k >= 16) begin
        repeat (3) begin
          @(posedge clk); #1;
          expect_out(8'b10_000011, "S7 held while E");
        end
        e = 1'b0;
      end
      @(posedge clk); #1;
      expect_out(8'b10_000000, "S1");
      @(posedge clk); #1;
      expect_out(8'b10_000000, "S1 without E");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
