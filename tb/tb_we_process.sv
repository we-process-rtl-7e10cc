// tb_we_process: end-to-end test of the serial calculator at its default
// parameters (100 MHz clock, 9600 baud, 17-bit display refresh counter).
//
// The testbench bit-bangs bytes onto the serial input at 10417 clocks per
// bit and sets the opcode on `ir`. After every accepted byte it checks that
// the displayed result equals RA op RB of its own model (RA holds bytes 1,
// 3, 5, ..., RB bytes 2, 4, 6, ...), and for each pair it also decodes the
// two multiplexed seven-segment digits. It counts how often each mechanism
// happens -- a byte into RA, a byte into RB, the byte counter's extra steps
// past 11 and 00, the multiply path with its extra capture cycle, the
// ordinary ALU path, a frame with a bad stop bit being dropped, and the
// display switching digits -- and counts a failure for any that never
// happened.
module tb_we_process;
  localparam int CPB = (100_000_000 + 4800) / 9600;  // clocks per bit
  logic clk = 1'b0, rst_n = 1'b0, uart_rxd = 1'b1;
  logic [3:0] ir = 4'h0;
  logic [6:0] seg;
  logic [1:0] an;
  logic [7:0] result;
  logic done;
  int checks = 0, failures = 0;
  int n_ra = 0, n_rb = 0, n_skip = 0, n_mul = 0, n_alu = 0, n_drop = 0, n_digit = 0;
  int n_done_rx = 0;
  logic [1:0] an_q = 2'b00;

  we_process dut (.clk, .rst_n, .uart_rxd, .ir, .seg, .an, .result, .done);

  always #5 clk = ~clk;

  // mechanism counters, sampled from inside the design
  always @(posedge clk) if (rst_n) begin
    if (dut.u_uart.u_fsm.e1) n_ra++;
    if (dut.u_uart.u_fsm.e2) n_rb++;
    if (dut.u_uart.u_fsm.ec && dut.u_uart.u_fsm.state == we_pkg::U_S3) n_skip++;
    if (dut.u_proc.u_fsm.eu) n_mul++;
    if (dut.u_proc.u_fsm.ealu && !(ir == 4'h4 || ir == 4'h5)) n_alu++;
    if (dut.u_uart.done_rx) n_done_rx++;
    if (an != an_q && an_q != 2'b00) n_digit++;
    an_q <= an;
  end

  function automatic logic [7:0] model(input logic [3:0] o, input logic [7:0] x, input logic [7:0] z);
    int unsigned pr;
    pr = x * z;
    case (o)
      4'h0: return x + z;
      4'h1: return x - z;
      4'h2: return x << z[2:0];
      4'h3: return x >> z[2:0];
      4'h4: return pr[7:0];
      4'h5: return pr[15:8];
      4'h6: return x & z;
      4'h7: return x | z;
      4'h8: return x ^ z;
      4'h9: return ~(x & z);
      4'hA: return ~(x | z);
      4'hB: return ~(x ^ z);
      4'hC: return ~x;
      4'hD: return (x < z) ? 8'd1 : 8'd0;
      4'hE: return (x == z) ? 8'd1 : 8'd0;
      default: return x;
    endcase
  endfunction

  // active-low {g..a} pattern of a hex digit, from lit-segment letters
  function automatic logic [6:0] seg_of(input logic [3:0] h);
    string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    logic [6:0] p = 7'h7F;
    for (int k = 0; k < lit[h].len(); k++) p[lit[h][k] - "a"] = 1'b0;
    return p;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  task automatic send(input logic [7:0] b, input logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd <= f[i];
      repeat (CPB) @(posedge clk);
    end
    uart_rxd <= 1'b1;
    repeat (CPB) @(posedge clk);
  endtask

  task automatic check_digits(input logic [7:0] v);
    // wait for each digit to be lit and compare its segments
    while (an != 2'b10) @(posedge clk);
    #1;
    check(seg == seg_of(v[3:0]), $sformatf("low digit of %02h: seg=%07b", v, seg));
    while (an != 2'b01) @(posedge clk);
    #1;
    check(seg == seg_of(v[7:4]), $sformatf("high digit of %02h: seg=%07b", v, seg));
  endtask

  typedef struct {
    logic [7:0] a;
    logic [7:0] b;
    logic [3:0] op;
  } job_t;

  initial begin
    job_t jobs [8];
    logic [7:0] m_ra, m_rb, want;
    int d0;
    jobs[0] = '{8'd13, 8'd11, 4'h4};   // multiply, low byte  (143 = 0x8F)
    jobs[1] = '{8'hC8, 8'hFA, 4'h5};   // multiply, high byte (200*250 = 0xC350)
    jobs[2] = '{8'h3A, 8'h27, 4'h0};   // add
    jobs[3] = '{8'h10, 8'h2A, 4'h1};   // subtract
    jobs[4] = '{8'hF0, 8'h3C, 4'h6};   // and
    jobs[5] = '{8'h5A, 8'hFF, 4'h8};   // xor
    jobs[6] = '{8'h21, 8'h03, 4'h2};   // shift left
    jobs[7] = '{8'h07, 8'h09, 4'hD};   // less than
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);
    #1;
    check(result == 8'h00, "display not 00 after reset");
    check_digits(8'h00);
    m_ra = 8'h00;
    m_rb = 8'h00;
    for (int j = 0; j < 8; j++) begin
      ir = jobs[j].op;
      // operand A -> RA
      d0 = n_done_rx;
      send(jobs[j].a, 1'b1);
      m_ra = jobs[j].a;
      want = model(ir, m_ra, m_rb);
      check(n_done_rx == d0 + 1, $sformatf("job %0d: byte A not accepted", j));
      check(result == want, $sformatf("job %0d after A: result %02h expected %02h", j, result, want));
      if (j == 3) begin
        // a frame whose stop bit is 0 must be dropped
        d0 = n_done_rx;
        send(8'hEE, 1'b0);
        repeat (2 * CPB) @(posedge clk);
        check(n_done_rx == d0, "bad frame accepted");
        if (n_done_rx == d0) n_drop++;
      end
      // operand B -> RB
      d0 = n_done_rx;
      send(jobs[j].b, 1'b1);
      m_rb = jobs[j].b;
      want = model(ir, m_ra, m_rb);
      check(n_done_rx == d0 + 1, $sformatf("job %0d: byte B not accepted", j));
      check(dut.u_uart.ra == m_ra && dut.u_uart.rb == m_rb, $sformatf("job %0d: RA/RB", j));
      check(result == want, $sformatf("job %0d op %h: %02h,%02h result %02h expected %02h", j, ir, m_ra, m_rb, result, want));
      if (j < 3) check_digits(want);
    end
    check(want == 8'h01, "last job result");
    $display("mechanisms: RA loads %0d, RB loads %0d, counter extra steps %0d, multiply captures %0d, ALU ops %0d, frames dropped %0d, digit switches %0d",
             n_ra, n_rb, n_skip, n_mul, n_alu, n_drop, n_digit);
    check(n_ra > 0, "RA never loaded");
    check(n_rb > 0, "RB never loaded");
    check(n_skip > 0, "counter never stepped past 11/00");
    check(n_mul > 0, "multiply path never used");
    check(n_alu > 0, "ordinary ALU path never used");
    check(n_drop > 0, "no frame dropped");
    check(n_digit > 0, "display never switched digits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
